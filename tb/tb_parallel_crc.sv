// tb_parallel_crc - checks the parallel CRC register against the bit-serial
// LFSR stepped W times per word, at W = 8 (default) and W = 4, with random
// start states, words and idle clocks; also the clear-only, clear-with-first-
// word and hold behaviour, the asynchronous reset, the one-word-per-clock
// rate, and the ISO/IEC 13239 check value of "123456789" (0x906E) reached in
// (k + m) / w = (72 + 16) / 8 = 11 clocks.
module tb_parallel_crc;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  logic [15:0] poly;
  logic clear8, en8, clear4, en4;
  logic [15:0] init8, init4;
  logic [7:0] d8;
  logic [3:0] d4;
  logic [15:0] crc8, crc4;
  mat16_t f8, f4;

  parallel_crc dut8 (.clk(clk), .reset(reset), .clear(clear8), .init(init8),
                     .enable(en8), .d(d8), .enables(f8), .crc(crc8));
  parallel_crc #(.M(16), .W(4)) dut4 (.clk(clk), .reset(reset), .clear(clear4),
                     .init(init4), .enable(en4), .d(d4), .enables(f4), .crc(crc4));

  always #5 clk = ~clk;

  task automatic expect16(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] ref_word(logic [15:0] x, logic [15:0] p,
                                           logic [15:0] w, int n);
    // the earliest bit is the most significant of the n-bit word
    for (int t = n - 1; t >= 0; t--) x = lfsr_step(x, p, w[t]);
    return x;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp8, exp4;
    byte unsigned msg[$];
    logic [7:0] bits8;
    int start;
    clear8 = 0; en8 = 0; clear4 = 0; en4 = 0; init8 = 0; init4 = 0; d8 = 0; d4 = 0;
    poly = 16'h1021;
    f8 = mat_pow(poly, 8); f4 = mat_pow(poly, 4);
    #12;
    expect16("reset W8", crc8, 16'h0000);
    reset = 0;

    for (int pi = 0; pi < 4; pi++) begin
      if (pi > 0) poly = 16'($urandom) | 16'h0001;
      f8 = mat_pow(poly, 8); f4 = mat_pow(poly, 4);
      // clear alone loads init
      @(negedge clk);
      init8 = 16'($urandom); init4 = 16'($urandom);
      clear8 = 1; clear4 = 1;
      @(negedge clk);
      clear8 = 0; clear4 = 0;
      expect16("clear W8", crc8, init8);
      expect16("clear W4", crc4, init4);
      exp8 = init8; exp4 = init4;
      for (int n = 0; n < 200; n++) begin
        en8 = ($urandom % 4) != 0; en4 = ($urandom % 4) != 0;
        d8 = 8'($urandom); d4 = 4'($urandom);
        if (en8) exp8 = ref_word(exp8, poly, 16'(d8), 8);
        if (en4) exp4 = ref_word(exp4, poly, 16'(d4), 4);
        @(negedge clk);
        expect16("step W8", crc8, exp8);
        expect16("step W4", crc4, exp4);
      end
      en8 = 0; en4 = 0;
      // clear together with the first word
      init8 = 16'($urandom); d8 = 8'($urandom);
      clear8 = 1; en8 = 1;
      exp8 = ref_word(init8, poly, 16'(d8), 8);
      @(negedge clk);
      clear8 = 0; en8 = 0;
      expect16("clear+word W8", crc8, exp8);
      // hold
      repeat (3) @(negedge clk);
      expect16("hold W8", crc8, exp8);
    end

    // ISO/IEC 13239 check value through the W=8 register at one word per clock
    poly = 16'h1021; f8 = mat_pow(poly, 8);
    msg = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    @(negedge clk);
    init8 = 16'h84CF;          // 0xFFFF preset moved back by x^-16
    start = 0;
    for (int i = 0; i < msg.size() + 2; i++) begin
      clear8 = (i == 0); en8 = 1;
      if (i < msg.size())
        for (int b = 0; b < 8; b++) bits8[7 - b] = msg[i][b];  // LSB first on the line
      else bits8 = 8'h00;      // augmentation zeros
      d8 = bits8;
      @(negedge clk);
      start++;
    end
    clear8 = 0; en8 = 0;
    checks++;
    if (start != (72 + 16) / 8) begin failures++; $display("FAIL word count %0d", start); end
    // reflected, complemented register is the standard's FCS
    exp8 = '0;
    for (int j = 0; j < 16; j++) exp8[j] = ~crc8[15 - j];
    expect16("check value 123456789", exp8, 16'h906E);
    expect16("check value vs serial ref", exp8, x25_crc(msg));

    // asynchronous reset
    #2 reset = 1; #1;
    expect16("async reset", crc8, 16'h0000);
    reset = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
