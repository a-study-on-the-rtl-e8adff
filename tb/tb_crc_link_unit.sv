// tb_crc_link_unit - drives the same serial frames through three link units,
// at the default W = 8 and at W = 1 and W = 16 (ISO/IEC 13239 CRC-16), and
// checks for each:
//   * sending: the 16 FCS bits on data_out equal the bit-serial reference
//     CRC, least significant bit first, and the register shows the matching
//     remainder; first FCS bit 1 + M/W clocks and done 1 + M/W + M clocks
//     after the last frame bit;
//   * receiving: frames with a correct FCS give no error, frames with one or
//     more flipped bits give error; done 2 + M/W clocks after the last bit;
//   * a frame that is not a whole number of bytes is rejected with error;
//   * asynchronous reset returns the unit to idle.
module tb_crc_link_unit;
  import crc_pkg::*;
  import tb_crc_ref_pkg::*;

  localparam int M = 16, NDUT = 3;
  localparam int WS[NDUT] = '{8, 1, 16};

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  logic data = 0, valid_data = 0;
  dir_e direction = DIR_RECEIVE;
  mat16_t enables[NDUT];
  logic [15:0] temp[NDUT];
  logic [NDUT-1:0] data_out, fcs_valid, error, done, busy;

  crc_link_unit dut (.clk(clk), .reset(reset), .data(data), .valid_data(valid_data),
                     .direction(direction), .enables(enables[0]), .temp(temp[0]),
                     .data_out(data_out[0]), .fcs_valid(fcs_valid[0]), .error(error[0]),
                     .done(done[0]), .busy(busy[0]));
  for (genvar g = 1; g < NDUT; g++) begin : g_w
    crc_link_unit #(.W(WS[g])) dut_w (
      .clk(clk), .reset(reset), .data(data), .valid_data(valid_data),
      .direction(direction), .enables(enables[g]), .temp(temp[g]),
      .data_out(data_out[g]), .fcs_valid(fcs_valid[g]), .error(error[g]),
      .done(done[g]), .busy(busy[g]));
  end

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Sends bits[0..n-1] one per clock; returns the FCS bits seen on data_out
  // and the clocks from the last bit to the first FCS bit and to done.
  logic fcs_q[NDUT][$];
  int   t_fcs_q[NDUT], t_done_q[NDUT];

  task automatic run_frame(input logic bits[$], input dir_e dir);
    int t;
    for (int g = 0; g < NDUT; g++) begin
      fcs_q[g] = {}; t_fcs_q[g] = -1; t_done_q[g] = -1;
    end
    @(negedge clk);
    direction = dir;
    foreach (bits[i]) begin
      valid_data = 1; data = bits[i];
      @(negedge clk);
    end
    valid_data = 0; data = 0;
    direction = dir_e'($urandom % 2);   // only sampled on the first bit
    t = 0;   // clock edges since the one that took the last bit
    while (t < 200) begin
      for (int g = 0; g < NDUT; g++) begin
        if (fcs_valid[g] && t_done_q[g] < 0) begin
          if (t_fcs_q[g] < 0) t_fcs_q[g] = t;
          fcs_q[g].push_back(data_out[g]);
        end
        if (done[g] && t_done_q[g] < 0) t_done_q[g] = t;
      end
      if (!busy && !done) break;
      @(negedge clk);
      t++;
    end
  endtask

  function automatic void to_bits(input byte unsigned msg[$], output logic bits[$]);
    bits = {};
    foreach (msg[i]) for (int b = 0; b < 8; b++) bits.push_back(msg[i][b]);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned msg[$];
    logic bits[$];
    logic [15:0] ref_fcs, got, rem;
    int n, flips, pos, naug;
    for (int g = 0; g < NDUT; g++) enables[g] = mat_pow(16'h1021, WS[g]);
    #12 reset = 0;
    check("idle after reset", busy == '0 && error == '0);

    for (int f = 0; f < 60; f++) begin
      msg = {};
      if (f == 0) msg = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
      else begin
        n = 1 + $urandom % 24;
        repeat (n) msg.push_back(8'($urandom));
      end
      ref_fcs = x25_crc(msg);
      if (f == 0) check("check value is 906E", ref_fcs == 16'h906E);

      // sending
      to_bits(msg, bits);
      run_frame(bits, DIR_SEND);
      for (int j = 0; j < 16; j++) rem[15 - j] = ~ref_fcs[j];
      for (int g = 0; g < NDUT; g++) begin
        naug = M / WS[g];
        if (bits.size() % WS[g] != 0) begin
          // odd byte count at W = 16: not a whole number of words
          check($sformatf("W=%0d odd frame rejected", WS[g]),
                error[g] && fcs_q[g].size() == 0 && t_done_q[g] == 1);
          continue;
        end
        got = '0;
        foreach (fcs_q[g][j]) if (j < 16) got[j] = fcs_q[g][j];
        check($sformatf("W=%0d 16 FCS bits", WS[g]), fcs_q[g].size() == 16);
        check($sformatf("W=%0d FCS %h vs %h", WS[g], got, ref_fcs), got == ref_fcs);
        check($sformatf("W=%0d remainder in temp", WS[g]), temp[g] == rem);
        check($sformatf("W=%0d first FCS bit after %0d clocks", WS[g], t_fcs_q[g]),
              t_fcs_q[g] == 1 + naug);
        check($sformatf("W=%0d send done after %0d clocks", WS[g], t_done_q[g]),
              t_done_q[g] == 1 + naug + M);
        check($sformatf("W=%0d no error on send", WS[g]), !error[g]);
      end

      // receiving the same frame with its FCS appended
      for (int j = 0; j < 16; j++) bits.push_back(ref_fcs[j]);
      run_frame(bits, DIR_RECEIVE);
      for (int g = 0; g < NDUT; g++) begin
        naug = M / WS[g];
        if (bits.size() % WS[g] != 0) begin
          check($sformatf("W=%0d odd frame rejected", WS[g]), error[g] && t_done_q[g] == 1);
          continue;
        end
        check($sformatf("W=%0d receive done after %0d clocks", WS[g], t_done_q[g]),
              t_done_q[g] == 2 + naug);
        check($sformatf("W=%0d good frame accepted", WS[g]), !error[g] && fcs_q[g].size() == 0);
      end

      // receiving it corrupted
      flips = 1 + $urandom % 3;
      for (int k = 0; k < flips; k++) begin
        pos = $urandom % bits.size();
        bits[pos] = ~bits[pos];
      end
      run_frame(bits, DIR_RECEIVE);
      // up to 3 flipped bits are always detected by this generator
      for (int g = 0; g < NDUT; g++)
        if (bits.size() % WS[g] == 0)
          check($sformatf("W=%0d corrupted frame rejected", WS[g]),
                error[g] && t_done_q[g] == 2 + M / WS[g]);

      // a frame 3 bits short of a whole byte: rejected by the W = 8 and
      // W = 16 units, a valid (error-free only by chance) frame for W = 1
      if (f % 10 == 0) begin
        to_bits(msg, bits);
        bits = bits[0:bits.size() - 4];
        run_frame(bits, dir_e'(f % 20 == 0));
        for (int g = 0; g < NDUT; g++)
          if (WS[g] > 1)
            check($sformatf("W=%0d misaligned frame rejected", WS[g]),
                  error[g] && fcs_q[g].size() == 0 && t_done_q[g] == 1);
      end
    end

    // reset in the middle of a frame
    @(negedge clk); valid_data = 1; direction = DIR_SEND;
    repeat (5) @(negedge clk);
    reset = 1; #1;
    for (int g = 0; g < NDUT; g++)
      check("async reset to idle", !busy[g] && !error[g] && temp[g] == 16'h0000);
    valid_data = 0;
    @(negedge clk); reset = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
