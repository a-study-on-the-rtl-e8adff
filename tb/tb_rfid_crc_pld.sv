// tb_rfid_crc_pld - end-to-end test of the reader's CRC logic with every
// parameter at its default (W = 8, ISO/IEC 13239 CRC-16).
//
// It repeats 1000 transponder-ID reads as an ISO 15693 reader performs them:
//   1. the inventory request (flags 0x26, command 0x01, mask length 0x00) is
//      passed through in send direction and must come out with the FCS of
//      the bit-serial reference model;
//   2. the transponder's answer (flags, DSFID, 8-byte UID, FCS) is passed
//      through in receive direction; one read in eight arrives with bit
//      errors and must be flagged, the others must be accepted and the UID
//      is counted as read.
// Every 100th read also sends a frame that stops three bits short of a
// byte, which must be rejected, and frames are sent back to back (next frame
// in the clock after done) as often as with an idle gap. A reset in the
// middle of a frame ends the run. The latency from last frame bit to
// result is checked on every frame, and each mechanism must have occurred.
module tb_rfid_crc_pld;
  import crc_pkg::*;
  import tb_crc_ref_pkg::*;

  localparam int M = 16, W = 8, NAUG = M / W, READS = 1000;

  int checks = 0, failures = 0;
  int n_send = 0, n_accept = 0, n_reject = 0, n_misaligned = 0;
  int n_back_to_back = 0, n_gap = 0, n_reset = 0, n_ids = 0;

  logic clk = 0, reset = 1;
  logic data = 0, valid_data = 0;
  dir_e direction = DIR_RECEIVE;
  logic [15:0] temp;
  logic data_out, fcs_valid, error, done, busy;

  rfid_crc_pld dut (.clk(clk), .reset(reset), .data(data), .valid_data(valid_data),
                    .direction(direction), .temp(temp), .data_out(data_out),
                    .fcs_valid(fcs_valid), .error(error), .done(done), .busy(busy));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One frame, bit by bit; returns the FCS seen on data_out and the edges
  // from the last frame bit to done. Leaves the caller at the negedge after
  // done, so the next frame can start in the very next clock.
  task automatic run_frame(input logic bits[$], input dir_e dir, input bit gap,
                           output logic [15:0] fcs, output int nfcs, output int t_done);
    int t;
    fcs = '0; nfcs = 0; t_done = -1;
    if (gap) repeat (1 + $urandom % 3) @(negedge clk);
    direction = dir;
    foreach (bits[i]) begin
      valid_data = 1; data = bits[i];
      @(negedge clk);
    end

    valid_data = 0; data = 0;
    t = 0;
    while (t < 100) begin
      if (fcs_valid) begin
        if (nfcs < 16) fcs[nfcs] = data_out;
        nfcs++;
      end
      if (done) begin t_done = t; break; end
      @(negedge clk);
      t++;
    end
  endtask

  function automatic void to_bits(input byte unsigned msg[$], output logic bits[$]);
    bits = {};
    foreach (msg[i]) for (int b = 0; b < 8; b++) bits.push_back(msg[i][b]);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned req[$], rsp[$];
    logic bits[$];
    logic [15:0] fcs, ref_fcs;
    int nfcs, t_done, flips, pos;
    bit gap, corrupt;
    #12 reset = 0;
    @(negedge clk);

    for (int r = 0; r < READS; r++) begin
      // 1. inventory request from the reader
      req = '{8'h26, 8'h01, 8'h00};
      ref_fcs = x25_crc(req);
      to_bits(req, bits);
      gap = (r % 2 == 0);
      if (gap) n_gap++; else n_back_to_back++;
      run_frame(bits, DIR_SEND, gap, fcs, nfcs, t_done);
      check("request FCS", nfcs == 16 && fcs == ref_fcs);
      check("request latency", t_done == 1 + NAUG + M);
      check("request no error", !error);
      n_send++;

      // 2. transponder answer: flags, DSFID, UID (E0 first on the air is the
      //    UID's last byte; least significant byte is sent first)
      rsp = '{8'h00, 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom),
              8'($urandom), 8'($urandom), 8'h01, 8'h04, 8'hE0};
      ref_fcs = x25_crc(rsp);
      to_bits(rsp, bits);
      for (int j = 0; j < 16; j++) bits.push_back(ref_fcs[j]);
      corrupt = (r % 8 == 3);
      if (corrupt) begin
        flips = 1 + $urandom % 3;
        for (int k = 0; k < flips; k++) begin
          pos = $urandom % bits.size();
          bits[pos] = ~bits[pos];
        end
      end
      run_frame(bits, DIR_RECEIVE, (r % 3 == 0), fcs, nfcs, t_done);
      check("answer latency", t_done == 2 + NAUG && nfcs == 0);
      check(corrupt ? "corrupted answer rejected" : "good answer accepted", error == corrupt);
      if (error) n_reject++; else begin n_accept++; n_ids++; end

      // 3. now and then a frame that is not whole bytes
      if (r % 100 == 50) begin
        bits = bits[0:bits.size() - 4];
        run_frame(bits, DIR_RECEIVE, 1'b1, fcs, nfcs, t_done);
        check("misaligned frame rejected", error && t_done == 1);
        n_misaligned++;
      end
    end

    // reset in the middle of a frame, then one more good request
    valid_data = 1; direction = DIR_SEND;
    repeat (7) @(negedge clk);
    reset = 1; #1;
    check("reset mid-frame", !busy && !error);
    valid_data = 0;
    @(negedge clk); reset = 0;
    n_reset++;
    to_bits(req, bits);
    run_frame(bits, DIR_SEND, 1'b1, fcs, nfcs, t_done);
    check("request after reset", nfcs == 16 && fcs == x25_crc(req));

    check("FCS generation happened", n_send > 0);
    check("FCS accepted happened", n_accept > 0);
    check("FCS error happened", n_reject > 0);
    check("misaligned frame happened", n_misaligned > 0);
    check("back-to-back frames happened", n_back_to_back > 0);
    check("frames after a gap happened", n_gap > 0);
    check("reset mid-frame happened", n_reset > 0);
    $display("reads=%0d ids=%0d sent=%0d accepted=%0d rejected=%0d misaligned=%0d b2b=%0d",
             READS, n_ids, n_send, n_accept, n_reject, n_misaligned, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
