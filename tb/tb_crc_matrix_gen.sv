// tb_crc_matrix_gen - checks the F^W enable matrix against matrix powers
// computed by repeated multiplication, for the ISO/IEC 13239 polynomial and
// random polynomials, at W = 8 (default), 1, 4 and 16.
module tb_crc_matrix_gen;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0] poly;
  mat16_t e8, e1, e4, e16;

  crc_matrix_gen dut8 (.poly(poly), .enables(e8));
  crc_matrix_gen #(.M(16), .W(1))  dut1  (.poly(poly), .enables(e1));
  crc_matrix_gen #(.M(16), .W(4))  dut4  (.poly(poly), .enables(e4));
  crc_matrix_gen #(.M(16), .W(16)) dut16 (.poly(poly), .enables(e16));

  task automatic check_all();
    mat16_t r;
    r = mat_pow(poly, 8);
    checks++; if (e8 !== r) begin failures++; $display("FAIL W=8 poly=%h", poly); end
    r = mat_pow(poly, 1);
    checks++; if (e1 !== r) begin failures++; $display("FAIL W=1 poly=%h", poly); end
    r = mat_pow(poly, 4);
    checks++; if (e4 !== r) begin failures++; $display("FAIL W=4 poly=%h", poly); end
    r = mat_pow(poly, 16);
    checks++; if (e16 !== r) begin failures++; $display("FAIL W=16 poly=%h", poly); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly = 16'h1021; #1; check_all();
    poly = 16'h8005; #1; check_all();
    for (int n = 0; n < 40; n++) begin
      poly = 16'($urandom);
      #1; check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
