// tb_crc_ref_pkg - reference models for the CRC testbenches, written
// independently of the RTL's method.
//   * x25_crc: the ISO/IEC 13239 CRC-16 computed the textbook way, one bit
//     at a time on a right-shifting register with the reversed polynomial
//     0x8408, preset 0xFFFF and a final complement (check value of the ASCII
//     string "123456789" is 0x906E).
//   * lfsr_steps: the augmented-division LFSR in normal orientation, stepped
//     bit by bit.
//   * mat_pow: F^n by repeated GF(2) matrix multiplication (the RTL uses the
//     column recursion instead).
package tb_crc_ref_pkg;

  typedef logic [15:0][15:0] mat16_t;

  function automatic logic [15:0] x25_crc(input byte unsigned msg[$]);
    logic [15:0] c;
    c = 16'hFFFF;
    foreach (msg[i]) begin
      c ^= {8'h00, msg[i]};
      for (int b = 0; b < 8; b++)
        c = c[0] ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    end
    return ~c;
  endfunction

  // one serial LFSR step: x_i' = x_{i-1} ^ p_i x_{M-1}, x_0' = d ^ p_0 x_{M-1}
  function automatic logic [15:0] lfsr_step(input logic [15:0] x,
                                            input logic [15:0] poly,
                                            input logic d);
    logic fb;
    fb = x[15];
    x  = {x[14:0], d};
    if (fb) x ^= poly;
    return x;
  endfunction

  function automatic mat16_t mat_mul(input mat16_t a, input mat16_t b);
    mat16_t c;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        c[i][j] = 1'b0;
        for (int k = 0; k < 16; k++) c[i][j] ^= a[i][k] & b[k][j];
      end
    return c;
  endfunction

  function automatic mat16_t mat_pow(input logic [15:0] poly, input int n);
    mat16_t f, r;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        r[i][j] = (i == j);
        // F: x_i' depends on x_{i-1} and, through p_i, on x_15
        f[i][j] = ((j == i - 1) ? 1'b1 : 1'b0) ^ ((j == 15) ? poly[i] : 1'b0);
      end
    for (int k = 0; k < n; k++) r = mat_mul(r, f);
    return r;
  endfunction

endpackage
