// crc_pkg - shared types, constants and elaboration-time helpers for the
// parallel CRC datapath.
//
// The CRC register is held in "normal" orientation: bit i of a register
// value is the coefficient of x^i, and a divisor P(x) = x^M + sum p_i x^i is
// stored as its low M coefficients p_{M-1}..p_0 (the x^M term is implicit).
// With this convention one step of the serial LFSR the parallel circuit is
// derived from is  x_i' = x_{i-1} ^ p_i x_{M-1},  x_0' = d ^ p_0 x_{M-1},
// i.e. the register is multiplied by x modulo P and the new bit enters at x_0.
//
// The defaults are those of ISO/IEC 13239 as used by ISO 15693: generator
// x^16 + x^12 + x^5 + 1 (0x1021 here, 0x8408 in the bit-reversed notation),
// preset all ones and a ones' complement of the result. The circuit works on
// the message followed by M zero bits ("augmented" division), so the preset
// of the standard, which is defined for the direct (non-augmented) form, is
// translated by aug_preset() into the equivalent starting state.
package crc_pkg;

  localparam int unsigned CRC_M = 16;                 // degree of the generator
  localparam int unsigned CRC_W = 8;                  // bits absorbed per clock
  localparam logic [CRC_M-1:0] ISO13239_POLY   = 16'h1021;
  localparam logic [CRC_M-1:0] ISO13239_PRESET = 16'hFFFF;
  localparam logic [CRC_M-1:0] ISO13239_XOROUT = 16'hFFFF;

  // Link direction, as labelled on the unit's simulation traces.
  typedef enum logic {
    DIR_RECEIVE = 1'b0,
    DIR_SEND    = 1'b1
  } dir_e;

  // Starting state S of the augmented-division register that is equivalent
  // to the direct-form preset I: S = I * x^-M mod P. Multiplying by x^-1 is
  // the inverse of one LFSR step with a zero input (p_0 must be 1).
  function automatic logic [CRC_M-1:0] aug_preset(
      input logic [CRC_M-1:0] preset, input logic [CRC_M-1:0] poly);
    logic [CRC_M-1:0] s;
    s = preset;
    for (int unsigned n = 0; n < CRC_M; n++) begin
      if (s[0]) s = ((s ^ poly) >> 1) | {1'b1, {(CRC_M-1){1'b0}}};
      else      s = s >> 1;
    end
    return s;
  endfunction

  // Register content left after message + FCS + M zeros when the FCS was
  // complemented with xorout: xorout * x^M mod P (the "good CRC" residue).
  function automatic logic [CRC_M-1:0] check_residue(
      input logic [CRC_M-1:0] xorout, input logic [CRC_M-1:0] poly);
    logic [CRC_M-1:0] r;
    r = xorout;
    for (int unsigned n = 0; n < CRC_M; n++)
      r = r[CRC_M-1] ? ((r << 1) ^ poly) : (r << 1);
    return r;
  endfunction

endpackage
