// rfid_crc_pld - CRC logic of the RFID reader's programmable device.
//
// In the reader the controller exchanges serial frames with the RF front end;
// this block sits in that path, computes the frame check sequence of
// ISO/IEC 13239 (generator x^16 + x^12 + x^5 + 1, preset all ones, result
// complemented, bits processed least significant first) W bits per clock
// for frames being sent, and checks it for frames being received.
//
// It joins two parts: crc_matrix_gen turns the generator polynomial into the
// enable matrix F^W, and crc_link_unit (which holds the parallel CRC register)
// frames the serial stream, appends the augmentation zeros, and sends or
// checks the FCS. The polynomial is a parameter, so the matrix generator
// reduces to constant enables; the equivalent starting state for the
// augmented division and the check residue are derived from the parameters
// at elaboration.
//
// Ports and timing are those of crc_link_unit: one frame bit per clock while
// valid_data is high; M/W clocks after the last bit the remainder is in
// temp, then the 16-bit FCS follows on data_out (direction = send) or error
// and done are set one clock later (direction = receive).
//
// Placing the parallel CRC in a programmable device between the reader's
// controller and its RF part follows the system it was made for; the single
// serial port pair with a direction input is this design's choice.
module rfid_crc_pld
  import crc_pkg::*;
#(
  parameter int unsigned      W      = CRC_W,
  parameter logic [CRC_M-1:0] POLY   = ISO13239_POLY,
  parameter logic [CRC_M-1:0] PRESET = ISO13239_PRESET,
  parameter logic [CRC_M-1:0] XOROUT = ISO13239_XOROUT
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             data,
  input  logic             valid_data,
  input  dir_e             direction,
  output logic [CRC_M-1:0] temp,
  output logic             data_out,
  output logic             fcs_valid,
  output logic             error,
  output logic             done,
  output logic             busy
);

  logic [CRC_M-1:0][CRC_M-1:0] enables;

  crc_matrix_gen #(.M(CRC_M), .W(W)) u_matrix (
    .poly    (POLY),
    .enables (enables)
  );

  crc_link_unit #(
    .W          (W),
    .INIT_STATE (aug_preset(PRESET, POLY)),
    .XOROUT     (XOROUT),
    .RESIDUE    (check_residue(XOROUT, POLY))
  ) u_link (
    .clk        (clk),
    .reset      (reset),
    .data       (data),
    .valid_data (valid_data),
    .direction  (direction),
    .enables    (enables),
    .temp       (temp),
    .data_out   (data_out),
    .fcs_valid  (fcs_valid),
    .error      (error),
    .done       (done),
    .busy       (busy)
  );

endmodule
