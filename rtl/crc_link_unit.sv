// crc_link_unit - serial-in CRC generator and checker built around the
// parallel CRC register, for the link between the reader controller and the
// reader.
//
// A frame is the run of clocks on which valid_data is high; 'data' carries
// one bit per such clock in transmission order (ISO 15693 sends each byte
// least significant bit first, which is the order the ISO/IEC 13239 CRC
// processes bits in). The unit groups the bits into W-bit words and hands
// each completed word to parallel_crc in the clock its last bit arrives, so
// the CRC keeps pace with the bit stream. When valid_data falls it feeds the
// M augmentation zeros as M/W zero words, after which the register holds the
// remainder of the frame. Then, by the direction latched at the frame start:
//   DIR_SEND    - the FCS (remainder xor XOROUT) is shifted out on data_out
//                 for M clocks, most significant register bit first, with
//                 fcs_valid high; this is the standard's reversed FCS sent
//                 least significant bit first.
//   DIR_RECEIVE - the frame is taken to end with its FCS; after augmentation
//                 the register must equal RESIDUE (XOROUT * x^M mod P), else
//                 'error' is set.
// A frame whose length is not a multiple of W bits is not processed: 'error'
// is set at once. 'error' holds until the next frame starts; 'done' pulses
// for one clock when a frame is finished. 'temp' shows the CRC register.
//
// Timing, counted in clock edges after the one that takes the last frame
// bit: the end of the frame is seen at the first edge, the M/W zero words
// are absorbed at the next M/W edges, so the remainder is in temp after
// 1 + M/W edges. Sending: the FCS bits follow on data_out for M clocks,
// the first one right then, and done is high in the clock after the last
// one (after 1 + M/W + M edges). Receiving: error and done are set after
// 2 + M/W edges. A misaligned frame is flagged after 1 edge.
//
// The signal set (Data, Reset, Clock, Direction, Valid_Data, Temp, Output,
// Error) is the one of the unit's published simulation traces; the framing by
// valid_data, the one-bit-per-clock input, the FCS bit order on data_out and
// the extra done/busy/fcs_valid outputs are this design's own choices.
// An assertion flags frame bits offered before the previous frame is done.
module crc_link_unit
  import crc_pkg::*;
#(
  parameter int unsigned     W         = CRC_W,
  parameter logic [CRC_M-1:0] INIT_STATE = aug_preset(ISO13239_PRESET, ISO13239_POLY),
  parameter logic [CRC_M-1:0] XOROUT    = ISO13239_XOROUT,
  parameter logic [CRC_M-1:0] RESIDUE   = check_residue(ISO13239_XOROUT, ISO13239_POLY)
) (
  input  logic                        clk,
  input  logic                        reset,       // asynchronous, active high
  input  logic                        data,        // serial frame bit
  input  logic                        valid_data,  // high for every frame bit
  input  dir_e                        direction,   // sampled on the first bit
  input  logic [CRC_M-1:0][CRC_M-1:0] enables,     // F^W from crc_matrix_gen
  output logic [CRC_M-1:0]            temp,        // CRC register
  output logic                        data_out,    // serial FCS (sending)
  output logic                        fcs_valid,   // data_out carries an FCS bit
  output logic                        error,       // FCS mismatch or misaligned frame
  output logic                        done,        // one-clock end-of-frame pulse
  output logic                        busy
);

  localparam int unsigned M       = CRC_M;
  localparam int unsigned NAUG    = M / W;                 // zero words
  localparam int unsigned CW      = $clog2(W) > 0 ? $clog2(W) : 1;
  localparam int unsigned AW      = $clog2(NAUG) > 0 ? $clog2(NAUG) : 1;
  localparam int unsigned SW      = $clog2(M);

  initial assert (W >= 1 && W <= M && (M % W) == 0)
    else $error("crc_link_unit: W=%0d must divide M=%0d", W, M);

  typedef enum logic [2:0] {
    S_IDLE,     // waiting for a frame; register holds the last result
    S_SHIFT,    // frame bits arriving
    S_AUGMENT,  // M/W zero words
    S_SEND,     // FCS on data_out
    S_CHECK     // compare the register with the residue
  } state_e;

  state_e          state_q;
  dir_e            dir_q;
  logic [W-1:0]    word_q;      // bits of the word being collected
  logic [CW-1:0]   bitcnt_q;    // bits already in word_q
  logic [AW-1:0]   augcnt_q;
  logic [SW-1:0]   sendcnt_q;
  logic            error_q, done_q;

  logic            first_bit, in_frame_bit, word_done;
  logic [W:0]      word_ext;
  logic [W-1:0]    crc_d;
  logic            crc_clear, crc_en;
  logic [M-1:0]    fcs_word;
  logic            fcs_bit;

  assign first_bit    = (state_q == S_IDLE) && valid_data;
  assign in_frame_bit = valid_data && (state_q == S_IDLE || state_q == S_SHIFT);
  // the bit of this clock completes a word
  assign word_done    = in_frame_bit &&
                        (first_bit ? (W == 1) : (32'(bitcnt_q) == W - 1));
  assign word_ext     = {word_q, data};

  always_comb begin
    crc_clear = first_bit;
    crc_en    = 1'b0;
    crc_d     = '0;
    if (word_done) begin
      crc_en = 1'b1;
      crc_d  = word_ext[W-1:0];
    end else if (state_q == S_AUGMENT) begin
      crc_en = 1'b1;            // zero word
    end
  end

  parallel_crc #(.M(M), .W(W)) u_crc (
    .clk     (clk),
    .reset   (reset),
    .clear   (crc_clear),
    .init    (INIT_STATE),
    .enable  (crc_en),
    .d       (crc_d),
    .enables (enables),
    .crc     (temp)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state_q   <= S_IDLE;
      dir_q     <= DIR_RECEIVE;
      word_q    <= '0;
      bitcnt_q  <= '0;
      augcnt_q  <= '0;
      sendcnt_q <= '0;
      error_q   <= 1'b0;
      done_q    <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (valid_data) begin
            state_q  <= S_SHIFT;
            dir_q    <= direction;
            error_q  <= 1'b0;
            word_q   <= W'(word_ext);
            bitcnt_q <= (W == 1) ? '0 : CW'(1);
          end
        end
        S_SHIFT: begin
          if (valid_data) begin
            word_q   <= W'(word_ext);
            bitcnt_q <= word_done ? '0 : bitcnt_q + 1'b1;
          end else if (bitcnt_q != '0) begin
            // frame is not a whole number of words: reject it
            state_q <= S_IDLE;
            error_q <= 1'b1;
            done_q  <= 1'b1;
          end else begin
            state_q  <= S_AUGMENT;
            augcnt_q <= '0;
          end
        end
        S_AUGMENT: begin
          if (32'(augcnt_q) == NAUG - 1) begin
            sendcnt_q <= '0;
            state_q   <= (dir_q == DIR_SEND) ? S_SEND : S_CHECK;
          end
          augcnt_q <= augcnt_q + 1'b1;
        end
        S_CHECK: begin
          error_q <= (temp != RESIDUE);
          done_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        S_SEND: begin
          sendcnt_q <= sendcnt_q + 1'b1;
          if (32'(sendcnt_q) == M - 1) begin
            state_q <= S_IDLE;
            done_q  <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The register is idle during S_SEND and holds the remainder; its bits go
  // out from x_{M-1} down to x_0, each complemented where XOROUT is set.
  assign fcs_word  = temp ^ XOROUT;
  assign fcs_bit   = fcs_word[(M-1) - 32'(sendcnt_q)];
  assign data_out  = (state_q == S_SEND) ? fcs_bit : 1'b0;

  // A frame may only begin once the previous one is finished: bits offered
  // while the unit augments, sends or checks would be lost.
  a_no_bits_while_finishing: assert property (
    @(posedge clk) disable iff (reset)
      valid_data |-> (state_q == S_IDLE || state_q == S_SHIFT))
    else $error("crc_link_unit: frame bit offered while the previous frame is being finished");
  assign fcs_valid = (state_q == S_SEND);
  assign error     = error_q;
  assign done      = done_q;
  assign busy      = (state_q != S_IDLE);

endmodule
