// parallel_crc - the W-bits-per-clock CRC register (the "parallel CRC
// architecture").
//
// M flip-flops hold the state X = [x_{M-1} .. x_0]. On every clock with
// 'enable' high they load X' = F^W (x) X ^ D: each next-state bit is an XOR
// tree over AND gates, one AND per present-state bit gated by an entry of the
// enable matrix F^W, plus one data bit. D carries the W message bits of this
// clock in its low W positions with the earliest bit highest (d[W-1] = first
// bit, d[0] = last bit) and zeros above; this is exact for W <= M.
// Feeding a k-bit message followed by M zero bits in (k+M)/W clocks leaves
// the remainder (the FCS before any final complement) in X.
//
// 'clear' starts a new message: the present state is taken as 'init' for
// this clock, so clear alone loads init (an init of zero is the plain clear
// of the flip-flops) and clear together with enable already absorbs the
// first word. 'reset' is an asynchronous active-high reset to zero. The state is visible on 'crc' directly from the
// flip-flops; the update has a latency of one clock.
//
// The next-state equation and the placement of the data bits follow the
// published state-space derivation of the parallel CRC; loading a start
// value on clear, the enable input and the separate reset are this design's
// own additions.
module parallel_crc #(
  parameter int unsigned M = 16,
  parameter int unsigned W = 8
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clear,
  input  logic [M-1:0]         init,
  input  logic                 enable,
  input  logic [W-1:0]         d,
  input  logic [M-1:0][M-1:0]  enables,
  output logic [M-1:0]         crc
);

  logic [M-1:0] x_q, x_cur, x_next;

  initial assert (W >= 1 && W <= M)
    else $error("parallel_crc: W=%0d must lie in 1..M=%0d", W, M);

  assign x_cur = clear ? init : x_q;

  always_comb begin
    for (int unsigned i = 0; i < M; i++)
      x_next[i] = ^(enables[i] & x_cur);
    x_next[W-1:0] = x_next[W-1:0] ^ d;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       x_q <= '0;
    else if (enable) x_q <= x_next;
    else if (clear)  x_q <= init;
  end

  assign crc = x_q;

endmodule
