# Parallel CRC-16 for an ISO 15693 RFID reader

A 13.56 MHz vicinity-card reader (ISO 15693) protects every frame with the
16-bit CRC of ISO/IEC 13239. The usual hardware for it is a bit-serial linear
feedback shift register (LFSR): one clock per message bit. This design
computes the same CRC **w bits per clock** (w = 8 by default). It does this with a
register whose next state is a fixed GF(2) matrix times the present state,
XORed with the new data word. It sits in the serial path between the
reader's controller and its RF front end. For frames being sent it appends
the FCS (frame check sequence). For frames being received it checks the FCS
and raises `error`.

The design targets a small programmable logic device. The RF front end, the
tag and the controller firmware are outside it.

## The idea: one matrix step replaces w shift steps

Write the CRC register as a column vector X = [x15 … x0] with bit i holding
the coefficient of x^i. Here P(x) = x^16 + Σ p_i x^i is the generator
(p = 0x1021 for x^16 + x^12 + x^5 + 1). One step of the serial LFSR is

    x_i' = x_{i-1} ^ (p_i & x_15)      for i > 0
    x_0' = d       ^ (p_0 & x_15)

This is linear: X' = F·X ⊕ G·d. F holds the divisor bits in its x15 column
and a shifted identity elsewhere, and G puts d into x0. Unrolling w steps
gives

    X' = F^w · X  ⊕  D

D holds the w new bits, earliest bit highest: D = [0 … 0 | b0 … b(w-1)].
So b0 lands in x_{w-1} and b(w-1) in x0. That is exact as long as w ≤ 16,
because a bit entering at x0 does not reach the feedback tap within w
steps. In hardware, every next-state bit is an XOR tree over AND gates. Each
AND is enabled by one entry of F^w. The AND gates vanish when the divisor is
constant.

F^w is built column-wise. F^i is F^(i-1) with its columns shifted one place
towards x0, and with F^(i-1)·P as the new x15 column. For w < 16 the
16 − w low columns are always a shifted identity over zeros. Only the top w
columns depend on the polynomial.

### Augmented division, and why the preset is not 0xFFFF

The circuit divides the message **followed by 16 zero bits** by P. After
(k + 16)/w clocks, the register holds the remainder of M(x)·x^16. The
standard's preset (all ones) is defined for the usual direct-form LFSR,
which needs no trailing zeros. In augmented form, the same preset is a
starting state S with S·x^16 ≡ 0xFFFF (mod P). That state is 0x84CF.
`crc_pkg::aug_preset()` computes it at elaboration by running the LFSR
backwards 16 steps. The 16 zeros cost only 16/w = 2 clocks at w = 8.

### Bit order and the reversed polynomial

ISO/IEC 13239 writes the polynomial reversed (0x8408) because ISO 15693
sends each byte least significant bit first and the CRC consumes bits in
that order. This design keeps the register in normal orientation (0x1021)
and feeds it the bits **in line order**, which is the same computation.
The standard's FCS is the complemented register read from x15 down to x0,
so `data_out` sends ~x15 first. The receiver sees exactly the standard's
LSB-first FCS. The ASCII string "123456789" gives 0x906E, the check value
of this CRC.

### Checking a received frame

A received frame is divided together with its FCS, plus the 16 zeros. For
an intact frame, the remainder is always the same constant:
0xFFFF·x^16 mod P = 0x1D0F. The value comes from `crc_pkg::check_residue()`.
Any other value sets `error`. Every error pattern of up to three bits is
caught (this generator has Hamming distance 4 at these lengths), as is
every burst of up to 16 bits.

## Blocks

| module | role |
|---|---|
| `crc_pkg` | shared constants (ISO/IEC 13239 polynomial, preset, complement), the direction enum, and the preset and residue functions |
| `crc_matrix_gen` | combinational: divisor bits in, the 16×16 enable matrix F^w out |
| `parallel_crc` | the 16 flip-flops with the AND/XOR next-state logic; `clear` loads a start state, `enable` absorbs a word |
| `crc_link_unit` | serial framing around `parallel_crc`: bit collection into w-bit words, augmentation, FCS output or check |
| `rfid_crc_pld` | top level: `crc_matrix_gen` with the polynomial tied to a parameter, feeding `crc_link_unit` |

With w = 1, `parallel_crc` is exactly the serial LFSR it was derived from,
so the same RTL covers both.

## Interface and timing (`rfid_crc_pld`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | asynchronous, active high; clears the register and returns to idle |
| `data` | in | 1 | frame bit, in transmission order |
| `valid_data` | in | 1 | high on every clock that carries a frame bit; a frame is one unbroken run |
| `direction` | in | `dir_e` | `DIR_SEND` (1) or `DIR_RECEIVE` (0), sampled on the frame's first bit |
| `temp` | out | 16 | the CRC register (normal orientation) |
| `data_out` | out | 1 | FCS bit while `fcs_valid` is high |
| `fcs_valid` | out | 1 | `data_out` is valid |
| `error` | out | 1 | received FCS wrong, or frame not a whole number of w-bit words; held until the next frame starts |
| `done` | out | 1 | one-clock pulse when a frame is finished |
| `busy` | out | 1 | a frame is being processed |

Parameters: `W` (bits per clock, default 8, must divide 16), `POLY`
(default 16'h1021), `PRESET` (16'hFFFF) and `XOROUT` (16'hFFFF).

Each bit is taken on the clock edge that sees `valid_data` high. A word goes
into the register on the same edge as its last bit, so the CRC keeps pace
with the stream. Edges are counted from the one that takes the last frame
bit:

* edge 1: end of frame seen;
* edges 2 … 1 + 16/w: zero words, then the remainder is in `temp`;
* sending: FCS bits on `data_out` for the next 16 clocks; `done` is high in
  the clock after the last one (after 1 + 16/w + 16 edges);
* receiving: `error` and `done` after 2 + 16/w edges;
* a frame that is not a whole number of words: `error` and `done` after 1 edge.

A new frame may start in the clock right after `done`. `temp` keeps the
last result until then. Bits offered earlier, while the unit is still
augmenting, sending or checking, would be lost; a concurrent assertion in
`crc_link_unit` reports them in simulation.

## Departures and own choices

The parallel CRC core (`crc_matrix_gen`, `parallel_crc`) follows the
published state-space derivation closely. Everything around it is this
design's own:

* **w = 8.** The source method leaves w open, requiring only that it
  divide both 16 and the message length. Bytes suit ISO 15693 frames. `W` is
  a parameter; 1, 4, 8 and 16 are tested.
* **Preset 0xFFFF, converted to 0x84CF.** A preset written as "0xFF" for
  this CRC means the standard's all-ones value. The conversion is needed
  only because of the augmented form (see above).
* **`clear` loads a start state.** The flip-flop clear of the original
  circuit resets to zero. Here `clear` loads the preset instead. It may
  coincide with the first word, so frames need no gap.
* **Serial framing.** The unit's external signal set is Data, Reset, Clock,
  Direction, Valid_Data, Temp, Output and Error. The framing by
  `valid_data` with one bit per clock, the direction encoding, the FCS
  output order, the residue check, the rejection of partial words, and
  `done`/`busy`/`fcs_valid` are all choices made here.
* **Divisor as a port of `crc_matrix_gen`.** The generator accepts any
  divisor. The top ties it to a parameter, so the enable matrix is
  constant. The preset conversion and the residue are also computed only
  at elaboration, so a run-time divisor would need those as logic too.
* **Not included:** the RF front end (Manchester coding, ASK/FSK
  modulation, oscillator, amplifier, antenna and matching), the tag, the
  controller firmware and the host program. None of their logic is part
  of this design. Sharing one CRC circuit among several transmission
  lines, a possibility the parallel method offers, is not built: one unit
  serves one serial link.

## How far it is verified

Each module has a self-checking testbench in `tb/`. The reference models in
`tb/tb_crc_ref_pkg.sv` are deliberately computed differently from the RTL:

* the CRC is the textbook right-shifting 0x8408 loop on bytes;
* F^w comes from repeated matrix multiplication;
* the register is stepped one bit at a time.

| testbench | covers |
|---|---|
| `tb_crc_matrix_gen` | F^w for the standard and 40 random polynomials at w = 1, 4, 8, 16 |
| `tb_parallel_crc` | random words, gaps, clear, clear-with-word, hold and reset at w = 8 and 4; "123456789" → 0x906E in (72+16)/8 = 11 clocks |
| `tb_crc_link_unit` | 60 random frames at w = 8, 1, 16: FCS value and bit order, remainder, latency, accept and reject, partial-word frames, reset |
| `tb_rfid_crc_pld` | top at default parameters: 1000 ISO 15693 ID reads, with every mechanism counted (see below) |

Each ID read sends an inventory request (flags 0x26, command 0x01, mask
length 0) and checks for the correct FCS. It then receives a tag answer:
flags, DSFID, an 8-byte UID and the FCS. One answer in eight carries 1–3
flipped bits and must be rejected. The run also covers:

* partial-byte frames;
* frames sent back to back, and frames after a gap;
* a reset in the middle of a frame.

The comparison this design was built to support (total host-side time for
1000 ID reads, with firmware CRC against the parallel circuit) depends on the
firmware and the RF link. It is not something the RTL can reproduce.

## Running

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/crc_pkg.sv tb/tb_crc_ref_pkg.sv rtl/crc_matrix_gen.sv \
      rtl/parallel_crc.sv rtl/crc_link_unit.sv rtl/rfid_crc_pld.sv \
      tb/tb_rfid_crc_pld.sv --top-module tb_rfid_crc_pld
    ./obj_dir/Vtb_rfid_crc_pld

Every testbench ends with a line `TB_RESULT checks=N failures=M`. For
another block, list the files it uses (the two packages come first) and
name its testbench as the top module. To try another
CRC, override `POLY`, `PRESET` and `XOROUT` on `rfid_crc_pld`. `p_0` must be
1, which holds for every generator of practical use.
