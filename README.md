# Image-in-image communication: bi-phase modulator and detector

This design sends a small grey-scale image (the *message*, 64 x 64 pixels of
4 bits) to a receiver that already holds a larger *cover* image (256 x 256
pixels of 8 bits), without embedding anything in the cover and without sending
the message itself. What travels is a binary image of one bit per message
pixel — 4,096 bits — that says, for every message pixel, whether a coded
version of that pixel resembles the matching stretch of the cover or its
opposite. A receiver with the same cover, or a moderately distorted copy of
it, turns those bits back into an approximation of the message.

The RTL has two independent ends, a transmitter and a receiver. Each takes
the cover one pixel per clock in raster order and keeps only its most
significant bit. Neither end stores an image. The channel between the ends
(encrypted link, noisy link or a file) is not part of the design.

## The scheme, one message pixel at a time

The cover's most significant bit plane, read in raster order, is cut into
*substrings* of 16 symbols. Substring k (symbols 16k..16k+15) carries message
pixel k, so 4,096 pixels use exactly 4,096 x 16 = 65,536 = 256 x 256 symbols.

1. **Repetition coding.** Pixel M[3:0] becomes a 16-symbol string F. The
   bit planes that matter most to the eye get the most copies:

   | F positions  | 15..7 (9 symbols) | 6..2 (5 symbols) | 1    | 0    |
   |--------------|-------------------|------------------|------|------|
   | content      | M[3]              | M[2]             | M[1] | M[0] |

   Position 15 goes with the first cover symbol of the substring.

2. **Spatial bi-phase modulation (transmitter).** Compare F with the cover
   substring D symbol by symbol. If 9 or more of the 16 positions agree, the
   pair is *in phase* and the modulated bit is 1. Otherwise it is 0.

3. **Synchronous detection (receiver).** The receiver rebuilds D from its own
   cover. It keeps D when the modulated bit is 1 and inverts it when the bit
   is 0, which gives an estimate of F. Majority votes undo the repetition:
   - M[3] is 1 when at least 5 of the 9 copies are 1;
   - M[2] is 1 when at least 3 of the 5 copies are 1;
   - M[1] and M[0] are taken as they are.

This only works because natural images have long runs in their top bit
plane, so a 16-symbol substring is usually all 0s or all 1s. Take a run of
1s and message pixel 15 (`1111`). F is all 1s, 16 of 16 positions agree and
the bit is 1. The receiver keeps the run and decodes `1111`. For pixel 0 the
bit is 0, and the receiver inverts the run and decodes `0000`. A pixel whose
bits differ, such as `1100`, comes back as `1111` or `0000` over such a
run. Only the heavily repeated upper bits survive, and only where the cover
substring is mixed do the lower bits carry information. The scheme therefore
suits low-entropy messages such as logos and near two-level pictures.

The same property makes the receiver tolerant. Filtering or noise moves
only a few most-significant bits of a smooth cover. A modulated bit that
arrives inverted spoils one pixel and nothing else.

## Hardware structure

Both ends share a front end that cuts the serial bit plane into 16-bit words:

```
 din ──► iic_ctrl ──din1──► iic_sipo (SIPO-1) ──D1──┐
          │  5-bit  ──din2──► iic_sipo (SIPO-2) ──D2──┤ iic_mux_array ──► D[15:0]
          │ counter  enable1/enable2 (output loads)   │
          └──────── sel_d1, load ─────────────────────┘
```

**Ping-pong SIPOs.** A free-running 5-bit counter steers din into SIPO-1
while its count is 0..15 and into SIPO-2 while it is 16..31 (`din1 = din &
~q4`, `din2 = din & q4`). Each SIPO shifts every clock. The steered-off one
shifts in zeros. A complete word is copied into the SIPO's output register
by its enable pulse:
- Enable1 is decoded from count 16, the first cycle in which SIPO-1 is full.
- Enable2 is the terminal count 31 passed through a flip-flop, so it is high
  at count 0.

The output register then holds the word steady for 32 cycles while the same
SIPO refills. The multiplexer passes the newer word (`sel_d1 = q4`). A
`load` strobe, one cycle after either enable, tells the next stage that D is
fresh. This happens every 16 cycles.

**Transmitter back end (`iic_redundancy_intro`, `iic_cmp_majority`).** On
`load` the message pixel is taken and its repetition-coded string F is
registered. One cycle later, with D still held by its SIPO, sixteen XNORs
compare D with F and the 16 match bits go into a PISO. Over the next 16
cycles the PISO's output is the clock enable of a 4-bit
match counter. A second 4-bit counter, restarted with each comparison, reaches its
terminal count on the 16th symbol. That count, delayed by a flip-flop, is the
match counter's clear (`tout_valid`). In that cycle the encoder, `count >= 9`
(for four bits this is `Q3 & (Q2 | Q1 | Q0)`), is the modulated bit.

The match counter holds at 15 rather than wrap. Without that, a perfect
16-of-16 match would read as 0 and send the wrong phase, and with smooth
covers that case is common: the full-size test hits it 1,667 times out of
4,096. In the clear cycle the counter restarts from the current PISO bit, so
substrings can follow one another with no gap.

**Receiver back end (`iic_complementer`, `iic_redundancy_remover`,
`iic_piso`).** The controlled complementer is sixteen 2:1 multiplexers that
choose between each D bit and its inverse, selected by the received bit.
Its output goes to the redundancy remover, which loads it on `load`. There
the 9-copy and 5-copy fields are shifted out in parallel for 9 cycles. They
drive the clock enables of two 4-bit counters, which are compared with 5 and
3. The two low bits are held and passed on. The decoded pixel appears on `m`,
and a 4-bit PISO also sends it out serially on `n`, MSB first.

## Timing

Cycle 0 is the first cycle after reset is released. From then on the end
takes one cover pixel per clock, with no pauses. For substring k:

| event                                           | cycle     |
|-------------------------------------------------|-----------|
| cover symbols in                                | 16k .. 16k+15 |
| `load`: word on D; `msg_ack` (TX) / `t_ack` (RX) | 16k+17    |
| TX: F coded from `msg`; comparison starts       | 16k+18    |
| TX: `tout`, `tout_valid`                        | 16k+35    |
| RX: `m`, `m_valid`                              | 16k+27    |
| RX: `n`, `n_valid` (M[3], M[2], M[1], M[0])     | 16k+28 .. 16k+31 |

Each end produces one result every 16 cycles. A whole 256 x 256 cover takes
65,536 + 20 cycles to transmit and 65,536 + 16 cycles to receive.

Side inputs use hold-until-acknowledge:
- The transmitter's message source must hold pixel k on `msg` until the cycle
  in which `msg_ack` is high, then present pixel k+1.
- The receiver's modulated bit on `tin` works the same way with `t_ack`.

So the receiver needs modulated bit k 17 cycles after substring k starts,
but the transmitter produces it 35 cycles after. Linking the two ends
directly would need a delay of at least two substrings. The top does not
make that link, because the scheme assumes the bits are stored or sent
separately.

## Top level (`iic_top`)

`iic_top` places both ends side by side. They share one clock and each has
its own reset:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `tx_rst_n` | in | 1 | transmitter synchronous reset, active low |
| `tx_cover_pix` | in | 8 | cover pixel, raster order; bit 7 is used |
| `tx_msg`, `tx_msg_ack` | in/out | 4/1 | message pixel and its acknowledge |
| `tx_tout`, `tx_tout_valid` | out | 1/1 | modulated bit |
| `rx_rst_n` | in | 1 | receiver synchronous reset, active low |
| `rx_cover_pix` | in | 8 | receiver's copy of the cover (may be distorted) |
| `rx_tin`, `rx_t_ack` | in/out | 1/1 | received modulated bit and its acknowledge |
| `rx_m`, `rx_m_valid` | out | 4/1 | decoded pixel |
| `rx_n`, `rx_n_valid` | out | 1/1 | decoded pixel, serial |

Shared constants live in `iic_pkg`: 16 symbols per substring, 4-bit pixels,
repetition 9/5/1/1, 5-bit control counter, 4-bit counters and threshold 9.
The repetition pattern is fixed at 16 symbols. The published algorithm also
discusses substrings of 4, 64 and 256 symbols, but no hardware is given for
them and this RTL does not support them.

## Choices made here, and departures from the published design

The block structure, the 5-bit ping-pong counter, the delayed terminal count
behind Enable2, the 16 XNORs, the PISO-driven 4-bit counter with a delayed
terminal-count clear, the 9-or-more encoder, the multiplexer-based
complementer and the counter-based redundancy removal all follow the
published design. The following are this implementation's own:

- **SIPO enables** load an output register. The published enables are
  one-cycle pulses, so they cannot be shift enables. The multiplexer select
  and the `load` strobe are also this design's.
- **Bit placement:** the first symbol of a substring is bit 15, and it meets
  the first copy of M[3].
- **Saturating match counter**, and **clear-and-count** in the clear cycle
  (see above).
- **3-of-5 threshold** for M[2]. The published text gives only the 5-of-9
  rule and says the 5-bit field is handled "similarly".
- **F register:** the coded message string is held in a register, so the
  message source need only present a pixel in the cycle it is acknowledged.
- **Latency:** the first modulated bit comes 35 cycles after the first
  symbol; the published figure is 32. The interval of 16 cycles per pixel
  matches the published description. The published implementation table
  quotes 17 cycles per pixel.
- **Receiver serial output:** the published receiver diagram draws the
  serial output N of the final PISO back towards the control circuit,
  without saying what it does there. Here N is simply an output.
- **Handshakes, resets and streaming:** the acknowledge handshakes are this
  design's. Resets are synchronous and active low. Cover data streams
  without stalls.
- **Gate-level netlists:** no attempt is made to reproduce them. The RTL
  describes the same functions at register-transfer level.

Assertions check the two timing rules the back ends rely on. The majority
encoder's PISO must be empty (or on its last symbol) when reloaded. The
redundancy remover must not be reloaded while it is still voting.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the
outputs against a reference computed inside the testbench, and checks the
cycle of every result where timing is defined. Each prints
`TB_RESULT checks=N failures=M`.

`tb_iic_top` runs the full size with the default parameters. It uses a
synthetic smooth 256 x 256 cover and a near two-level 64 x 64 logo as the
message. It checks all 4,096 modulated bits and all decoded pixels against a
reference model, over four passes:

1. One transmit pass.
2. Receive pass A: clean cover, clean modulated bits.
3. Receive pass B: 30 % of the modulated bits inverted.
4. Receive pass C: additive noise of up to ±12 grey levels on the cover.

It also confirms that each mechanism occurred at least once: words from both
SIPOs, both phases, saturated counts, kept and complemented substrings,
majority votes over disagreeing copies, and serial output. It also reports
how much of the message each pass recovers. These figures describe the test
images, not a pass/fail criterion. The message has an entropy of 1.12 bits
per pixel. The transmitter's phase choice leaves a symbol error rate p(e) of
0.055 between the cover bit plane and the coded message.

| pass | exact pixels (of 4,096) | I(X;Y), bits |
|------|------------------------:|-------------:|
| A: clean | 3,318 | 0.812 |
| B: 30 % of modulated bits inverted | 2,352 | 0.109 |
| C: noisy cover | 3,226 | 0.803 |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/iic_pkg.sv \
          tb/tb_iic_top.sv --top-module tb_iic_top --Mdir obj -o sim
./obj/sim
```

Replace `tb_iic_top` with any other testbench name. The full-size run
simulates about 262,000 cycles and takes well under a second.

## Files

| file | content |
|------|---------|
| `rtl/iic_pkg.sv` | constants, types and the repetition-coding function |
| `rtl/iic_ctrl.sv` | 5-bit control counter: steering, enables, select, load |
| `rtl/iic_sipo.sv` | 16-bit SIPO with output register |
| `rtl/iic_mux_array.sv` | sixteen 2:1 multiplexers |
| `rtl/iic_redundancy_intro.sv` | 9/5/1/1 repetition coder with F register |
| `rtl/iic_piso.sv` | parallel-in serial-out register (16 and 4 bits) |
| `rtl/iic_cmp_majority.sv` | XNOR comparator, match counter, encoder |
| `rtl/iic_transmitter.sv` | transmitter end |
| `rtl/iic_complementer.sv` | controlled complementer |
| `rtl/iic_redundancy_remover.sv` | 5-of-9 / 3-of-5 majority decoder |
| `rtl/iic_receiver.sv` | receiver end |
| `rtl/iic_top.sv` | both ends side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
