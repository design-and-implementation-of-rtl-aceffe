# All-digital QPSK transmitter for MPEG-2 transport packets (DAVIC)

This design turns an MPEG-2 transport stream into a QPSK signal on an
intermediate frequency, ready for a DAC. It follows the DAVIC/DVB satellite
and LMDS-style transmit chain:

```
MPEG-2 bytes ─► sync + randomizer ─► packet buffer (2 external SRAMs) ─► RS(204,188) coder
   (188 rate)                                                              │ (204 rate)
                                                                           ▼
      4 x 10-bit IF samples ◄── QPSK modulator (ROM filter + mixer) ◄── rate-1/2 K=7 conv. coder
```

The 188-byte packets are randomized for an even spectrum, and 16 Reed-Solomon
parity bytes are added to each packet. The bytes are then convolutionally coded
at rate 1/2, and the coded bits are mapped onto QPSK symbols. The symbols are
shaped by a square-root raised cosine filter (roll-off 0.35) and mixed to an IF
of four times the symbol rate. Two ideas keep the hardware small and fast:

* **The Reed-Solomon coder uses bit-level pipelined GF(2^8) multipliers.** They
  are standard-basis multipliers with the fixed field polynomial folded into
  the cells, so the path between registers is one AND gate and one XOR gate.
* **The modulator has no multipliers.** With the IF at four times the symbol
  rate, the carrier only takes the values +1, 0 and −1. Each output sample is
  then one filtered channel, taken with a sign, and a filtered ±1 channel is a
  table lookup.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. The
self-checking testbenches are in `tb/`.

## Clocking and rates

The whole design runs from one master clock, `clk`, with one clock per coded
QPSK symbol. Slower rates are single-cycle enable strobes of that clock, not
separate clocks:

| rate | strobe | use |
|---|---|---|
| clk | `en[0]` | modulator: one symbol, four IF samples per clock |
| clk/2 | `en[1]` | (brought out for test only) |
| clk/4 | `en[2]` | convolutional coder output: one 8-bit word (4 symbols) per 4 clocks |
| clk/8 | `en[3]` | 204-rate byte slot: one RS code word byte per 8 clocks |
| 47/51 of clk/8 | `mpeg_en` | 188-rate input byte strobe |

One input byte gives 16 coded bits, which is 8 QPSK symbols, so a byte slot is
8 clocks. A 188-byte packet and its 204-byte code word take the same time,
204 × 8 = 1632 clocks. That means the input runs at 188/204 = 47/51 of the slot
rate. `frac_rate_gen` is a 6-bit counter modulo 51 that passes slots 0 to 46
and skips slots 47 to 50. `inner_clk_gen` is a 3-bit counter that produces the
four power-of-two strobes. The source description names these rates in terms of
a "204 clock": clk_204/2, clk_204, clk_204×2 and clk_204×4. In this design they
are `en[3]`, `en[2]`, `en[1]` and `en[0]`.

The MPEG-2 source must put a byte on `mpeg_data` in every cycle in which
`mpeg_en` is high. There is no back-pressure.

## Synchronizer and randomizer (`sync_randomizer`)

The synchronizer searches the stream for the sync byte 47h. It then expects a
47h every 188 bytes. If one is missing, it drops lock, discards that packet and
searches again. Bytes that arrive while it is unlocked are not passed on.

The randomizer XORs the 187 data bytes of each packet with the PRBS of
1 + x^14 + x^15, MSB first. The generator is loaded with `100101010000000` (stage
1 first) at the start of every group of eight packets. The first sync byte of
the group is sent inverted (B8h) so that the receiver can find that point. The
other seven sync bytes go out as 47h. The generator keeps running through them,
but its output is not used there. The first PRBS bytes are 03h F6h 08h. One
byte is processed per strobe, using an 8-step unrolled LFSR.

## Packet buffer in two SRAMs (`sram_converter`)

The RS coder must see 188 message bytes in a row, followed by 16 slots in which
it sends out parity. Input bytes arrive with gaps: 4 of every 51 slots are
empty. The converter therefore buffers whole packets in two external SRAM
chips (32K × 8, KM68B261A class) in ping-pong fashion:

* **Write side.** A packet that starts with a sync byte is written to the chip
  that is marked free. After byte 187, that chip is marked full, and the other
  chip becomes the write target. If the target chip is still full, the packet
  is dropped and the sticky `overflow` flag is set. At the nominal rates this
  cannot happen.
* **Read side.** On every byte slot, the reader either reads the next byte of
  the full chip (slots 0 to 187) or issues an empty parity slot (slots 188 to
  203). The chip is freed after slot 187. If no chip is full, the reader idles.

The SRAM controls are registered, and a write is a one-clock low pulse on
`we_n`. Read data is taken one clock after the address is driven. The output
strobe comes two clocks after the slot strobe. Each chip's data bus is split
into `sram_wdata` and `sram_rdata`; the bidirectional pins are joined outside
the design.

## Reed-Solomon coder (`rs_encoder`, `gf_mult`, `gf_mult_cell`)

**Code.** The code is RS(204,188) with t = 8. It is a shortened RS(255,239)
code over GF(2^8) with f(x) = x^8 + x^4 + x^3 + x^2 + 1 and generator
g(x) = ∏_{i=0}^{15} (x + α^i), α = 02h. Shortening means 51 zero bytes are
assumed in front of each packet. They leave the coder's all-zero state
unchanged, so they cost no clocks. The coefficients of g(x) are computed at
elaboration time in `tx_pkg` (`rs_gen_poly`).

**RS base.** The encoder is the usual division circuit: a 16-byte shift memory
`r[0..15]` with feedback fb = d ⊕ r[15]. For each message byte, fb goes into 16
GF multipliers, one per generator coefficient. When the products come back,
every stage is updated as r[i] ← r[i−1] ⊕ g_i·fb. After message byte 187, the
16 parity bytes move into a separate output memory and the RS base is cleared,
so the next packet can start at once. A slot counter (0 to 203) acts as the
controller. Its signal S is high for message slots and low for parity slots.
During parity slots, the output memory shifts its bytes out, highest-degree
coefficient first.

**Multiplier array.** `gf_mult` computes P = Σ_j b_j·(A·α^j) with an 8 × 8
array of `gf_mult_cell`s. Row j does two things at the same time:

* it adds `a & b_j` to the partial product;
* it forms A·α^(j+1) for the next row: `a_out[i] = a[i−1] ^ (a[7] & f_i)`.

Because f(x) is fixed, the AND with f_i disappears. A cell with f_i = 1 has one
XOR, and a cell with f_i = 0 has only a wire. By default, every row is followed
by a register (`PIPE_STAGES = 8`). Each cell then has three registered signals:
its multiplicand bit, its partial-product bit and the multiplier bit it passes
on. The path between registers is one AND and one XOR. `PIPE_STAGES` can be set
lower; the registers are then spread evenly over the rows.

**Bypass.** With 8 pipeline stages, the products of one byte arrive 8 clocks
later. That is exactly the cycle in which the next byte slot arrives. In that
cycle the encoder computes the updated RS base (and, after byte 187, the parity
output memory) combinationally. The new feedback byte and the parity output are
taken from these updated values, not from the registers. An assertion checks
that input strobes are never closer than `PIPE_STAGES` clocks.

## Convolutional coder (`conv_coder`)

The code has rate 1/2, constraint length 7 and generators 171 (X) and 133 (Y)
in octal. A whole byte is coded in one clock: the eight bits, MSB first, go
through an unrolled K = 7 coder, and the 6-bit state carries over from byte to
byte. X goes to I and Y goes to Q. The 16 coded bits leave as two 8-bit words,
`{X0,Y0,X1,Y1,X2,Y2,X3,Y3}` with pair 0 the oldest. The first word comes one
clock after the byte and the second word 4 clocks later. This matches the
modulator's rate of 4 symbols per 4 clocks.

## Multiplier-free QPSK modulator (`qpsk_mod`, `srrc_rom`)

With the carrier at four times the symbol rate, cos(πn/2) is 1, 0, −1, 0 and
sin(πn/2) is 0, 1, 0, −1. So

```
S(4k)   = +I(kT)          S(4k+1) = +Q(kT + T/4)
S(4k+2) = −I(kT + T/2)    S(4k+3) = −Q(kT + 3T/4)
```

Here I(t) and Q(t) are the filtered channels. Each is a sum of ±1 symbols times
filter taps. For a fixed time offset p·T/4, the sum depends only on the last
SPAN symbols of the channel. It can therefore be stored in a table with 2^SPAN
entries:

```
ROM_p[w] = Σ_{j=0}^{SPAN-1} s_j · h((j + p/4 − SPAN/2)·T),   s_j = +1 if bit j of w is 0, −1 if 1
```

Bit j of `w` is the symbol of age j, and the filter is delayed by SPAN/2
symbols so that it is causal. There are four such tables: phase 0 is addressed
by the I window, phase 1 by the Q window, phase 2 by the I window and phase 3 by
the Q window. The minus signs of phases 2 and 3 are free: negating every symbol
negates the sum, so those tables are read at the bitwise inverted window.

Each clock, the 1-to-4 demultiplexer takes one I/Q pair from the current 8-bit
input word and shifts it into the two symbol windows. All four tables are read
at once, and the four samples of that symbol are registered as
`out_sample[0..3]` = S(4k), S(4k+1), S(4k+2), S(4k+3). They appear one clock
after the symbol enters. If a symbol is due and none is left, nothing is sent
out and the sticky `underflow` flag is set. This happens only when the packet
stream has a gap, for example after a lost packet.

**Filter.** The filter is a square-root raised cosine with roll-off 0.35 and
SPAN = 8 symbols, which gives 32 taps at T/4 and four 256 × 10-bit tables. The
taps in `tx_pkg::SRRC_TAPS` are

```
SRRC_TAPS[q] = round(328.35 · h((q/4 − 4)·T)),  q = 0..31
h(0) = 1 − r + 4r/π
h(t) = (sin(πt(1−r)) + 4rt·cos(πt(1+r))) / (πt(1 − (4rt)^2)),  t in symbol periods, r = 0.35
```

The scale factor makes the largest phase sum of |h| equal 510, so every table
value fits a signed 10-bit word. The tables themselves are computed at
elaboration time from the taps (`tx_pkg::rom_value`). The symbol mapping is
bit 0 → +1 and bit 1 → −1. Samples are two's complement.

## Top level (`qpsk_tx_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | master clock (symbol rate); asynchronous active-low reset |
| `mpeg_data` | in | 8 | transport stream byte, sampled when `mpeg_en` is high |
| `mpeg_en` | out | 1 | 188-rate input strobe |
| `sram_ce_n`, `sram_oe_n`, `sram_we_n` | out | 2 | per-chip controls |
| `sram_addr` | out | 2 × 15 | per-chip address |
| `sram_wdata` / `sram_rdata` | out / in | 2 × 8 | per-chip write / read data |
| `mod_valid` | out | 1 | the four samples are valid (high every clock once running) |
| `mod_sample[0:3]` | out | 4 × 10 | S(4k) .. S(4k+3), signed |
| `test_rs_*` | out | | RS output byte, strobe, first-byte and parity flags |
| `test_cc_*` | out | | convolutional coder output word and strobe |
| `test_clk_en`, `test_clk_phase`, `test_frac_slot` | out | | clock generator state |
| `test_group`, `test_locked`, `test_overflow`, `test_underflow` | out | | status |

Parameters: `SRAM_AW` (15) and `GF_PIPE` (8, the multiplier pipeline depth).
The framing constants, code, field, taps and filter span are in `tx_pkg`.
From the first input byte to the first IF sample takes about one packet time
(1632 clocks) plus a few slots. After that, the output runs at one symbol per
clock with no gaps.

Synthesis (generic, before technology mapping) gives about 770 word-level cells,
1,165 flip-flop bits and 10,240 ROM bits for the whole transmitter. Most of the
flip-flops (about 970) are in the RS coder with its 16 pipelined multipliers.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are computed
independently in `tb/tb_ref_pkg.sv`:

* GF products come from log/antilog tables.
* The randomizer and the convolutional code run bit-serially.
* RS code words are checked through their 16 syndromes.
* Modulator samples are direct multiply-and-add filter sums.

`tb/sram_model.sv` is a behavioural model of the external SRAM. With plain
Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/tx_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_qpsk_tx_top.sv --top-module tb_qpsk_tx_top -o sim
./obj_dir/sim
```

Replace `tb_qpsk_tx_top` with any other testbench name to run that one.
`tb_qpsk_tx_top` runs the full transmitter at its default parameters. It sends
20 packets, and the 11th has a corrupted sync byte. The testbench checks every
RS byte, every coded word and every IF sample. It checks the rates: 1632
symbols per code word and 188 input bytes per 1632 clocks. It also requires each mechanism to happen at least
once: group restart with B8h, loss of lock and relock, use of both SRAM chips,
parity slots and modulator underflow. It takes well under a second.

## How this design relates to its source description

These parts follow the published description of the transmitter:

* the block structure and the concatenated coding;
* the PRBS polynomial, the seed, the 8-packet group and the B8h inversion;
* the RS field, generator polynomial, shortening and parity output memory;
* the standard-basis multiplier with the polynomial folded into its cells;
* the (171,133) K = 7 code with 8-bit parallel input;
* the ROM-based filter and mixer at IF = 4 × symbol rate with the +I, +Q, −I,
  −Q selection;
* the 188/204 clocks from a 6-bit counter;
* the two-SRAM packet buffer;
* 8-bit input and four parallel 10-bit outputs.

These are this design's own choices, where the description gives no detail or
leaves room:

* **Single clock.** The chip described uses separate 188, 204 and derived
  clocks. Here everything is enables of one clock running at the symbol rate.
* **Multiplier pipelining.** "Bit-level pipelined with three latches" is read
  as a register after every row of cells (three latched signals per cell). This
  needs the bypass in the RS base.
* **Filter.** The description calls the filter both "square-root raised cosine"
  and "raised cosine". The square-root form is used, as in DVB/DAVIC. The span
  (8 symbols), the tap scaling, the symbol mapping and the two's complement
  output are not specified.
* **Modulator structure.** In the original, one datapath selects between
  I-tables and Q-tables with 2:1 multiplexers. Here the four phases are four
  parallel tables, one per output word.
* **Convolutional coder.** The schematic in the description is bit-serial,
  while its text says 8-bit parallel. The 8-bit parallel form is built. X → I,
  Y → Q and MSB-first are the DVB conventions.
* **Randomizer.** Keeping the PRBS running through the non-inverted sync bytes
  is the DVB convention. The sync hunting and lock-loss rule is this design's.
* **Packet buffer.** The converter's timing, the split data bus, the 15-bit
  SRAM address and the overflow rule are this design's.
* **Rate generator location.** The 188/204 rate generator sat on an FPGA next
  to the chip in the original test setup. Here it is part of the top level.

These parts are not included: the SRAM chips themselves (a simulation model
only), the PC test interface, and the pad ring and power pins of the original
0.8 µm gate-array chip. Timing at the 40 MHz of the original chip is a property
of that technology and cannot be checked from this RTL.
