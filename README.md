# CDMA + 4-PAM interconnect (CPIA)

A parallel bus costs one wire per bit. This design carries an N-bit bus
between two processors on far fewer wires. It stacks two tricks:

1. **CDMA (code-division multiple access).** Each bus line is multiplied by
   its own orthogonal spreading code of S chips. In every chip period, all
   lines' chips are added into one number. That number, the *chip sum*, fits
   in log2(N) + 2 bits. The receiver can pull every individual line back out
   of the stream of sums, because the codes are orthogonal.
2. **4-PAM (four-level pulse-amplitude modulation).** The log2(N) + 2 bits
   of each sum are grouped in pairs. Each pair is sent as one of four voltages
   (0, 1.1, 2.2, 3.3 V) on a single wire.

With the default N = 16, a 16-bit bus becomes **3 wires**. A word takes
S = 16 clocks on those wires. The link is half duplex: either end can send,
one at a time. The CDMA coder/decoder is ordinary synchronous logic. The
4-PAM coder/decoder is analog, so it is given here as behavioural
SystemVerilog models. Their timing is taken from HSpice figures published for
a 0.35 um CMOS implementation of this architecture.

```
 CPU 1 ==N==> [cdma_encoder] ==6==> 3 x [pam4_encoder -> pam4_output_stage] --+
                                                                             | 3 wires
 CPU 2 <==N== [cdma_decoder] <==6== 3 x [pam4_decoder (comparators+coder)] <--+
          (and the same the other way: every end has both halves)
```

## How a word travels

At the defaults, with a 200 MHz clock (5 ns period):

| clock | sending transceiver | wires | receiving transceiver |
|---|---|---|---|
| t | CPU raises `tx_load`, `tx_ready` is high: word taken | | |
| t+2 .. t+17 | chip sums 0..15, one per clock, `tx_chip_valid` high, `tx_chip_first` on chip 0 | each wire steps to a new level ≤ 1.3 ns after the edge | comparators decide in the high half of each clock and hold it in the low half |
| t+3 .. t+18 | | | decided bits registered with the chip strobes, then accumulated |
| t+19 | | | word on `rx_data`, `rx_valid` pulses |

A new word can be taken in the clock of the previous word's last chip, so
words follow each other with no gap: one N-bit word every S clocks. Between
words the sender's output stages are off, so the wires are free for the other
end.

## CDMA: why the lines can be separated

**Codes.** Line i uses row i of the S×S Walsh-Hadamard matrix:
`code_i[k] = parity(i & k)`. The codes are computed in logic, so there is no
table. Any two different rows agree in exactly half their positions. Every
row except row 0 has as many ones as zeros.

**Coding (`cdma_encoder`).** For chip k, line i's chip is `d_i XOR code_i[k]`.
A chip of 1 counts +1 and a chip of 0 counts −1. The chip sum is

    sum[k] = Σ_i (d_i ^ code_i[k] ? +1 : −1) = 2·(number of 1 chips) − N

It lies in −N..+N. In two's complement that takes log2(N) + 2 bits, which is
the line count the architecture specifies. The `enable` input gates all bus
lines: with it low, the word is coded as all zeros. `out_en` is the adder's
output enable: while it is low, the chip sequence pauses and no chip is sent.

**Decoding (`cdma_decoder`).** Every line keeps two accumulators:

- where line i's code bit is 0, the sum goes into its **positive** part;
- where the code bit is 1, the sum goes into its **negative** part.

After S chips, bit i = (positive > negative). Why this works:

- **Line i's own chips.** If d_i = 1, its chip is 1 (+1) wherever the code
  is 0, and 0 (−1) wherever the code is 1. So it adds +S/2 to the positive
  part and −S/2 to the negative part, a difference of +S. If d_i = 0, the
  difference is −S.
- **Every other line j.** Over either half of line i's code, line j's code
  has an equal number of ones and zeros. So j adds 0 to both parts, whatever
  its data.
- **Line 0.** Its code is all zeros, so its chips are a constant ±1. That
  adds the same amount to both parts of every other line. Line 0 itself only
  has a positive part, of ±S.

So N = S lines fit on codes of length S. The decoder takes `sum_first` to
know where a word starts. It tolerates gaps in `sum_valid`, which is how a
stalled sender looks to it.

**One bit never changes.** For even N, every chip sum is even, so bit 0 of
the sum is always 0. The wire that carries bits 1:0 therefore only ever uses
levels 0 and 2. A chip-count code (0..N) would need one bit fewer. The
log2(N) + 2 width is kept because the architecture specifies it. It is
exactly the two's-complement width of the range −N..+N.

## The four-level wires

**Coder (`pam4_encoder`, logic).** A 2-to-4 decoder turns
`{D_i+1, D_i}` = k into a one-hot P_k. A buffer stage gated by EN passes
P_k to the control of output switch S_k. Level k is the binary value of the
pair, with D_i+1 the more significant bit.

**Output stage (`pam4_output_stage`, behavioural).** S0 connects the wire to
ground, S1 to VDD1 = 1.1 V, S2 to VDD2 = 2.2 V and S3 to VDD3 = 3.3 V. With
every switch off, the wire is high impedance. The new level appears after the
50%-to-50% delay of that level change, at the near end of a line loaded with
`C_LOAD_PF` = 1, 3 or 5 pF. This delay ranges from 183 ps to 1300 ps. Rise
times are not modelled: the level steps.

**Receiver (`pam4_decoder`, behavioural).** A resistor ladder (R, 2R, 2R, R)
from 3.3 V gives decision levels of 0.55, 1.65 and 2.75 V. Three clocked
comparators (`pam4_comparator`) compare the wire with them. The result is a
thermometer code, which `thermometer_coder` turns back into `{D_i+1, D_i}`:

| o3 o2 o1 | out2 out1 |
|---|---|
| 000 | 00 |
| 001 | 01 |
| 011 | 10 |
| 111 | 11 |

A receiver delay of 0 to 448 ps, which depends on the level change, is
applied to the input before the comparators.

**Comparator clocking, and the timing budget.** A comparator is active, and
tracks its input, while the clock is high. While the clock is low, it holds
its decision. A level launched at a rising edge must therefore reach the
comparators before the falling edge. The slowest case is 0 → 1 at 5 pF:
1300 ps in the output stage plus 446 ps in the receiver, 1746 ps in all. That
fits the 2500 ps high phase of a 200 MHz clock. The transceiver registers the
held decision at the next rising edge.

This clocking caps the clock at about 1/(2 × 1.75 ns) ≈ 286 MHz. The
published figure of 571 MHz (1.1 Gb/s per wire) assumes a full 1.75 ns
period per symbol. Reaching it would need a comparator clock whose high phase
covers the end of each symbol, which this design does not have.

## Control, direction and framing

Every transceiver has a send and a receive side (`cpia_transceiver`). The
control signals are this design's own set:

- `tx_enable`: bus-line enable.
- `tx_out_en`: stall.
- `tx_load` / `tx_ready`: word handshake.
- `rx_oe`: output enable of the decoded bus. While it is low, `rx_data`
  reads 0.
- `rx_chip_valid` / `rx_chip_first`: which clocks carry chips for this end.

The architecture does not say how the receiver finds the start of a word.
Here the receiving side's `rx_chip_valid`/`rx_chip_first` must line up with
the sender's `tx_chip_valid`/`tx_chip_first`. The simplest use, and the one
in the testbenches, ties each end's receive strobes to the other end's send
strobes. The two ends share one clock.

Only one end may send at a time. `cpia_top` raises `contention` on a wire
that both ends drive. An undriven wire keeps its last voltage.

## Modules

| file | what | synthesizable |
|---|---|---|
| `rtl/cpia_pkg.sv` | sizes, `pam_line_t`, Walsh code bit, delay tables | yes (tables used by models only) |
| `rtl/cdma_encoder.sv` | spreading, chip-sum adder, handshake, stall | yes |
| `rtl/cdma_decoder.sv` | positive/negative accumulators, compare, output enable | yes |
| `rtl/pam4_encoder.sv` | 2-to-4 decoder and enable-gated buffer stage | yes |
| `rtl/thermometer_coder.sv` | 3-bit thermometer code to 2 bits, output enable | yes |
| `rtl/pam4_output_stage.sv` | four-switch output stage with load-dependent delays | behavioural |
| `rtl/pam4_comparator.sv` | clocked track/hold comparator | behavioural |
| `rtl/pam4_decoder.sv` | ladder, 3 comparators, thermometer coder, receiver delay | behavioural |
| `rtl/pam4_codec.sv` | coder and decoder of one wire | behavioural (holds models) |
| `rtl/transmission_medium.sv` | one shared wire: follow driver, hold, contention | behavioural |
| `rtl/cpia_transceiver.sv` | CDMA coder/decoder and SW/2 4-PAM codecs | behavioural (holds models) |
| `rtl/cpia_top.sv` | two transceivers and the wires | behavioural (holds models) |

The synthesizable parts are the CDMA coder and decoder, the 4-PAM coder
logic and the thermometer coder. In a chip, the output stage, comparators,
ladder and wires are analog cells. The models give them the right ports and
the published timing, so the digital parts can be verified around them.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | bus lines. Pick N so that log2(N) + 2 is even (4, 16, 64, ...); the architecture does not fix N |
| `S` | 16 | chips per word, a power of two ≥ N; the architecture does not fix S |
| `SW` | log2(N) + 2 | coded lines (chip-sum bits) |
| `NW` | SW / 2 | wires |
| `C_LOAD_PF` | 5 | line load for the output-stage delays: 1, 3 or 5 |
| `VDD1_MV`..`VDD3_MV` | 1100, 2200, 3300 | output-stage supplies |
| `VDD_MV` | 3300 | receiver ladder supply |

The payload rate at the defaults is N bits per S clocks on 3 wires:
16 bits / 80 ns = 200 Mb/s per link at 200 MHz. Each wire moves 2 coded bits
per clock.

## Where this design departs from, or adds to, the published description

- N = 16, S = 16, Walsh-Hadamard codes, signed ±1 chips and two's-complement
  sums are choices made here. The original names "PN codes" and a sum on
  log2(n) + 2 lines, but gives no sizes and no code set.
- The first ladder tap: the ladder ratio gives 0.55 V at 3.3 V, which is what
  is built. The original also quotes 0.5 V. Either lies between 0 and 1.1 V.
- The 4-PAM coder/decoder has a single "output enable / clock" in the
  original. Here it is split into the coder enable (driven by the chip strobe)
  and the decoder output enable, so one end can send while the other
  receives.
- Framing, the control signals, back-to-back words, the stall on `out_en`,
  the registered decoder output and the asynchronous active-low reset are
  this design's own.
- The wire itself has no delay; all line-load effects are in the output stage
  (the published figures are for the near end of the line).
- The 571 MHz / 1.1 Gb/s per wire operating point is not reached with this
  comparator clocking (see above).
- Not modelled: power (the published figure is about 25.5 to 26.4 mW per
  transmitter–receiver pair at 200 MHz), rise times, transistor sizing,
  noise, and the processors.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj -y rtl -y tb \
    rtl/cpia_pkg.sv tb/cdma_ref_pkg.sv tb/cpia_top_tb.sv --top-module cpia_top_tb
obj/Vcpia_top_tb
```

Replace `cpia_top_tb` with any testbench below. `--timing` is required, for
the delays in the analog models. The simulator is two-state, so the design
resets every register it reads.

| testbench | checks |
|---|---|
| `cpia_top_tb` | end to end at the default size. Random words both ways, with a check of every word received. Also covers: a change of direction, back-to-back words, a stalled sender, a disabled bus, a blanked receive bus and released wires. No wire is ever driven from both ends. Every wire reaches every level it can carry, and all twelve level changes occur. |
| `cpia_transceiver_tb` | one transceiver looped back: words intact, one word per 16 clocks, `rx_valid` two clocks after the last chip |
| `cdma_encoder_tb` | every chip sum against a Hadamard reference built by Sylvester doubling; word period, latency, stalls, `enable` |
| `cdma_decoder_tb` | words built from reference sums, with gaps in `sum_valid`; output timing and output enable |
| `pam4_load_sweep_tb` | 1, 3 and 5 pF at 200 MHz. Every symbol must be decoded. Every level change must arrive at the output-stage delay plus the receiver delay. The slowest case must be 1746 ps. |
| `pam4_codec_tb`, `pam4_decoder_tb`, `pam4_output_stage_tb`, `pam4_comparator_tb`, `pam4_encoder_tb`, `thermometer_coder_tb`, `transmission_medium_tb` | each block on its own, against tables written out independently in the testbench |

The CDMA coder and decoder and the 4-PAM coder also carry assertions, which
`--assert` turns on. They check that chip 0 is a valid chip, that every chip
sum lies in −N..+N with the parity of N, that `data_valid` is a one-clock
pulse, and that at most one output switch is closed.

`tb/cdma_ref_pkg.sv` holds the reference model shared by the CDMA
testbenches.
