# FM0 / Manchester line encoder with shared hardware and clock gating

Dedicated short-range communication (DSRC) links between vehicles and roadside
units send their baseband bits with a line code. The code keeps the signal
DC-balanced and gives the receiver at least one level change per bit. The two
codes DSRC uses are FM0 and Manchester. A transmitter that supports both
usually carries two encoders, one of which is always idle.

This RTL implements one encoder that serves both codes. The FM0 path is
rearranged so that it is built from the same kinds of parts as the Manchester
path: an XOR, two flip-flops and a multiplexer. A final multiplexer picks the
code. While Manchester is selected, a clock gate stops the FM0 flip-flops, so
the unused half of the encoder does not toggle. Beside the encoder is a simple
receive-side decoder for both codes. A loopback testbench checks the two
against each other.

## The two codes

Each data bit X takes one cycle of the bit clock CLK. CLK is high in the first
half of the cycle and low in the second. Each code sends two levels per bit,
one for each half:

| code       | first half (A) | second half (B) | rule |
|------------|----------------|-----------------|------|
| Manchester | `~X`           | `X`             | `line = CLK ^ X` |
| FM0        | `~B(t-1)`      | `A` if X=1, `~A` if X=0 | the level always changes at a bit boundary; it changes again mid-bit for a 0 and holds for a 1 |

So in Manchester a 0 is high-then-low and a 1 is low-then-high. FM0 depends
on the level the previous symbol ended on. Starting from reset, which ends the
"previous symbol" high, the bits 0,1,1,0,1 are sent as low-high, low-low,
high-high, low-high, low-low.

## How FM0 is built from Manchester-like parts

Substituting `A(t) = ~B(t-1)` into the FM0 rule for B gives

    B(t) = A(t) XNOR X(t) = B(t-1) XOR X(t)
    A(t) = ~B(t-1)

Both halves can therefore be held in flip-flops (`rtl/fm0_logic.sv`):

```
            +------+    DFF_B
  X ------->|XOR_1 |----D   Q----+----------------------> MUX_1 in 0 --+
       +--->|      |             |                                     |
       |    +------+             +--> ~ --> D   Q ------> MUX_1 in 1 --+--> FM0 code
       |                             DFF_A                  sel = CLK
       +---------- DFF_B.Q
```

At each rising edge of CLK, DFF_B loads `B(t)` and DFF_A loads `~B(t-1)`,
which is `A(t)`. During the next cycle MUX_1 shows DFF_A while CLK is high and
DFF_B while CLK is low. The Manchester path (`rtl/manchester_logic.sv`) is a
single XOR of CLK and X. The top of the encoder (`rtl/sols_encoder.sv`) ends
in MUX_2. Its input 0 is the FM0 code and its input 1 the Manchester code.
The select is `mode` (`dsrc_codec_pkg::code_mode_e`: `MODE_FM0 = 0`,
`MODE_MANCHESTER = 1`).

### Latency and timing

* X must be valid before the rising edge that ends its cycle. Change it just
  after a rising edge.
* Manchester: the code of a bit goes out in the same cycle (it is
  combinational).
* FM0: the code of a bit goes out one cycle later, because it is registered.
  In the first cycle after reset the line carries a reset symbol (low then
  high), which a receiver decodes as a 0.
* The line output depends on CLK combinationally in both modes. Drive it from
  a clean clock and sample it away from the clock edges.

## Clock gating and mode switching

`rtl/clock_gate.sv` is a standard latch-based gate. A latch that is
transparent while CLK is low holds the enable, and the gated clock is
`CLK & enable`. A change of the enable while CLK is high cannot clip a pulse
or create one. The gate sits inside `fm0_logic`, in front of DFF_A and DFF_B
only. MUX_1 keeps the ungated CLK as its select. This matters: with a gated
select, the first FM0 cycle after a switch back from Manchester would send
the wrong first half.

Consequences for a mode change made just after a rising edge:

* The FM0 flip-flops stop or start from the next rising edge.
* The FM0 stream pauses rather than restarts. The FM0 symbol of the last bit
  presented before a switch to Manchester is held and sent in the first FM0
  cycle after the switch back. No FM0 bit is lost, and the FM0 level
  sequence continues as if the Manchester cycles had not happened.
* The boundary rule of FM0 (a change at every bit start) does not hold
  between the last Manchester symbol and the first FM0 symbol after it.

## Receive side

`rtl/line_decoder.sv` runs on a sampling clock with one rising edge inside
each half of every bit. The `first_half` input marks which half is being
sampled. After the second-half sample it registers:

* Manchester: `bit = B`. It flags a violation if `A == B`, because the
  mid-bit change is missing.
* FM0: `bit = (A == B)`. It flags a violation if `A` equals the previous
  symbol's `B`, because the change at the bit start is missing. This check
  starts with the second FM0 symbol after reset or after Manchester.

The decoder does not recover a clock or find frame boundaries, and it has
no sync-pulse or parity handling, because no frame format is defined for it.
The sampling clock and its phase must come from outside.

## Top level

`rtl/dsrc_baseband_top.sv` holds the line coding of a DSRC transceiver's two
baseband processors:

* The transmit path is `sols_encoder`. Its `tx_line` goes to the transmit
  RF front-end.
* The receive path is `line_decoder`. It is fed with `rx_line` and the
  sampling signals.

The two paths have separate clocks, resets and mode inputs. The RF
front-ends and the controlling microprocessor are outside the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/dsrc_codec_pkg.sv` | `code_mode_e` |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `rtl/fm0_logic.sv` | XOR_1, DFF_B, DFF_A, MUX_1 and the clock gate |
| `rtl/manchester_logic.sv` | XOR_2 |
| `rtl/sols_encoder.sv` | FM0 + Manchester + MUX_2 |
| `rtl/line_decoder.sv` | FM0/Manchester decoder with violation flag |
| `rtl/dsrc_baseband_top.sv` | transmit and receive paths |
| `tb/tb_*.sv` | one self-checking testbench per module |

The design has no parameters.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. Example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
      rtl/dsrc_codec_pkg.sv tb/tb_dsrc_baseband_top.sv --top-module tb_dsrc_baseband_top
    ./obj_dir/Vtb_dsrc_baseband_top

What each testbench checks:

* `tb_fm0_logic` checks the example above bit by bit, then 400 random bits.
  The expected levels come from the FM0 rules, not from the circuit.
* `tb_manchester_logic` checks the same example and random bits.
* `tb_clock_gate` moves the enable at random points in both clock phases. It
  checks the gated clock's level and that each of its edges falls on a clock
  edge.
* `tb_sols_encoder` runs random data with random mode switches. It compares
  the output with a cycle model of the encoder, and also with the FM0 rules
  directly. It checks that the FM0 flip-flops get no clock pulse after a
  Manchester cycle.
* `tb_line_decoder` feeds symbols encoded by the testbench itself, in both
  codes. It includes deliberately broken symbols that must be flagged.
* `tb_dsrc_baseband_top` loops the transmit line back into the receiver for
  20,000 bit cycles in mixed modes, at the design's only size. It corrupts
  some symbols on the line and checks every decoded bit and violation flag.
  It counts FM0 zeros and ones, Manchester bits, switches in both
  directions, gated cycles and both kinds of detected violation, and fails
  if any of these never happened.

## Where this RTL goes beyond the design it follows, or leaves parts out

Taken from the design: the block structure of the encoder, the names XOR_1,
XOR_2, DFF_A, DFF_B, MUX_1 and MUX_2, the input numbering of both
multiplexers, the FM0 and Manchester rules, and the initial FM0 polarity.

Chosen here:

* The rising edge as the active clock edge.
* CLK high in the first half of a bit, which follows from MUX_1 passing DFF_A
  (the first half) on input 1.
* An asynchronous active-low reset and its values.
* The circuit of the clock gate and its placement.
* How the encoder behaves at mode switches.
* All of the decoder.

Not built:

* A Miller encoder. Miller is mentioned alongside FM0 and Manchester, but no
  rule or structure is given for it.
* Sync-pulse and parity handling in the decoder.
* The RF front-ends and the microprocessor.
* Circuit-level choices that RTL cannot express: transmission-gate versions
  of MUX_1, MUX_2 and the XOR, and a 45 nm layout. The speed and power
  figures reported for the design (about 5.8 ns delay, about 1.5 mW) are
  therefore not reproduced here.

The FM0 XOR may appear elsewhere as an XNOR of X with the first-half level A.
That is the same function, because `A(t) = ~B(t-1)`.
