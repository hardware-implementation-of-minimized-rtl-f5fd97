# Serial divider for frame-rate image statistics

A camera's image signal processor needs a few divisions per frame, for example
for auto-exposure and white-balance gains. It does not need them at pixel rate.
Between two frames a sensor spends many clocks outside the visible image. A
2-megapixel sensor timed at 2284 pixel clocks × 1253 lines leaves
53 × 2284 ≈ 121,000 clocks there. The statistics to divide are stable during
that time. A pipelined divider makes one quotient bit per stage, so it needs one
comparator and one set of pipeline registers per quotient bit. That is wasted
here.

This divider instead reuses **one comparator** and makes one quotient bit per
clock. A result arrives every **16 clocks**. The default size has a 28-bit
dividend, a 20-bit divisor and a 10-bit rounded quotient. After coarse synthesis
it is 54 word-level cells and 56 flip-flops.

## What it computes

```
F        = DVS_W + Q_W - DVD_W                    (fraction bits; 2 by default)
quotient = min( 2^Q_W - 1, floor(dividend * 2^F / divisor + 1/2) )
quotient = 2^Q_W - 1                               when divisor == 0
```

The quotient is fixed-point with `F` fraction bits. Halves round up, and the
result saturates at all ones instead of wrapping. `F` is not a free parameter.
It is whatever makes the first partial remainder exactly as wide as the
divisor: the top `DVS_W` bits of the dividend. This single rule covers all four
width sets the divider was sized for:

| dividend | divisor | quotient | F (fraction bits) | clocks needed |
|---------:|--------:|---------:|------------------:|--------------:|
| 33 | 24 | 13 | 4  | 16 |
| 28 | 20 | 10 | 2  | 13 (padded to 16) – the default |
| 24 | 16 | 8  | 0  | 11 (padded to 16) |
| 11 | 13 | 14 | 16 | 17 – needs `PERIOD = 17` |

`DVD_W` may not exceed `DVS_W + Q_W + 1`, i.e. `F ≥ -1`. `PERIOD` must be at
least `Q_W + 3`. Both rules are checked at elaboration.

## The A-part / B-part iteration

The dividend is cut in two, then padded with `F + 1` zero bits:

* **A-part**: the top `DVS_W` bits. This is the running partial remainder, and
  the only value the comparator ever sees. The register is `DVS_W + 1` bits
  wide, because a remainder shifted up by one needs the extra bit.
* **B-part**: the rest of the dividend, followed by the zero padding. It is a
  shift register that feeds one bit per clock into the A-part's LSB.

Each clock the comparator (`sd_comparator`) asks whether A ≥ divisor:

* yes: the quotient bit is 1 and A becomes A − divisor;
* no: the quotient bit is 0 and A is kept.

The result is shifted left, and the B-part's outgoing MSB fills its LSB. This
is plain restoring division, done one bit per clock.

The first comparison is made on the A-part exactly as it comes from the
dividend. A 1 there means the quotient would need more than `Q_W` bits. The
divider records this as overflow and will output all ones. The next `Q_W + 1`
comparisons produce the quotient bits and one extra bit below the LSB. By then
the B-part has run dry and is supplying zeros. The extra bit is the half-LSB,
and it rounds the result (`sd_round`):

* extra bit 0: the quotient is output as is;
* extra bit 1: the quotient is incremented, unless it is already all ones;
* overflow: the output is all ones.

Worked example with `DVD_W=6, DVS_W=4, Q_W=3` (so F = 1): 19 / 7. Exact value
19·2/7 = 5.43, so the expected quotient is 5.

| clock | A-part in | A ≥ 7? | bit | A-part out (A or A−7, shifted, + B bit) |
|------|----------:|:------:|:---:|------------------------------------------|
| load | 4  (top of 0100 1100) | no | overflow = 0 | 0100·2 + 1 = 9 |
| 1    | 9  | yes | 1 | 2·2 + 1 = 5 |
| 2    | 5  | no  | 0 | 5·2 + 0 = 10 |
| 3    | 10 | yes | 1 | 3·2 + 0 = 6 |
| 4    | 6  | no  | 0 (rounding bit) | – |

Collected bits 101 with rounding bit 0: quotient 101₂ = 5.

## Interface and timing (`serial_divider`)

| port | dir | width | |
|------|-----|-------|--|
| `clk`, `rst_n` | in | 1 | rising edge; synchronous active-low reset |
| `start` | in | 1 | begins a division when `busy` is low; ignored while busy |
| `dividend` | in | `DVD_W` | captured on the start clock; free to change afterwards |
| `divisor` | in | `DVS_W` | **not registered**: hold it until `q_valid` |
| `busy` | out | 1 | high from the clock after start until the result |
| `q_valid` | out | 1 | one-clock pulse: `quotient` is new |
| `quotient` | out | `Q_W` | rounded, saturated result; holds until the next one |

Count the clock on which `start` is sampled as clock 1. Clock 1 loads the
operands and makes the overflow comparison. Clocks 2 … `Q_W+2` make the
quotient and rounding bits. `q_valid` rises on clock `PERIOD` (16). The clocks
in between do nothing. With `start` held high, a new division is accepted on the
clock after each result. Results then arrive on clocks 16, 32, 48, …: one per
16 clocks.

The divisor is left unbuffered on purpose. The frame statistics it comes from
are held between frames anyway, and buffering it would cost `DVS_W` flip-flops.
An assertion in `serial_divider` flags a divisor that changes during the
comparisons.

## Modules

| module | role |
|--------|------|
| `serial_divider` | top: A-part register, overflow flag, output register, wiring |
| `sd_ctrl` | state bit plus 4-bit counter: `load`, `step`, `done` strobes |
| `sd_comparator` | the shared compare / subtract-or-keep / shift-and-fill step |
| `sd_bpart` | B-part shift register (zero fill) |
| `sd_quotient` | shift-in register for the quotient bits and the rounding bit |
| `sd_round` | increment on rounding bit, all-ones guard, overflow saturation |

Parameters of the top: `DVD_W = 28`, `DVS_W = 20`, `Q_W = 10`, `PERIOD = 16`.

## Choices this design makes

The algorithm is specified only in outline: the A/B split, one comparator,
subtract or keep, fill from the B-part, fill with 0 for the rounding bit,
increment unless all ones, and the 16-clock rate. The following points were
settled here:

* **Fraction bits.** No quotient format is specified. `F = DVS_W + Q_W - DVD_W`
  follows from making the first A-part as wide as the divisor, as above.
* **Overflow and divide by zero.** The outline only guards the rounding
  increment. This design also uses the first comparison as an overflow check
  and saturates. A zero divisor is simply a case of that overflow.
* **A-part width.** The outline has the kept remainder drop its MSB before the
  new bit enters. Done literally, that loses a remainder bit whenever the
  remainder is at least half the divisor. The A-part here is one bit wider.
* **Direction of the subtraction.** The description of this step also shows the
  difference as divisor − A. Only A − divisor gives a valid remainder, and that
  is what is built.
* **Tie.** A = divisor counts as "not smaller" and gives a 1 bit.
* **16-clock period.** The description gives the rate but not what fills the
  16 clocks. Here 13 clocks do work at the default size, and the rest is idle.
  `PERIOD` can be reduced to `Q_W + 3` for a faster divider. The 11/13/14-bit
  configuration needs 17.
* **Handshake and reset.** `start`/`busy`/`q_valid` and the synchronous
  active-low reset are this design's own.

Not built: the pipelined (one-comparator-per-bit) divider that this design is
meant to replace, and the AE/AWB logic that would issue the divisions.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
integer arithmetic written independently in the testbench, and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_sd_comparator`: 5000 random cases plus corner cases (tie, zero, largest
  legal remainder).
* `tb_sd_bpart`, `tb_sd_quotient`: shift order, hold, load/clear priority.
* `tb_sd_round`: exhaustive over all 2^11 inputs, with and without overflow.
* `tb_sd_ctrl`: strobe timing clock by clock; start ignored while busy; results
  at clocks 16 … 112 with start held.
* `tb_serial_divider`: the top at its default parameters. It runs 409 single
  divisions, checking each value and its 16-clock latency, and that the output
  holds between results. Then 30 back-to-back divisions, whose first seven
  results must land on clocks 16, 32, …, 112. It counts the mechanisms it
  exercised and fails if any count is zero: overflow, division by zero,
  round-up, the all-ones guard, exact results, start ignored while busy,
  back-to-back.
* `tb_serial_divider_configs`: the four width sets of the table above, side by
  side, through the helper `tb_div_config`. About 200 divisions each, checking
  values and latency.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    tb/tb_serial_divider.sv rtl/*.sv --top-module tb_serial_divider -Mdir obj
./obj/Vtb_serial_divider

verilator --binary --timing --assert -Irtl -Itb \
    tb/tb_serial_divider_configs.sv tb/tb_div_config.sv rtl/*.sv \
    --top-module tb_serial_divider_configs -Mdir obj_cfg
./obj_cfg/Vtb_serial_divider_configs
```

All run in well under a second. The RTL lints cleanly with
`verilator --lint-only -Wall`.

## Size

At the default parameters, a coarse technology-independent synthesis gives 54
word-level cells and 56 flip-flop bits. The three arithmetic cells are a
21-bit compare, a 20-bit subtract and a 10-bit increment, and the rest are
small. The reference point for this style of divider is a serial version at
about 1,000 gates against roughly 8,000 for a pipelined one of the same widths,
in a 0.25 µm standard-cell library. Those gate counts were not reproduced here.
