# One 6-tap FIR filter, five hardware structures

A finite impulse response filter computes

    y[n] = h(1)·x[n] + h(2)·x[n-1] + … + h(6)·x[n-5]

from a stream of samples x and six constant coefficients h. The arithmetic is
always the same, but it can be laid out in hardware in very different ways,
from "six multipliers working at once" to "one small table read eight times
per sample". This RTL builds one 6-tap filter in five such structures and runs
them side by side on one input stream. All five give bit-identical results.
They differ in how many multipliers, adders and registers they spend, and in
how many clocks each sample takes:

| structure | module | multipliers | flip-flops | clocks per sample | result after the accepting edge |
|---|---|---|---|---|---|
| direct form | `fir_direct` | 6 | 60 | 1 | registered by that edge |
| transposed form | `fir_transposed` | 6 | 110 | 1 | registered by that edge |
| symmetric form | `fir_symmetric` | 3 (+3 pre-adders) | 60 | 1 | registered by that edge |
| distributed arithmetic (DA) | `fir_da` | 0 (one 64 x 11-bit table) | 72 | 9 | strobe set 8 edges later |
| conventional MAC | `fir_mac` | 1 (pipelined) | 112 | 9 | strobe set 8 edges later |

The flip-flop counts come from a coarse, technology-independent synthesis at
the default sizes. They are meant only for comparing the structures with each
other. The transposed form has more flip-flops than the direct form because
its delay line holds 19-bit partial sums instead of 8-bit samples.

The first four are the filter structures proper. The MAC filter is the
programmable-DSP sum-of-products baseline, one multiply-accumulate per clock,
that DA is usually contrasted with. It is included so that the two sequential
approaches can be compared on the same stream.

## Numbers: sign-magnitude outside, two's complement inside

At the ports of `fir_top`, samples and results use fixed-point
**sign-magnitude** form. The MSB is the sign (1 = negative) and the remaining
bits hold the magnitude. An 8-bit sample therefore spans −127…+127, and the
code `8'h80` (negative zero) is read as 0. `sm_to_tc` converts each incoming
sample to two's complement. `tc_to_sm` converts each 19-bit result back.

Inside the structures all arithmetic is **two's complement**. This is a
departure from a design whose adders work on sign-magnitude operands directly.
Two's complement was chosen because it lets the DA structure handle signed
samples with a single table and one subtraction (see below). A sign-magnitude
DA would need either a second table or signed table entries per sample. The
sub-blocks (`fir_direct` … `fir_mac`) have two's-complement ports. Use them
directly if you do not want the conversion.

## Sizes and coefficients

The sizes and coefficients are defined in `rtl/fir_pkg.sv`:

* `TAPS = 6`
* `IN_W = 8` bits per sample
* `COEF_W = 8` bits per coefficient
* `OUT_W = IN_W + COEF_W + clog2(TAPS) = 19` bits per result. This is full
  precision, so no structure rounds or overflows.
* The coefficients are `{-4, 9, 27, 27, 9, -4}`, a small low-pass filter with
  linear phase. Because they sum to 64, a step of height A settles at 64·A.

The coefficients must be **symmetric**: h(1)=h(6), h(2)=h(5), h(3)=h(4). The
symmetric structure relies on this, and the other structures do not mind it.
The tap count and the symmetry are part of the filter's definition. The
widths and the coefficient values are this implementation's choice.

Coefficients are passed as one packed parameter `COEF`, with tap k (the
coefficient that multiplies x[n-k]) in bits `[k*COEF_W +: COEF_W]`. Every
module takes `TAPS`, `IN_W`, `COEF_W`, `COEF` and `OUT_W` as parameters. To
change the filter, edit `fir_pkg` or override the parameters on `fir_top`. The
DA table is recomputed at elaboration. The symmetric structure needs an even
`TAPS` and symmetric `COEF`. Elaboration stops with an error if either
requirement is not met.

## The three parallel structures

All three take one sample per clock when `in_valid` is high. The result for
that sample is registered by the same edge, so `out_valid` follows `in_valid`
by one clock.

* **Direct form** (`fir_direct`). A delay line holds x[n-1]…x[n-5]. Six
  multipliers form the products of x[n] and the delayed samples with h(1)…h(6),
  and an adder tree sums them. The critical path is one multiplier plus the
  whole adder tree.
* **Transposed form** (`fir_transposed`). The same filter with the signal flow
  reversed: the new sample goes to all six multipliers at once, and the
  registers hold partial sums instead of samples. Each clock,
  `y = h(1)·x + r0` and `r_k <= h(k+2)·x + r_(k+1)`. Only one adder sits
  between any two registers, so there is no adder tree to pipeline.
* **Symmetric form** (`fir_symmetric`). Samples that meet equal coefficients
  are added first, and each pair sum is multiplied once:
  `y = (x[n]+x[n-5])·h(1) + (x[n-1]+x[n-4])·h(2) + (x[n-2]+x[n-3])·h(3)`.
  This uses three multipliers instead of six. The pre-adders are one bit wider
  than a sample so that a pair sum cannot overflow.

## Distributed arithmetic (`fir_da`)

This is the structure that needs the most explanation. Write each sample in
two's complement as bits x_k = −2⁷·b₇ + Σ_{j<7} 2^j·b_j. Then

    y = Σ_k h_k · x_k  =  Σ_{j<7} 2^j · L(b_j)  −  2⁷ · L(b₇)

Here b_j is the 6-bit word formed by bit j of the six samples x[n]…x[n-5].
L(a) is the sum of the coefficients whose bit is set in a. Because the
coefficients are constant, L has only 2⁶ = 64 possible values, and they can be
stored in a table. No multiplier is needed. The filter reads the table once
per sample bit and accumulates.

* **`da_lut`** holds the 64 sums. The entries are computed at elaboration from
  `COEF`. Each entry is 11 bits wide (`LUT_W = COEF_W + clog2(TAPS)`), and the
  read is combinational. There is one table, shared by all taps.
* **`shift_add`** is the accumulator. It is built from an `nbit_adder` and a
  `pipo_reg` (parallel-in parallel-out register). Each step it takes

      acc <= (acc >>> 1) ± (L << 7)

  The register is shifted one place to the right, and the new table output is
  added at the top. `first` starts a new sum by taking the old value as zero,
  and `sub` subtracts. Feeding the bits LSB first, the sum after eight steps is
  exactly Σ 2^j·L(b_j). The register is `LUT_W + IN_W = 19` bits wide, which is
  enough for no bit to be lost to the right shifts. The last step, for the
  sign bit b₇, subtracts.
* **Sample storage.** Six 8-bit registers hold x[n]…x[n-5]. While a sample is
  processed, every register rotates right by one bit per clock, so bit 0 of
  each register is the current table address bit. After eight rotations the
  registers are back in their original order. When the next sample arrives,
  they shift as an ordinary delay line.
* **Timing.** A sample is taken on an edge where `in_valid && in_ready`.
  `in_ready` then stays low for eight compute clocks, one per bit. `out_valid`
  is set by the eighth compute edge and stays high for one clock. `y_out` is
  the accumulator itself, so it is valid only while `out_valid` is high. A new
  sample can be taken in that same clock, which gives one sample every
  IN_W + 1 = 9 clocks. The structure is not pipelined.

## Conventional MAC (`fir_mac`, `pdsp_mac`, `pipelined_mult`)

* `pipelined_mult` registers the operands and then the product, so a product
  appears two edges after its operands. A small tag travels with each product.
* `pdsp_mac` adds each product to an accumulator. A pair flagged `first`
  restarts the sum. A pair flagged `last` raises `done` when its product has
  been added, two edges after the pair was presented.
* `fir_mac` keeps x[n]…x[n-5] in a delay line. A counter steps through the six
  taps, issuing one (sample, coefficient) pair per clock. The result strobe is
  set TAPS + 2 = 8 edges after the accepting edge. As with DA, the next sample
  can be taken in the strobe clock, which gives 9 clocks per sample.

## Top level (`fir_top`)

Ports:

* `clk` is the clock. `rst_n` is an asynchronous active-low reset.
* The input is `in_valid`, `in_ready` and `x_in` (an 8-bit sign-magnitude
  sample).
* Each structure has its own strobe and 19-bit sign-magnitude result:
  `direct_valid/direct_y`, `transposed_valid/transposed_y`,
  `symmetric_valid/symmetric_y`, `da_valid/da_y` and `mac_valid/mac_y`.

`in_ready` is high only when both sequential structures can take a sample.
The three parallel structures are enabled by the same accept strobe, so all
five see exactly the same samples. With all five sharing one stream, the
whole top takes one sample every 9 clocks. Each parallel structure on its own
takes one per clock.

The handshake follows the usual valid/ready rule. An offered sample must stay
offered and unchanged until it is taken. An assertion in `fir_top` reports a
source that breaks this rule.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares
the block's outputs with an integer reference model, checks the cycle on
which results appear, and ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_fir_pkg.sv` holds the reference:
y = Σ H[k]·x[n-k], with the coefficients written out as plain integers.

* The three parallel filters get an impulse, then 3000 random samples
  (including −128, −1, 0, 1 and 127) with random gaps.
* `tb_fir_da` and `tb_fir_mac` additionally check `in_ready` on every clock
  and the exact clock of every result strobe.
* The leaf blocks have their own testbenches:
  * `tb_da_lut` checks all 64 table entries.
  * `tb_shift_add` checks eight-step sums with extreme table values, and that
    the register holds while disabled.
  * `tb_nbit_adder`, `tb_pipo_reg`, `tb_pipelined_mult` and `tb_pdsp_mac`
    check their blocks with random and corner operands.
  * The converter testbenches cover all 256 input codes of `sm_to_tc` and the
    corner values of `tc_to_sm`, including saturation.
* `tb_fir_top` runs the complete design at its default parameters. The
  stimulus is a unit impulse, a unit step, a sine wave (amplitude 100, period
  32 samples), the same sine with ±30 of uniform noise, and 400 random samples
  including negative-zero codes. It checks every output of all five
  structures and their timing. It also checks that the impulse response
  equals the coefficients and that the step response settles at 64. It counts
  how often each mechanism occurs: input stalls, full-rate back-to-back
  samples, idle source clocks, DA sign-bit subtractions of a nonzero table
  entry, pre-additions beyond the 8-bit range, negative and positive outputs,
  and negative-zero inputs. The test fails if any of these never occurs.

To run a testbench with plain Verilator 5, from the folder that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fir_pkg.sv tb/tb_fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
    ./obj_dir/Vtb_fir_top

Replace `tb_fir_top` with any other testbench name. Each run takes seconds.

## Choices not fixed by the filter's definition

Treat these as this implementation's own choices. Change them freely:

* The sample, coefficient and output widths.
* The coefficient values.
* The registered outputs of the parallel structures.
* The asynchronous reset.
* The valid/ready interface.
* The bit order (LSB first) and rotating sample registers of the DA filter.
* The pipeline depth of the multiplier.
* The MAC sequencer.
* The saturation of the one unrepresentable sign-magnitude result.

The arithmetic inside the structures is two's complement rather than
sign-magnitude, as described above.

Two related structures are not included. The first is a fully parallel DA
filter, which uses several tables to process several bits per clock. The
second is an adaptive (for example LMS) noise canceller built on these
filters. Neither is specified here in enough detail to build.
