# Programmable clock divider with a wide binary ratio range and close-to-50% duty cycle

A chain of 2/3 cells (the Vaucher modular divider) divides a clock by any
integer N over a very wide range, and its ratio is set by plain binary
control bits. Its output, though, is a pulse only 2 or 3 input periods wide,
whatever N is. At N = 500 that is a 0.4% duty cycle, which is useless for
driving a switched-capacitor filter, a DDR interface or a large clock tree.

This RTL wraps such a chain in a small, slow feedback loop. The loop brings the
output to exactly 50% for every even N, and to k/(2k+1) for every odd N = 2k+1.
It keeps the ratio step at 1. With the default size the divider covers
N = 8 … 511, and the worst duty cycle is 4/9 = 44.4% at N = 9. A second
block uses the same chain with a first-order delta-sigma accumulator to form
the fractional divider of a PLL, with ratio S + f/4.

All timing in this RTL is counted in input clock cycles. Transistor-level
effects of the original circuit are not modelled: source-coupled latches,
maximum input frequency, jitter and phase noise.

## 1. The 2/3-cell chain (`cell23`, `vaucher_div`)

A 2/3 cell divides its input clock by 2. It divides by 3 once per cycle of
the slower cells when both its `mod_in` and its ratio bit `p` are 1. Cell 0
runs from `fin`. The output `fo` of each cell clocks the next cell. Each
cell's `mod_out` goes back to the previous cell as its `mod_in`.

Each cell obeys these rules, and `tb_cell23` checks them:

* `mod_in = 0`: `fo` = ck/2 and `mod_out` stays at 0.
* `mod_in = 1`: `mod_out` is high for 1 input period and low for 1 + p periods.
  Its period is therefore 2 + p input periods.

The last cell has `mod_in` tied to 1. Once per division cycle, its
`mod_out` pulse travels down the chain towards `fin`. Each cell on the way
swallows one extra input period if its `p` is set. The ratio of an n-cell
chain is therefore

    N = P0 + 2 P1 + 4 P2 + ... + 2^(n-1) P(n-1) + 2^n

**Range extension.** The ratio bit `P[n]` has no cell of its own. The
`mod_in` of cell c (VMIN−1 ≤ c ≤ n−2) is OR-ed with
`NOT(P[c+2] | … | P[n])`. When no bit above c+1 is set, cell c becomes the
last cell of a shorter chain, and the cells above it stop affecting the ratio.
The chain then divides by the binary value of P over 2^VMIN … 2^(n+1)−1.
Below 2^(VMIN+1), bit `P[VMIN]` is ignored, so writing it as 1 keeps
"ratio = P" true everywhere. The chain output `fout_origin` is `mod_out` of
cell 1, because that signal has the full division period for every ratio.

**Cell model.** Each cell is a three-state phase machine on the rising edge
of `ck`:

* Phase 0: `fo` is high.
* Phase 1: `mod_out` is high if `mod_in` was sampled high at the end of phase 0.
* Phase 2: the swallowed period.

`mod_in` changes only on the cell's own output edges. It is sampled one
input edge later, so no cell ever samples a changing signal.

## 2. Duty-cycle correction (`prog_divider`)

Write N = 2m + S0, where the ratio word is S = {S[n], …, S1, S0} and
m = S[n:1].

**Solution 1: half the ratio, then divide by 2.** The chain divides by
m + cin, and a toggle flip-flop (`div2`) on `fout_origin` gives the output.
The carry-in is `cin = fout AND S0`. An n-bit ripple half adder
(`half_adder_n`) forms m + cin.

* Even N (S0 = 0): the chain divides by m = N/2 every time, so the output is
  high for m input cycles and low for m. The duty cycle is exactly 50%.
* Odd N (S0 = 1): while the output is high, `cin` = 1. The next chain cycle
  therefore divides by m + 1 and the output is low for m + 1 cycles. Then
  `cin` drops and the chain divides by m again. The period is 2m + 1 = N and
  the duty cycle is m/(2m+1).

Example, N = 9: m = 4. The chain alternates ÷4 and ÷5, and the output is
high 4 and low 5 input cycles, giving 44.4%.

**Why a second scheme is needed.** For N = 2^r − 1, m = 2^(r−1) − 1 is all
ones and m + 1 is a power of two. The leading 1 of the chain control word
then moves every cycle. This switches a different cell in as the last cell,
and that cell's phase is arbitrary. The result is wrong periods. This is why
Solution 1 cannot be used for 15, 31, 63, 127, 255 or 511.

**Solution 2 for N = 2^r − 1.** The chain gets S itself and divides by N. In
this case every bit below the leading one is 1. The last active cell is the
one just below the leading 1, and its `mod_in` is forced high. That cell
divides by 3:

* one input period of 2^(r−2) cycles;
* one period in which the whole cascade below it swallows, lasting
  2^(r−1) − 1 = k cycles;
* another period of 2^(r−2) cycles.

Its `mod_out` is high for exactly the middle period, so it already has
duty k/(2k+1). For example, N = 15 gives 7/15 = 46.7%.

* `edge_judge` finds the leading 1 of the control word (one-hot) and
  selects that cell's `mod_out`.
* `ratio_judge` recognises S = 0…011…1. It does this with a prefix-AND
  chain, a suffix-OR chain and one AND gate per bit position.
* An (n+1)-bit multiplexer picks the chain control word: S for Solution 2,
  the adder output for Solution 1.
* An output multiplexer picks the on-edge `mod_out` or `div2`.

**When the control word may change.** This is the subtle part. In one
division cycle, the cells take their swallow decisions from the slowest cell
down to cell 0. The output edge that toggles `div2` (the rise of `mod[1]`)
falls in the middle of that sequence. If the new adder output reached the
chain at once, cell 0 would act on the new word while the other cells had
already acted on the old one. For odd m, where m + 1 carries into higher
bits, that gives periods of m − 1 and m + 2 instead of m and m + 1.

The chain control word `p_q` is therefore registered on the **falling** edge
of `fout_origin`. By then cell 0 has decided for the current cycle, and the
slowest active cell has not yet decided for the next. Every division cycle
therefore sees one consistent word. As a result:

* A new S, including a switch between the two solutions, takes effect within
  two output periods.
* After reset the chain runs at ratio 4 until the first load.

## 3. Fractional PLL divider (`frac_divider`, `dsm_accum`)

In the PLL the divider output only feeds a phase detector, so the duty cycle
does not matter. There is no `div2` stage here. An (n+1)-bit half adder
forms S + c:

* S is the integer ratio.
* c is the carry of a 2-bit accumulator that adds the fraction {Sf1, Sf2}
  once per output cycle.

The average ratio is S + Sf1/2 + Sf2/4. For example, 240.25 divides by 241,
240, 240, 240 in turn. The accumulator is clocked on the falling edge of the
output, for the same consistency reason as `p_q`.

Limitation: with a non-zero fraction, S must not be 2^r − 1. For example,
255 + 1/4 fails, because S + 1 would move the leading 1 (the same effect as
above). The PLL's useful ratios (about 170 … 250 for a 1.7–2.5 GHz VCO and a
10 MHz reference) are far from that case.

## 4. The test chip (`divider_chip`)

The top level mirrors the test chip. It has three independent copies of
`prog_divider`:

* `*_hf`: a GHz signal generator through input buffers;
* `*_ring`: an on-chip ring oscillator;
* `*_lf`: a low-frequency generator through inverters.

It also has the digital part of the fractional PLL:

* `frac_divider` divides the VCO clock (`vco_clk`) and sends the result out
  on `pll_fdiv`.
* `pfd` is a three-state phase/frequency detector. It compares `pll_ref`
  (the 10 MHz reference) with that divided clock. Its `pll_up` and `pll_dn`
  outputs switch the charge pump.

The input buffers, ring oscillator, charge pump, loop filter and LC VCO are
analog and are not part of this RTL. Their digital-side signals are ports:

* the input clocks `fin_*` and `vco_clk`;
* the detector outputs `pll_up` and `pll_dn`.

Each divider copy has its own 9-bit ratio input.

**Phase/frequency detector (`pfd`).** A rising reference edge sets `up`, and
a rising divider edge sets `dn`. When both are set, an AND gate clears both
flip-flops through their asynchronous resets. While the reference leads,
`up` is high for the lead time, and the same holds for `dn` when the divider
leads. When the frequencies differ, the detector keeps pushing in one
direction until they match. Timing tools report the clear path through the
reset pins as a combinational loop. That loop is intended.

**Closed-loop check.** `tb/pll_loop_model.sv` is a behavioural stand-in for
the analog loop, used only in simulation. It models the charge pump, loop
filter and VCO as a proportional-plus-integral update of the VCO period, once
per reference cycle, driven by the net `up`/`dn` time. With it, `tb_pll_lock`
closes the loop around `divider_chip` at four ratios: 240, 240.25, 240.5 and
176.25. After settling, the VCO makes exactly 400 × ratio cycles per 400
reference cycles.

## 5. Files, parameters and interfaces

| module | role |
|---|---|
| `pdiv_pkg` | default sizes: `NSTAGES = 8`, `VMIN = 2`, `FRAC_BITS = 2` |
| `cell23` | one 2/3 cell |
| `vaucher_div` | chain of `NSTAGES` cells with range extension |
| `half_adder_n` | N-bit ripple half adder (a + cin) |
| `div2` | toggle flip-flop |
| `ratio_judge` | "is S = 2^r − 1" detector |
| `edge_judge` | leading-one (on-edge) detector |
| `prog_divider` | the complete duty-corrected divider |
| `dsm_accum` | first-order delta-sigma accumulator |
| `frac_divider` | fractional PLL divider |
| `pfd` | three-state phase/frequency detector of the PLL |
| `divider_chip` | top: three dividers, the PLL divider and the phase detector |

Parameters and signals:

* `NSTAGES` sets the range to 8 … 2^(NSTAGES+1) − 1.
* `VMIN = 2` makes the chain reach down to 4, which is what the ÷2 scheme
  needs for N = 8. Changing `VMIN` moves the minimum ratio to 2^(VMIN+1).
* Ratios are plain binary words, `NSTAGES+1` bits wide.
* Reset is asynchronous and active high everywhere.
* All output edges coincide with rising edges of the respective input clock.
* Clocks inside the chain are ripple clocks, derived from flip-flop outputs.
  This is intended: the original divider is an asynchronous chain. For
  static timing analysis, constrain each cell output as a generated clock.

## 6. Simulation and verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. Example:

    verilator --binary --timing --assert -Irtl -Itb rtl/pdiv_pkg.sv \
        tb/tb_prog_divider.sv --top-module tb_prog_divider
    ./obj_dir/Vtb_prog_divider

| testbench | what it checks |
|---|---|
| `tb_cell23` | cell periods and `mod_out` timing for all p / mod_in |
| `tb_vaucher_div` | every control word 4 … 511: chain period, pulse width 2 or 3 |
| `tb_prog_divider` | every N = 8 … 511: period N, high time ⌊N/2⌋, scheme selection, chain ratio |
| `tb_measured_ratios` | all 78 ratio/frequency points of the original chip's measurement tables: output frequency and duty cycle against the published calculated values |
| `tb_frac_divider` | ratios 240, 240.25, 240.5, 176.25 and others: each period S or S+1, four periods sum to 4S+f |
| `tb_divider_chip` | end to end at default size: three unrelated input clocks, ratio switches on running dividers, even / odd / 2^r − 1 ratios, fractional carries and detector up/dn pulses, each counted |
| `tb_pfd` | random phase offsets (pulse widths equal the lead time) and a frequency offset (one-sided output) |
| `tb_pll_lock` | closed PLL with the behavioural analog model: lock and exact average ratio at 240, 240.25, 240.5 and 176.25 |
| `tb_half_adder_n`, `tb_ratio_judge`, `tb_edge_judge` | exhaustive |
| `tb_div2`, `tb_dsm_accum` | against reference models |

`tb/period_mon.sv` is a helper that measures period and high time in input
cycles. `tb/pll_loop_model.sv` is the behavioural analog loop described in
section 4.

## 7. Where this RTL departs from the original circuit

* **Latches and flip-flops.** The original cells are source-coupled
  AND-latches and D-latches, with a faster latch variant in the first stage.
  Here each cell is a rising-edge phase machine with the same
  cycle-level behaviour.
* **Solution 2 output.** The original cell adds an OR gate, pulse_out =
  Q1 OR mod_out, to widen its latch-level `mod_out` to the full k-cycle
  window. Here `mod_out` already spans that window, so the last active
  cell's `mod_out` is used directly.
* **Which cell is "on edge".** The original ties the output cell to the
  leading 1 of the ratio word. With the range extension, the cell whose
  ratio bit is the leading 1 lies just beyond the active chain, and its
  period is a multiple of N. This design takes the cell just below it: the
  last active cell, whose output has period N and duty k/(2k+1), as the
  original requires of the on-edge output.
* **Registered control word.** The `p_q` register on the falling edge of
  `fout_origin`, and the falling-edge clocking of the PLL accumulator, are
  additions. The original describes the feedback loop only at gate level.
* **Chain size.** The stage count of the fabricated part is not given.
  `NSTAGES = 8` is the smallest chain that reaches every ratio it was
  measured with (up to 510).
* **Ratio judgment.** The "2^r − 1" detection includes the all-ones word
  (511), which also needs Solution 2.
* **Phase detector insides.** The PLL's detector is specified only by what it
  does. The two-flip-flop form with an AND-gate clear is the usual
  realisation, chosen here.
* **Reset.** Reset is an addition.
