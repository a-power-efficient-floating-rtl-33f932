# Clock-gated floating-point co-processor (SPARC V8 FPops)

This is a floating-point co-processor for a SPARC V8 style embedded processor,
built to save power through its organisation rather than through circuit tricks.
It has three independent execution pipelines: an adder, a multiplier and a
divider. The integer unit's decode stage already knows which pipeline an FPop
needs. So the decoder raises a clock-enable for that one pipeline, and the other
two receive no clock edges at all. Their pipeline registers are the main
consumer of dynamic power, and they stay quiet while their pipeline is idle.

The arithmetic is IEEE-754 single and double precision. Every SPARC V8 FPop
with single or double operands is executed, except square root. The
pipelines are:

| pipeline   | instructions                                                   | stages | latency (cycles) | issue rate      |
|------------|----------------------------------------------------------------|--------|------------------|-----------------|
| adder      | FADDs/d, FSUBs/d, FCMPs/d, FCMPEs/d, FiTOs/d, FsTOi, FdTOi, FsTOd, FdTOs, FMOVs, FNEGs, FABSs | 3 | 3 | 1 per cycle |
| multiplier | FMULs, FMULd, FsMULd                                           | 3      | 3                | 1 per cycle     |
| divider    | FDIVs, FDIVd                                                   | 4 (SRT stage iterates 28 cycles) | 32 | 1 per 30 cycles |

The multiplier is a radix-4 Booth / Wallace-tree / carry-propagate-adder
multiplier. The divider is a radix-4 SRT divider with a quotient-digit
selection table.

## How an instruction flows

```
 inst, rs1, rs2, rm ──► fpu_decoder ──► fpu_issue_ctrl ──issue──┬─► fp_adder      (add_clk) ─┐
                            │                │ stall            ├─► fp_multiplier (mul_clk) ─┼─► result port
                            │ cg_en[2:0]     ▼                  └─► fp_divider    (div_clk) ─┘  res_*
                            └──────► 3 x clock_gate ◄── busy of each pipeline
```

1. **Decode** (`fpu_decoder`, combinational). The instruction word is a SPARC
   format-3 FPop (`op=2`, `op3=0x34` FPop1 or `0x35` FPop2). Its 9-bit `opf`
   field selects the pipeline, the operation and the operand and result
   precisions (`src_sp`, `dst_sp`). `rd` (bits 29:25) becomes a tag that
   travels with the op. An FPop that is not executed here (square root, or
   any op with a quad operand or result) raises `inst_unimpl` and is dropped.
2. **Issue** (`fpu_issue_ctrl`). The op enters its pipeline at the next rising
   edge unless `inst_ready` is low. The integer unit must then hold the
   instruction. There are two reasons to stall:
   * the divider is still iterating on an earlier divide;
   * the op's result would reach the shared result port in the same cycle as a
     result already on its way. This can only happen between a divide and an
     add or multiply issued 29 cycles later. The controller keeps a vector
     `res[i]` = "the port is taken i cycles from now". It marks `res[L]` when
     it issues an op of latency L, and shifts the vector every cycle.
3. **Execute** on the pipeline's gated clock (below).
4. **Result.** Exactly one pipeline presents `res_valid` in a cycle (an
   assertion in `fpu_top` checks this). The result comes with `res_tag`, the
   exception flags `res_exc` = {nv, of, uf, dz, nx}, and for compares
   `res_fcc`/`res_fcc_valid` in the SPARC fcc encoding (0 =, 1 <, 2 >,
   3 unordered). Results complete out of order: a divide finishes after adds
   issued later. The tag tells the integer unit which register to write.
   Checking read-after-write hazards is left to the integer unit.

Timing: an op accepted at edge *t* (`inst_valid && inst_ready` before that
edge) delivers `res_valid` in the cycle after edge *t+L-1*. In other words it
is visible L cycles after the cycle in which it was presented. L is
`LAT_ADD`, `LAT_MUL` or `LAT_DIV` in `fpu_pkg`.

## Clock gating

Each pipeline has a `clock_gate`. This is a latch that is transparent while
`clk` is low, followed by an AND gate. The enable of pipeline *p* is

```
pipe_clk_en[p] = cg_en[p] (decoder selects p this cycle)  |  busy_p (some stage of p holds an op)  |  !rst_n
```

* The decoder term opens the clock for the edge at which the op enters.
* The `busy` term keeps it open until the op has left the output register,
  including the edge that clears the last valid bit. A drained pipeline
  therefore stops with all its valid bits at zero. Only the valid bits have a
  reset, and that reset is asynchronous, so they need no clock.
* All three gates are held open while `rst_n` is low, so the gated registers
  see reset exactly like the rest of the design, even if no clock edge falls
  inside the reset pulse.
* The latch captures the enable during the low phase. A change of the enable
  while `clk` is high cannot shorten or create a pulse.

The decoder, the issue controller and the result multiplexer run on the
free-running clock. Everything inside `fp_adder`, `fp_multiplier` and
`fp_divider`, including the divider's SRT iteration registers, runs on that
pipeline's gated clock. The gating is deterministic: it follows from the
decoded instruction and the known pipeline occupancy, and needs no activity
detection. `pipe_clk_en` is brought out so that a power flow or a testbench
can see it.

## Single precision on a double datapath

There is only one datapath per pipeline, and it is double wide. A single
operand sits in the low 32 bits of `rs1`/`rs2` (the upper word is ignored)
and is widened exactly to double format as it enters stage 1: the exponent
is rebiased by 1023 − 127 = 896 and the 23-bit fraction is extended with
zeros. Every single value is exactly representable as a double, so nothing is
lost.

The arithmetic then runs in double format with its full guard/sticky
information. Only `fp_round_pack` knows the result precision (`dst_sp`). For
a single result it keeps 24 significant bits: bit 31 of the 56-bit
significand becomes the guard bit, all lower bits fold into the sticky, and
the exponent is rebiased by −896 and checked against the single range (1 to
254). The value is rounded once, from an exact (or exactly-sticky) source,
so single results are correctly rounded and not double-rounded. The packed
single goes into `res_data[31:0]` with the upper word zero.

This one mechanism covers the mixed-precision ops too:

* **FsMULd** widens both singles and rounds to double. The 48-bit product is
  exact, so the double result is exact.
* **FsTOd** widens the single and rounds to double (always exact). **FdTOs**
  reads a double and rounds it to single. It can overflow or underflow. Both
  pass through the adder with nothing added.
* **FiTOs** normalizes the integer like FiTOd and rounds it to 24 bits. It is
  inexact for integers that need more than 24 bits.
* **FsTOi** widens the single and truncates like FdTOi.

Special results (NaN, infinity) are built in double format. For a single
result they are narrowed by keeping the sign, saturating the exponent and
taking the top 23 fraction bits. So the single default NaN is 0x7FFFFFFF,
and a quieted NaN keeps its upper payload bits.

FMOVs, FNEGs and FABSs are resolved in stage 1 of the adder. They copy
`rs2[31:0]` and change only the sign bit. They raise no exceptions, not even
for a signalling NaN, as SPARC V8 specifies.

## The divider (`fp_divider`, `srt_divider`)

The divider is the least obvious part of the design. It has four stages.

1. **Initialize.** The sign is the XOR of the operand signs. The exponent is
   `ea - eb + 1022`. Special operands are resolved here (NaN, ∞/∞, 0/0, x/0
   with the dz flag, ∞/x, 0/x, x/∞). **Dividend alignment:** if the
   dividend's significand is not below the divisor's, it is shifted right by
   one and the exponent is raised by one. After this the significand quotient
   x/d always lies in [1/2, 1), so it never overflows and never needs more
   than a one-place normalization. That normalization is folded into the
   exponent (the `1022` instead of `1023`).
2. **SRT, radix 4**, one digit (two quotient bits) per cycle for 28 cycles.
   The partial remainder starts at r₀ = x/4, which satisfies the SRT bound
   |r| ≤ 2d/3. Each cycle computes

   ```
   r(j+1) = 4·r(j) − q(j+1)·d,      q ∈ {−2, −1, 0, +1, +2}
   ```

   The remainder is kept in two's complement: 55 fraction bits and 4 integer
   and sign bits. **Digit selection** uses a small table indexed by two
   values: E, which is 4r truncated to 4 fraction bits, and the three fraction
   bits of d after the leading 1. For each of the eight divisor intervals
   [1+i/8, 1+(i+1)/8) the table holds four thresholds. q = +2 if E ≥ T₂(i),
   else +1 if E ≥ T₁(i), else 0 if E ≥ T₀(i), else −1 if E ≥ T₋₁(i), else
   −2. The thresholds are computed at elaboration time. No table file is
   needed. The formula is

   ```
   T_q(i) = ceil( (3q − 2) · D · 16 / 24 ),   D = 8 + i + 1 if 3q − 2 > 0, else 8 + i
   ```

   This is the smallest estimate E for which (q − 2/3)·d ≤ 4r holds for every
   d in the interval. Because the remainder is non-redundant, truncation only
   makes the estimate smaller. The upper bound 4r ≤ (q + 2/3)·d of the chosen
   digit then follows from the overlap of neighbouring digit ranges. The
   overlap is at least d/3 minus one divisor step and one estimate step, which
   is positive for these table sizes. The testbench checks every table cell
   indirectly, by exhaustive sweeps over the divisor intervals. **On-the-fly
   conversion** builds the quotient without a carry-propagate adder. Two
   registers hold Q and Q−1, and each digit is appended as two bits to one of
   them. After the last digit a negative remainder selects Q−1 and the
   remainder is corrected by +d. The quotient is then exactly truncated, and
   "remainder ≠ 0" is an exact sticky bit.
3. **Adjust.** The 54 quotient bits give the 53-bit significand plus a guard
   bit. The sticky bit comes from the remainder.
4. **Round** (`fp_round_pack`).

The SRT stage iterates instead of being unrolled. A divide therefore occupies
the divider until its SRT stage finishes (`in_ready` low, which stalls the
issue of further divides), and the latency is fixed at 28 + 4 = 32 cycles.
`SRT_ITER` in `fpu_pkg` sets the digit count.

## The multiplier (`fp_multiplier`, `booth_r4_pp`, `wallace_tree`, `csa`, `cpa`)

* **Stage 1.** `booth_r4_pp` recodes the 53-bit multiplier significand into
  27 radix-4 Booth digits in {−2..+2}. Each digit selects 0, ±a or ±2a,
  shifted by 2i. This halves the number of summands. A negative row is the
  one's complement of |digit|·a. The missing +1s of all negative rows are
  gathered into one extra correction row, because they fall on distinct bit
  positions 2i. `wallace_tree` then reduces these 28 rows of 106 bits with
  levels of carry-save adders (`csa`, 3 rows in, 2 rows out) down to a sum row
  and a carry row. Those two rows are registered. All rows are kept modulo
  2^106. The true product is below 2^106, so the modular sum is exact.
* **Stage 2.** `cpa`, a 106-bit ripple-carry adder of full adders, adds the
  two rows. The product lies in [1, 4). It is normalized to 53 bits plus
  guard, round and sticky bits, and the exponent `ea + eb − 1023` is raised by
  one when the product is 2 or more.
* **Stage 3.** Round and pack.

The ripple-carry final adder keeps the structure simple. For a fast
implementation it would be replaced by a prefix adder of the same interface.

## The adder (`fp_adder`)

* **Stage 1.** The effective operation is the operator combined with the
  signs. The operands are compared by magnitude and swapped, so x is the
  larger. y is aligned by a right shift of `ex − ey` places, and the
  shifted-out bits are ORed into a sticky bit. Significands are 56 bits wide:
  53 bits, then guard, round and sticky. Compares, float-to-integer
  conversions and the moves are finished entirely in this stage and bypass
  the arithmetic.
  * **Compares** map sign-magnitude values to two's-complement keys, so +0 and
    −0 compare equal. A NaN gives "unordered". FCMPEs/d raise nv for any
    NaN, FCMPs/d only for a signalling NaN.
  * **FsTOi/FdTOi** truncate toward zero, as SPARC specifies. Out-of-range values
    and NaN give 0x7FFFFFFF or 0x80000000 with nv.
* **Stage 2.** A 57-bit add or subtract, then normalization. A carry-out
  shifts right by one. Otherwise a leading-zero count drives a left shift.
  FiTOs/FiTOd enter here as an unnormalized significand (|int| placed so that the
  leading bit weighs 2³¹) and uses the same normalizer. An exact zero result
  is +0, except that x − x rounding toward −∞ gives −0.
* **Stage 3.** Round and pack.

## Number handling (all pipelines)

* **Rounding** (`fp_round_pack`). All four SPARC modes are supported, selected
  by `rm` with the FSR.RD encoding: 0 nearest-even, 1 toward zero, 2 toward
  +∞, 3 toward −∞. Overflow gives ∞ or the largest finite number, as the mode
  requires, and raises of and nx. Inexact is raised on any lost bit.
* **Subnormals** are not supported in hardware. Operands with a zero exponent
  are read as zero. Results below the normal range become a signed zero with
  uf and nx raised. Tininess is judged after rounding. This is the behaviour
  of SPARC's non-standard floating-point mode (FSR.NS = 1). It is the main
  deviation from full IEEE 754.
* **NaNs.** A NaN operand is returned quieted, rs1 taking precedence over rs2.
  Invalid operations (∞−∞, 0·∞, 0/0, ∞/∞) return the default NaN
  0x7FFFFFFFFFFFFFFF with nv. A signalling NaN operand raises nv.
* **Exceptions** are reported per result on `res_exc`. Accumulating them into
  the FSR and trapping is the integer unit's business.

## Top-level interface (`fpu_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | free-running clock, asynchronous active-low reset |
| `inst_valid`, `inst` | in | 1, 32 | FPop instruction word presented by the integer unit |
| `rm` | in | 2 | rounding mode (FSR.RD) |
| `rs1`, `rs2` | in | 64 | source operands (`fp64_t`); singles and the integer of FiTOs/FiTOd in `[31:0]` |
| `inst_ready` | out | 1 | low = stall, keep presenting the instruction |
| `inst_unimpl` | out | 1 | the FPop is not executed by this co-processor |
| `res_valid`, `res_tag` | out | 1, 5 | result valid for one cycle, its `rd` |
| `res_data` | out | 64 | result; single results and the FsTOi/FdTOi integer are in `[31:0]` |
| `res_exc` | out | 5 | {nv, of, uf, dz, nx} of this result |
| `res_fcc`, `res_fcc_valid` | out | 2, 1 | compare result |
| `pipe_clk_en` | out | 3 | clock-gate enables {div, mul, add} |

Shared types, opcodes and latencies are in `rtl/fpu_pkg.sv`.

## What is and is not here

What is built:

* The three gated pipelines.
* Decoder-driven clock gating.
* The Booth / Wallace / ripple-adder multiplier.
* The radix-4 SRT divider with its four stages and dividend alignment.
* All single- and double-precision FPops of SPARC V8 except square root,
  with full IEEE rounding and exceptions apart from subnormals.

Design choices not fixed by the original description:

* the split of the adder and multiplier into three stages;
* the iterative SRT stage and its table size (8 divisor intervals, 4-bit
  remainder estimate);
* the non-redundant remainder;
* the result-port reservation;
* the rd tag;
* flush-to-zero;
* the NaN rules;
* single precision run on the double datapath, with operands and results in
  the low 32 bits of the 64-bit ports.

Not built:

* Quad-precision FPops (FADDq, FMULq, FdMULq, FqTOd, FdTOq and the rest).
  They raise `inst_unimpl`, as a SPARC V8 unit without quad support does.
* Square root. This one is excluded on purpose, not just left out.
* The floating-point register file, FSR and FP queue. The operands and results
  are ports, and the integer unit owns that state.
* The "modified" SRT scheme, in which a coarser table gives an estimated digit
  that is corrected in parallel with the remainder update. Here the digit is
  selected exactly from the table.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. Expected values come from `tb/tb_fp_ref_pkg.sv`,
an independent reference. It computes each result exactly with wide integers
(product, long quotient with sticky, aligned sum) and then rounds it by the
same number-handling rules.

* `tb_fp_adder`, `tb_fp_multiplier`, `tb_fp_divider` run thousands of random
  and corner-case operations in all rounding modes, in both precisions. They
  include cancellation, overflow, underflow, ties and special operands, and
  the mixed-precision ops. Every result is checked on
  its exact due cycle.
* `tb_srt_divider` compares quotient and sticky with a 128-bit integer
  division, sweeping all divisor/dividend table intervals.
* `tb_booth_r4_pp`, `tb_wallace_tree` and `tb_cpa` check the multiplier parts
  bit-exactly.
* `tb_fp_round_pack` covers the rounding edges of both formats.
* `tb_fpu_decoder` decodes all 1024 FPop1/FPop2 opf values.
* `tb_clock_gate` checks that the gated clock has no glitches while the enable
  changes at random moments.
* `tb_fpu_issue_ctrl` checks the stall decisions against its own port
  schedule.
* `tb_fpu_top` runs a random 4000-instruction program through the whole
  co-processor at its default configuration. It checks every result, its tag
  and its due cycle. It also checks that each gated clock ticks exactly on its
  enabled cycles. It counts that every mechanism occurred at least once: each
  pipeline clock-gated while another works, both kinds of stall,
  unimplemented FPops, overflow, underflow, invalid, divide by zero, all
  rounding modes and each of the 22 executed FPops.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fpu_pkg.sv tb/tb_fp_ref_pkg.sv $(ls rtl/*.sv | grep -v fpu_pkg) tb/tb_fpu_top.sv \
    --top-module tb_fpu_top -o sim && ./obj_dir/sim
```

The package must come first, and only once.

For another testbench, replace `tb_fpu_top` with its name.

Clock gating is modelled as real gated clocks. Simulators handle this
correctly because the gated-domain registers sample on the same time step as
the free-running ones. Lint reports the intended latch in `clock_gate`. A
synthesis flow should map `clock_gate` onto the library's integrated
clock-gating cell.
