# Inner-product co-processors for STAP weight calculation

Space-time adaptive processing (STAP) combines the returns of several antenna
elements over several radar pulses. The combination uses a weighted sum, and
the weights come from solving a linear system built from an estimate of the
covariance matrix. Whether that system is solved directly (QR decomposition) or
iteratively (conjugate gradient), most of the arithmetic is vector inner
products. This RTL moves that part into an FPGA co-processor. A host processor
streams two vectors over a 36-bit data path. The co-processor hands back a few
partial sums, and the host adds them and carries on with the rest of the
solver.

There are two co-processors. They were originally alternative loads of the same
board, and here they stand side by side in one top module:

| | multiply-and-accumulate (`mac_coproc`) | multiply-and-add (`mad_coproc`) |
|---|---|---|
| input per core cycle | 1 pair (x, y), one 36-bit word | 2 pairs, two 36-bit words at twice the core rate |
| operations per core cycle | 2 (multiply, add) | 3 (two multiplies, one add) |
| output per vector | S = 7 partial sums, each with an exponent | N/2 partial sums |
| host work left | 7 scaled additions | N/2 additions |

The top, `stap_coproc_top`, only instantiates the two and brings out their ports,
prefixed `mac_` and `mad_`. Each side has its own clock and reset.

## Number format

Vectors are in block floating point. Every element of a vector shares one
exponent, which the host keeps. The hardware sees only mantissas, each a sign bit
and a 16-bit magnitude read as a fraction `0.m` (`stap_pkg::sm_operand_t`). A
product of two such mantissas has the exponent `ex + ey` of the two vectors. The
multiplier keeps the upper 16 of the 32 product bits, so a product is the
truncated value `floor(|x|·|y| / 2^16)` with the sign `sx XOR sy`. All results
below are in these units.

Input word (both co-processors, `stap_pkg::in_word_t`):

| bits | field |
|---|---|
| 35 | reserved, ignored |
| 34 | `last`: this pair ends the vector |
| 33 | x sign |
| 32:17 | x magnitude |
| 16 | y sign |
| 15:0 | y magnitude |

## Multiply-and-accumulate: interleaved partial sums

This is the least obvious part of the design. Path: input buffer →
`sm_multiplier` → `mac_accumulator` → `output_register` → output buffer.

**Why there are S partial sums.** One product arrives every cycle, but adding it
to the running sum takes several pipeline stages:

1. `normalizing_unit`
2. `ones_comp_register`
3. `cla_pipe_adder`, `ceil(20/4) = 5` stages

That makes S = 7 stages in all. The adder output is fed straight back to the
normalizing unit, so product *i* is added to whatever left the adder S cycles
earlier. That is the sum of products *i−S*, *i−2S*, and so on. The pipe
therefore holds S independent running sums, and product *i* of a vector goes to
sum *i mod S*. Nothing stalls, and no hazard logic is needed. The price is that
the host receives S numbers instead of one.

**Exponents and renormalisation.** Each partial sum is a 20-bit two's complement
value with its own 6-bit exponent E, and its true value is `sum · 2^E`. When a
partial sum comes back to the normalizing unit and its top two bits differ
(|sum| ≥ 2^18), the unit shifts it right by one and increments E. Adding a 16-bit
product then cannot overflow 20 bits. The incoming product is shifted right by
the same E, so both operands are on one scale. The exponent stops at 63. Every
renormalisation drops one low bit (the shift rounds toward minus infinity), as
block floating point does. The output `norm_evt` pulses when it happens.

**Signs without a subtractor.** Products come out of the multiplier in
sign-magnitude form. The 1's comp/register stage inverts the magnitude of a
negative product. The adder then takes the product's sign as its carry-in, so
`~m + 1 = −m` in two's complement. The fed-back partial sum is already in two's
complement and passes through unchanged.

**Adder.** `cla_pipe_adder` has one 4-bit carry-look-ahead slice per pipeline
stage. Stage *k* adds bits `4k+3:4k` using the carry registered by stage *k−1*.
The upper operand bits are carried down the pipe until their stage is reached.
The finished low sum bits ride along, so the full sum comes out aligned.

**Starting and finishing a vector.** The state machine in `mac_accumulator` runs
IDLE → ACC → DRAIN:

- The first product of a vector starts it. For the first S injections the
  feedback is taken as zero, which clears the S sums without a separate reset.
- A cycle with no product injects a zero, so the sums keep circulating.
- After the product flagged `last`, S zero products are injected and tagged
  "emit". They leave the adder S cycles later, one per cycle, each carrying the
  final value of one partial sum. Because they pass through the normalizing
  unit, a sum may be renormalised once more on the way out.

**Result word** (one per partial sum, S per vector):

| bits | field |
|---|---|
| 35 | last word of this vector |
| 34:32 | partial-sum number, 0..6 (the order is a rotation of 0..6) |
| 31:26 | exponent E |
| 25:0 | partial sum, sign-extended two's complement |

Inner product = `2^(ex+ey) · Σ sum_k · 2^(E_k)` over the seven words.

## Multiply-and-add: four operands over a 36-bit path

Path: input buffer → `mad_input_fsm` → `mad_core` → output buffer. The core needs
four operands per cycle, which is 68 bits, but the data path carries 36.

**Input side at twice the core rate.** The input state machine runs on the fast
clock. It takes the first word of a set (a1, b1) and holds it for one fast cycle.
When the second word (a2, b2) arrives, it presents all four operands to the core
as one set. The core is clocked by the same fast clock, with an enable
(`core_ce`) that is high every second cycle. That is equivalent to a half-rate
core clock aligned with the fast one, and it keeps everything in one clock
domain. A completed set waits until the next enabled cycle. Sets cannot come
faster than one per two fast cycles, so none is overwritten. An assertion
checks this.

**Core.** Two `sm_multiplier`s work in parallel. The 1's comp/register
complements both products when they are negative, and the adder must then add
`a' + b' + sa + sb`. A single carry-in can take only one of the two sign
carries. A 3:2 carry-save row folds `sa` in first, and the CLA pipe takes `sb`
as its carry-in. The 18-bit sum cannot overflow, so this side has no
normalizing unit.

The host sends an even number of pairs and pads an odd vector with a zero pair.
Each result word is `{last, sign-extended 35-bit sum}` and holds
`x[2i]·y[2i] + x[2i+1]·y[2i+1]`. The host adds the N/2 results.

## Buffers and flow control

Each co-processor has a 16-word, 36-bit FIFO (`io_buffer`) on its input and
another on its output, with valid/ready on both sides. The compute pipelines
never stall. Instead, input is held back so that the output FIFO always has room:

- **MAC:** a word leaves the input FIFO only when the output FIFO has at least S
  free entries and no earlier vector is still draining. The next vector starts
  once the last result of the previous one has been written.
- **MAD:** a word is taken only while the number of words in the output FIFO plus
  the results still in flight is below the FIFO depth.

If the host stops reading, results wait in the output FIFO, and the input FIFO
then fills and deasserts `in_ready`.

## Timing

All numbers are at the default parameters and are checked by the testbenches.

| | |
|---|---|
| MAC rate | 1 pair per cycle (N words accepted in N cycles) |
| MAC latency | first result word valid 13 cycles (S + 6) after the last word is accepted; 7 results on consecutive cycles |
| MAD rate | 1 set (2 words) per core cycle = 2 fast cycles |
| MAD latency | 20 or 21 fast cycles from the last word of a set to its result word, depending on the core-enable phase |
| `cla_pipe_adder` | `ceil(W/4)` enabled cycles |
| `sm_multiplier` | 2 enabled cycles |

Reset is active-low and asynchronous. It clears every control and pipeline
register. The FIFO storage itself is not reset.

## What is taken from the source design and what is added

Taken from the source design:

- the two structures: multiplier, normalizing unit, 1's comp/register, adder
  with feedback and output register; and two multipliers, 1's comp/register and
  adder
- sign plus 16-bit mantissa operands and block floating point
- the 36-bit data path
- 4-bit carry-look-ahead slices per adder stage
- as many partial sums as accumulator stages
- the 2:1 input-to-core clock ratio with the first operands held for one cycle
- the rates: two operations per cycle for the MAC, three for the multiply-and-add

Choices made here, where the source is silent:

- the 20-bit accumulator, 6-bit exponent and 18-bit multiply-and-add sum
- truncating products to 16 bits
- the renormalisation rule (one bit when the top two bits differ)
- the two-stage multiplier split
- reading the sign lines into the adder as carry-ins of a one's-complement-plus-one negation
- the carry-save fold of the second sign
- the IDLE/ACC/DRAIN control and zero-feedback start
- all word layouts and the `last` flag
- the FIFO depth, valid/ready and the admission rules
- the clock enable in place of a second clock
- the reset

The source quotes 16-bit operands as "64 bits for four operands" in one place
and shows sign + 16-bit mantissa in its diagrams. The diagrams are followed
here: 17-bit operands, two per word.

Not covered here:

- the host processor and the host bus
- the original implementation's 40 MHz clock and FPGA area (88% and 99% of a
  Xilinx XC4028EX), which are properties of that implementation and are not
  checked

## Files

`rtl/`:

- `stap_pkg.sv`: widths and word types
- `stap_coproc_top.sv`: top
- `mac_coproc.sv`, `mac_accumulator.sv`, `normalizing_unit.sv`,
  `output_register.sv`: multiply-and-accumulate side
- `mad_coproc.sv`, `mad_input_fsm.sv`, `mad_core.sv`: multiply-and-add side
- `sm_multiplier.sv`, `ones_comp_register.sv`, `cla_pipe_adder.sv`,
  `io_buffer.sv`: shared

`tb/`: one self-checking testbench `tb_<module>.sv` per module, plus
`tb_stap_cg_workload.sv` (see below) and `tb_stap_ref_pkg.sv`, which holds the
integer reference arithmetic (truncated product, one partial-sum step with
renormalisation, sign extension).

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`:

- `tb_mac_accumulator` models the S interleaved sums cycle by cycle and compares
  every emitted word bit for bit.
- The co-processor testbenches compare the host-side result with the exact inner
  product: bit-exact where renormalisation cannot occur, within the truncation
  bound otherwise.
- `tb_stap_cg_workload` is a small STAP weight solve at the default sizes. The
  testbench acts as the host. It estimates a 6×6 complex covariance from 24
  snapshots on the multiply-and-accumulate side, then runs conjugate gradient
  with every inner product on the multiply-and-add side. A complex inner product
  is done as two real ones of twice the length. The weights must match a
  double-precision direct solve. They agree to about 1e-4, which is the 16-bit
  mantissa precision.
- `tb_stap_coproc_top` runs both co-processors at their default sizes, on
  separate clocks at once. It counts how often each mechanism occurs:
  renormalisation, zero injection on input gaps, vectors shorter than the pipe,
  drains, admission stalls and operand-set assembly. It fails if any of them
  never happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/stap_pkg.sv tb/tb_stap_ref_pkg.sv tb/tb_stap_coproc_top.sv \
  --top-module tb_stap_coproc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every testbench finishes in well
under a second.

Lint one module with:

```
verilator --lint-only -Wall -Irtl rtl/stap_pkg.sv rtl/<module>.sv --top-module <module>
```

The remaining lint warnings are expected:

- the unused reserved bit 35 of the input word
- the discarded low 16 product bits
- reset used both in the flops and in the assertions' `disable iff`

## Changing it

- `ACC_W` (in `mac_coproc` and `mac_accumulator`) changes the accumulator width,
  and with it the number of adder stages, S, and the number of partial sums. The
  result word must still fit: `1 + clog2(S+1) + EXP_W + ACC_W ≤ 36`.
- `PROD_W` keeps more product bits. Widen `ACC_W`/`ADD_W` to match.
- `BUF_DEPTH` sets both FIFOs of a co-processor. The MAC needs at least S.
