# Collatz verification coprocessors on FPGA DSP slices

This RTL checks the Collatz conjecture exhaustively over ranges of 64-bit
(and up to 78-bit) start values. Start from any positive n. If n is even,
halve it. If it is odd, replace it with 3n+1. The conjecture says that
repeating this always reaches 1. A number m is settled once its trajectory
drops below m, because every smaller number has already been checked.

The hardware has many small, independent coprocessors. Each one walks
through one block of 2^32 consecutive numbers. The design is built around
two ideas:

* **Several Collatz steps in one multiply-add.** Write n = 2^10·n_H + n_L. Ten
  halvings, together with all the 3n+1 steps met on the way, turn n into
  B[n_L]·n_H + C[n_L]. The two 1024-entry tables B and C depend only on
  the low 10 bits. One multiply-add therefore does about 15 Collatz steps on
  average.
* **A wide number through a narrow multiplier.** The interim value may grow to
  112 bits. One 17×17-bit DSP multiplier handles it by working through n_H in
  17-bit digits, least significant first, with the carry passed on inside the
  DSP's accumulator. A k-digit operand takes k clocks. No wide multiplier is
  needed, and short numbers finish sooner.

Most start values need no work at all. For about 96% of the possible low
15 bits, any number ending in those bits falls below itself within its first
ten halvings. Only the 1295 "mandatory" 15-bit residues, held in table S,
are ever started.

The default configuration is a system of 380 coprocessors. They are arranged
in pairs, and each pair shares two dual-ported table RAMs.

## Arithmetic behind the tables

Track the value symbolically as n = b·n_H + c. Start with b = 2^d and
c = n_L (d = 10 for B/C, d = 15 for S). Then repeat:

* c odd: b ← 3b, c ← 3c + 1 (a 3n+1 step; b is even, so the parity of n is
  the parity of c);
* c even: b ← b/2, c ← c/2 (a halving).

Stop once d halvings have been done, which is when b = 3^j is odd. Then
B[n_L] = b and C[n_L] = c. With d = 10, B ≤ 3^10 = 59049, so B and C both
fit in 16 bits. The B/C RAM stores the 32-bit word {C, B} at address n_L.

A residue is **mandatory** if b never drops below 2^d during this walk. If b
ever does drop below 2^d, then b·n_H + c < 2^d·n_H ≤ n at that point, so the
trajectory has already fallen below its start. For d = 15 there are exactly
1295 mandatory residues; for d = 4 there are three: 0111, 1011 and 1111.

Both RAMs get their contents from an `initial` block that runs this walk, in
`collatz_pkg::walk_rules`. On an FPGA this corresponds to block-RAM initial
values. No data file is needed.

## One coprocessor

```
 host: M (46b) ─┐
 counter m_H (17b) ─┤ m = {M, m_H, S[i]}  (78b)   ┌──────────────┐
 counter i ─► S RAM ─┘        │                    │ B/C RAM      │
                              ▼                    │ {C,B}[n_L]   │
                    ┌───────── n register ─────────┤◄── n_L (10b) │
                    │ n_L(10) + 6 digits of 17b    └──────┬───────┘
                    │        digit n_j (17b)              │ B, C (16b)
                    │              ▼                      ▼
                    │      dsp_mac: P ← A·B + C  |  P ← A·B + P_H
                    └──── re-slice ◄── P_L (17b per clock), final P_H
```

* `m_generator` produces the start values in order. The 17-bit counter m_H
  is the outer loop and the 11-bit counter i (0 … 1294) the inner loop, so
  m = M·2^32 + m_H·2^15 + S[i]. Only mandatory values are produced.
* `table_op_unit` holds n and performs one table operation
  n ← B[n_L]·n_H + C[n_L] per request.
* `collatz_coproc` loads n ← m and runs table operations while n ≥ m. When
  n < m it moves on to the next m. If a result needs more than 112 bits, it
  reports m to the host on `ovf_valid`/`ovf_m`, drops it, and goes on. The
  host is expected to check such values in software with unbounded integers.
  At 112 bits this should practically never happen for 64-bit start values.

## The digit-serial table operation (the hard part)

n_H has up to six 17-bit digits n_0 … n_5. Let k be the number of digits in
use: the index of the highest non-zero digit plus one. k is latched when the
operation starts. The operation then runs as follows:

| clock | action |
|---|---|
| 0 | B/C RAM is read at address n_L |
| 1 | dsp_mac gets A = n_0, B, C; operation P ← A·B + C |
| 1+j, j = 1 … k−1 | dsp_mac gets A = n_j; operation P ← A·B + P_H |
| 4+j | P_L is result digit p_j; for the last digit, P_H is also p_k |
| k+4 | `done`: n holds the new value; the next operation may start in this clock |

`dsp_mac` models the part of a DSP48E1 slice that is used. It has input
registers on A, B and C, a product register and the P register, so a result
appears three clocks after its operands. P_H = P >> 17 is fed back to the
adder, and that is how the carry passes from one digit to the next.

The result digits p_0 … p_k are aligned to 17-bit boundaries of the product.
The next operation, however, needs n_L = p[9:0] and n_H digits that start at
bit 10. As each p_i leaves the slice, a 7-bit carry register re-slices it:

* new n_L = p_0[9:0];
* new digit i−1 = {p_i[9:0], p_{i−1}[16:10]};
* the last digit and the one above it are built from P_H of the last step.

The new digits are written into the same six registers. Digit i−1 is
overwritten three clocks after digit i was issued, so nothing is overwritten
before it has been used. If p_k has bits at or above bit 112 of the result,
`ovf` is raised together with `done`.

An operation on k digits therefore takes k+4 clocks, and operations follow
each other with no gap. A 64-bit start value has n_H of 54 bits, which is
4 digits.

## Sharing RAMs: pairs and the 380-coprocessor system

Each coprocessor reads one port of an S RAM (2k × 15) and one port of a B/C
RAM (1k × 32). `coproc_pair` puts two coprocessors on the two ports of the
same two RAMs: coprocessor 0 uses port A and coprocessor 1 uses port B. The
system therefore needs one block RAM per coprocessor. `collatz_multi` holds
`N_COPROC/2` pairs (190 by default). Nothing is shared between pairs, and
every coprocessor's host signals are separate array ports:

| port | width | meaning |
|---|---|---|
| `start[c]`, `m_block[c]` | 1, 46 | begin block M = `m_block[c]` (while `busy[c]` is low) |
| `busy[c]` | 1 | block in progress |
| `done[c]` | 1 | one-clock pulse after the last value of the block |
| `ovf_valid[c]`, `ovf_m[c]` | 1, 78 | one-clock report of a start value whose trajectory outgrew 112 bits |

There is no back-pressure on the overflow report. The host must capture it
in the clock it appears. All coprocessors share one clock and one
synchronous, active-high reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_COPROC` | 380 | coprocessors in the system (even) |
| `M_W` | 46 | width of the block number M |
| `MH_W` | 17 | width of the m_H counter; a block has 2^(MH_W+15) numbers |
| `N_DIGITS` | 6 | 17-bit digits of n_H; the interim width is 10 + 17·N_DIGITS = 112 |
| `collatz_pkg::D_BC`, `BC_W` | 10, 16 | base bits and word width of the B/C table |
| `collatz_pkg::D_S`, `S_COUNT` | 15, 1295 | base bits of S and number of mandatory residues |

The testbenches shrink `MH_W`, `M_W`, `N_DIGITS` and `N_COPROC` so that
whole blocks finish in seconds. They do not change the tables.

## Where this RTL makes its own choices

The arithmetic, the table sizes, the digit algorithm, the 1+3-stage pipeline,
the six 17-bit digit registers, the 78-bit start value and the RAM sharing
follow the published design. The following are this implementation's own
choices:

* **Scheduling.** Operations run strictly one after another, each taking k+4
  clocks, and the n < m test uses the finished result. On 64-bit start
  values a mandatory value needs 3.73 operations of about 3.94 digits on
  average, and the measured rate is 0.85 numbers per clock (skipped numbers
  included), or 3.1·10^8 numbers/s at 360 MHz. The published figure for one
  coprocessor is 4.99·10^8 numbers/s at 360.49 MHz, 1.38 numbers per clock.
  That is exactly what k+1 clocks per operation with no other overhead
  gives, i.e. the clock count of the digit algorithm alone (one clock for the
  first digit, one per further digit, one for the top digit). Reaching it
  needs the pipeline latency of one operation hidden behind the next, for
  example by starting the next B/C read as soon as the low result digit
  leaves the DSP slice and cancelling that operation if the finished result
  turns out to be below m. No such scheme is published, and this RTL does not
  implement one.
* **Stopping rule for B/C.** The walk stops after exactly d halvings, even if
  c is then odd. This matches the published 4-bit example table and the
  16-bit word size.
* **S table size.** The S RAM has 2048 words and an 11-bit index, enough for
  1295 entries.
* **Handshakes.** The start/done handshake, the overflow report, the
  valid/ready link between `m_generator` and the coprocessor, and the reset
  are this implementation's own. No host link (bus or protocol) is provided.
* **DSP model.** In `dsp_mac` the operation select moves down the pipeline
  together with its operands. C passes one register stage while the product
  passes two. So C, which is loaded with the first digit, must stay put for
  one more clock, and two multiplications cannot start less than two clocks
  apart. The coprocessor always keeps them at least five clocks apart.
* **Block number M = 0** is not meaningful. Start values below 2^32 can cycle
  through 4, 2, 1.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model in
`tb/collatz_ref_pkg.sv` applies the plain Collatz map (3n+1, n/2) on
128-bit values, grouped into runs of ten halvings. It never uses the B/C/S
tables, so the tables are checked independently.

| testbench | what it shows |
|---|---|
| `tb_s_table_ram` | all 1295 S entries in order on both ports; the 4-bit table {0111, 1011, 1111}; one-clock latency |
| `tb_bc_table_ram` | all 1024 {C,B} words against the Collatz map (n = r gives C, n = 1024+r gives B+C); the 16-entry 4-bit table |
| `tb_dsp_mac` | random multiply-add chains against a model; three-clock latency |
| `tb_table_op_unit` | 112-bit operations with 1 to 6 digits, back to back; `done` exactly k+4 clocks after start; overflow exactly when the result exceeds 112 bits |
| `tb_m_generator` | the complete start-value sequence under random back-pressure; one value per clock |
| `tb_collatz_coproc` | whole blocks at 27-bit width (mostly overflow) and 61-bit width (multi-digit); overflow reports, operation count and exact clock count |
| `tb_coproc_pair` | two coprocessors on shared RAMs, started at different times |
| `tb_collatz_multi` | four coprocessors end to end; counts repeated operations, next-value loads, overflow reports, multi-digit operations and simultaneous reads of both ports of a shared RAM, and fails if any of these never happens |
| `tb_workload_64bit` | 64-bit start values with random 32-bit M at full 112-bit width (m_H cut to 3 bits, its upper bits random); exact clock count; prints the throughput |
| `tb_collatz_multi_default` | the 380-coprocessor system with every parameter at its default, for 20,000 clocks; operation counts per coprocessor |

One complete block at the default sizes is 2^32 numbers, about 5·10^9
clocks per coprocessor, which is too long to simulate. The largest complete
runs here are full-width coprocessors over 2^18 numbers each
(`tb_workload_64bit`) and the four-coprocessor system over 2^16 numbers per
coprocessor (`tb_collatz_multi`). The 380-coprocessor default itself is run
by `tb_collatz_multi_default` for 20,000 clocks only: every coprocessor
starts, none reports an overflow or finishes early, every one starts between
2,000 and 4,000 table operations, and for the first four the count matches
the reference timing of k+4 clocks per operation to within one.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_collatz_multi \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/collatz_pkg.sv tb/collatz_ref_pkg.sv tb/tb_collatz_multi.sv
./obj_dir/Vtb_collatz_multi
```

Replace `tb_collatz_multi` with any other testbench name.

The tables are filled by an `initial` block that loops over all 32768
residues. Tools that must evaluate such blocks at elaboration time, such as
some synthesis flows, may hit their evaluation-step limits. For those flows,
raise the limit or load the same contents from a memory file generated with
the walk described above.
