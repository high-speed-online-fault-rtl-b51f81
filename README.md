# Online fault detection for a 64-bit ripple carry adder by Modified Modular Redundancy

A 64-bit ripple carry adder built from sixteen identical 4-bit cells already
contains redundant hardware: whenever two cells happen to receive the same
4-bit slices of `a` and `b`, they must produce the same result, apart from a
difference of one caused by their carry-ins. Modified Modular Redundancy (MMR)
uses that. An external comparator marks such a pair of cells in a 16-bit
word `cel`. The checker picks the two cells' results, corrects for the
carry-in difference, and compares them with a two-rail checker. A single
stuck-at fault in either cell shows up as a mismatch during normal
operation. Unlike dual modular redundancy (DMR), this needs no second adder.
The price is that a cell is only tested when the operands give it a twin.

The RTL is plain combinational SystemVerilog with no clock. The adder width
is the parameter `N` (default 64, any multiple of 4 from 8 up).

## Block diagram

```
 a,b,cin ──► ripple_carry_adder (N/4 × rca_cell4) ──► sum, cout
                    │ per-cell taps m_i = {c_i, sum[4i+3:4i], c_(i-1)}
        ┌───────────┴─────────────┐
 cel ─► priority_encoder(upper)   priority_encoder(lower) ◄─ cel
        │                         │
   cell_mux (m_1..m_15, 0 at 0)   cell_mux (m_0..m_14, 0 at 15)
        │ {res, cin_hi}           │ {res, cin_lo}
        ├─► add_one ─┐            ├─► add_one ─┐
        mux2 (sel1) ◄┘            mux2 (sel0) ◄┘      selection_logic(cin_hi, cin_lo)
        │                         │
   tri_buf ── tri_out1        tri_buf ── tri_out0     enable = carry_done & (cel != 0)
        │ inverted                │
        └──────► two_rail_tree ◄──┘ ──► fault1, fault0
```

## How a check works

**Cell taps.** Cell `i` adds `a[4i+3:4i]`, `b[4i+3:4i]` and its carry-in
`c_(i-1)` (`cin` for cell 0). Its tap is the 6-bit word
`m_i = {c_i, sum[4i+3:4i], c_(i-1)}`: a 5-bit result `{carry-out, sum}` and
the carry-in that produced it (`mmr_pkg::cell_tap_t`).

**Picking the pair.** `cel` has one bit per cell. The upper priority
encoder returns the highest set bit and the lower encoder the lowest. Each
drives a 16-to-1 multiplexer. The higher cell of a pair is never cell 0, so
input 0 of the upper multiplexer is tied to zero. Likewise the lower cell is
never cell 15, so that input of the lower multiplexer is tied to zero. If
`cel` marks more than two cells, the highest and lowest are compared. The
comparator must therefore mark exactly one pair, or a group of cells that
all have equal operands.

**Carry-in correction.** This is the subtle part. Two cells with equal
operands `x` and `y` give `x + y + cin_hi` and `x + y + cin_lo`:

| cin_hi | cin_lo | selection | compared values |
|---|---|---|---|
| 0 | 0 | sel1 = sel0 = 0 | res_hi vs res_lo |
| 1 | 1 | sel1 = sel0 = 0 | res_hi vs res_lo |
| 0 | 1 | sel1 = 1 | res_hi + 1 vs res_lo |
| 1 | 0 | sel0 = 1 | res_hi vs res_lo + 1 |

The carry-ins are compared with an XOR. When they differ, the result of the
cell whose carry-in was 0 passes through `add_one`. A 5-bit result with
carry-in 0 is at most 15 + 15 = 30, so the increment never wraps. The checker
therefore compares full 5-bit results, carry-out included. A fault on a
cell's carry-out is also caught this way, at the cell that produces it.

**Two-rail comparison.** The two corrected results go through enabled buffers
(`tri_out1` upper, `tri_out0` lower). The upper one is then inverted, so bit
`k` forms the rail pair `(tri_out0[k], ~tri_out1[k])`. When the results match,
every pair is complementary. `two_rail_tree` reduces the five pairs with
standard two-rail cells (`z0 = a0·b0 + a1·b1`, `z1 = a0·b1 + a1·b0`) to
`{fault1, fault0}`:

* complementary (`01` or `10`): no fault;
* equal (`00` or `11`): the two cells disagree, so a fault was detected.

Which complementary value appears depends on the data. For the result
`01011` it is `{fault1, fault0} = 01`.

**Enable.** The buffers are enabled only when `carry_done` is high and `cel`
is non-zero. Otherwise both buffer outputs are zero, and the checker reads
"no fault", which carries no information. `check_en` tells the user when the
fault outputs are meaningful.

## Ports of `mmr_rca`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | N | operands |
| `cin` | in | 1 | carry-in |
| `cel` | in | N/4 | marks the cell pair with equal `a` and `b` slices |
| `carry_done` | in | 1 | carry completion indication; tie to 1 in a synchronous system |
| `sum`, `cout` | out | N, 1 | the addition |
| `tri_out1`, `tri_out0` | out | 5 | corrected results of the upper and lower cell, 0 when disabled |
| `check_en` | out | 1 | `carry_done & (cel != 0)`: fault outputs are valid |
| `fault1`, `fault0` | out | 1 | equal values mean a fault |

Timing: everything is combinational. The longest path runs through the full
carry chain, then a 16-to-1 multiplexer, the incrementer, a 2-to-1
multiplexer, and three levels of two-rail cells. Register the inputs and
outputs as your system needs. For a 64-bit FPGA build, this arrangement was
reported at about 16 % more combinational delay than the bare adder, against
about 31 % for DMR.

## What lies outside this RTL

* **The comparator that writes `cel`.** Finding which cells have equal
  operands is left to software or other logic; `cel` is an input. The
  testbenches model it as "mark the first pair `(i, j>i)` whose `a` and
  `b` slices are both equal".
* **Carry completion logic.** The original design gates the checker with a
  carry completion signal, but leaves its construction open. Here it is
  the input `carry_done`.
* **Tri-state outputs.** Real tri-state buffers would float the checker
  inputs when disabled. These buffers drive zero, so the design stays two-state
  and synthesizable anywhere.

## Departures and choices to be aware of

* The 4-bit cell is a chain of full adders; `add_one` is a half-adder
  incrementer. The checker tree is a complete binary tree of two-rail
  cells. These are the simplest circuits that do the job; the
  architecture does not fix them.
* A disabled checker reports "no fault" (rails `00000`/`11111`) rather than
  an undefined value; use `check_en`.
* Coverage is data-dependent: a fault is found only while its cell is paired,
  and only if it changes that cell's 5-bit result. For example, a stuck-at-0
  on `sum[12]` is flagged only when the true bit is 1. A fault in the checker
  path itself (multiplexers, incrementer, encoders) is not covered by design.
* Number of cell pairs the comparator must consider, for reference: with `n`
  cells there are `2·n(n-1)/2` slice comparisons (12, 56, 240 and 992 for 16,
  32, 64 and 128 bits).

## Files

| file | contents |
|---|---|
| `rtl/mmr_pkg.sv` | widths and the `cell_res_t` / `cell_tap_t` structs |
| `rtl/rca_cell4.sv` | 4-bit ripple carry cell |
| `rtl/ripple_carry_adder.sv` | N-bit adder with per-cell carry-outs |
| `rtl/priority_encoder.sv` | upper (`HIGHEST=1`) and lower (`HIGHEST=0`) encoder |
| `rtl/cell_mux.sv` | 16-to-1 tap multiplexer |
| `rtl/add_one.sv`, `rtl/mux2.sv`, `rtl/selection_logic.sv` | carry-in correction |
| `rtl/tri_buf.sv` | enabled checker buffer |
| `rtl/two_rail_cell.sv`, `rtl/two_rail_tree.sv` | two-rail checker |
| `rtl/mmr_rca.sv` | top level |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_mmr_rca.sv` | end-to-end test at N = 64 with fault injection |
| `tb/tb_mmr_rca_sizes.sv`, `tb/mmr_rca_sweep.sv` | the same test at N = 16, 32 and 128 |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. The cell, incrementer, 2-to-1 multiplexer, buffer, selection
logic and checker tree are tested exhaustively. The adder, encoders and tap
multiplexer get corner cases and random vectors against a reference addition.

`tb_mmr_rca` runs 20,000 random vectors in which one cell slice is often
copied onto another. Operands, `cin`, and `carry_done` (held low 10 % of the time) are
random. For every vector it checks `sum`, `check_en`, both buffer outputs
and the checker verdict against a model. It then forces `sum[12]` (bit 0 of
cell 3) to 0 and runs 5,000 vectors that pair cell 3. The fault must be
flagged exactly when the true bit is 1. Two directed vectors cover specific
cases:

* cells 1 and 15 paired with result `01011` and no fault;
* cells 0 and 3 paired with the fault present.

The test counts each mechanism: idle, completion low, direct compare, upper
correction, lower correction, fault-free check and detected fault. It fails
if any of them never occurs.

Running a test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mmr_pkg.sv tb/tb_mmr_rca.sv --top-module tb_mmr_rca
./obj_dir/Vtb_mmr_rca
```

Every test finishes in well under a second.
