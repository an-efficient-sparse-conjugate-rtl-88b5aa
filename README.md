# Sparse conjugate-gradient processor with a Beneš permutation network

This is SystemVerilog RTL for a statically scheduled processor that runs the
conjugate-gradient (CG) method on a sparse symmetric positive-definite system
`A x = b` in IEEE-754 single precision. It follows the architecture of "An
Efficient Sparse Conjugate Gradient Solver Using a Beneš Permutation Network".
That design has 128 processing elements (PEs). Each PE has two local memories.
A banked vector memory holds the search direction `p`, and a Beneš network
carries any bank to any PE. An adder tree and a special processing element
(SPE) handle reductions, division and the convergence test. Every cycle, a
control word precomputed on the host tells each unit what to do.

## Blocks (`rtl/`)

| File | Role |
|---|---|
| `cg_pkg.sv` | Shared types, opcodes, default sizes and the float rounding/packing function |
| `pipe_delay.sv`, `pipe_delay_v.sv` | Delay lines for data and for valid flags |
| `fp_add.sv`, `fp_mul.sv`, `fp_div.sv` | Single-precision add/sub (16 cycles), multiply (30) and divide (30) |
| `benes_switch.sv`, `benes_network.sv` | Recursive Beneš network: (2·log2 N − 1)·N/2 switches, one control bit each |
| `vector_memory.sv` | N_PE banks, one read per bank per cycle, sequential writes of N_dup rotated copies of `p` |
| `register_file.sv` | α, β, rs_old, rs_new, and a broadcast of one of them to all PEs |
| `pe.sv` | Multiplier, adder with partial-sum feedback, LMA (r, x) and LMB (Ap, new p) |
| `adder_tree.sv` | Sums the products of all PEs each cycle; latency log2(N_PE)·16 |
| `spe.sv` | Serial reduction (one accumulator plus log2(16) pairwise stages), division, threshold compare |
| `cg_top.sv` | Wires everything together and applies the control word |

Defaults are the configuration the paper builds: 128 PEs, local memories of
844 words, vector banks of 563 words, and latencies of 16/30/30 cycles.

## How a CG iteration runs

The host streams one control word per cycle, with `in_valid` set. A cycle
with `in_valid` low is a bubble: every pipeline, memory and counter holds its
state, so late data from memory costs time but never correctness.

1. **SpMV `Ap = A p`.** Each PE owns a set of rows. Its rows are split into
   16 groups, one per adder pipeline slot. Each cycle, each PE multiplies one
   nonzero by a `p` element and adds the result to the partial sum coming back
   out of its adder. The op codes FIRST, MAC, LAST, FIRST+LAST and STALL say
   how. The vector memory reads one address per bank and the Beneš network
   routes bank to PE. Both are set per cycle by the host's schedule
   (Algorithm 2 of the paper), which avoids bank conflicts or inserts stalls.
   Finished rows are written into LMB in completion order.
2. **`p'Ap`**: the PE products go to the adder tree, and the SPE reduces the
   tree's output stream. **α = rs_old / p'Ap** comes from the SPE divider.
3. **`x += α p`, `r −= α Ap`**, with α broadcast from the register file.
4. **`rs_new = r'r`**, followed by the threshold test that raises `done`.
5. **β = rs_new / rs_old.** Then **`p = r + β p`** is computed into LMB and
   copied into the vector memory N_dup times, rotated one bank per copy.

The host must leave gaps between dependent phases: the write-back latency of
the PE, the tree and reduction latency, and the copy latency before the next
SpMV. The copy latency is 4 cycles: the PE copy output is 2 cycles, the write
enable delay matches it, and the memory write adds 1. Without that gap, the
first SpMV reads return the previous iteration's `p`. The end-to-end testbench shows one valid schedule.

## Design choices not fixed by the paper

- Floating point rounds to nearest even and flushes subnormals to zero. Each
  unit is one combinational stage followed by a delay line of the paper's
  latency.
- The PE opcode is 4 bits, and each PE gets its own opcode. There are 16
  operations, including load b/x0, read x, and an initial `p = r`.
- Inside each PE, counters generate the local addresses. LMA keeps r in its
  lower half and x in its upper half.
- Row i, and entries i of r, x and p, belong to the PE whose vector bank
  holds p_i. This keeps Ap_i in the same PE as r_i. The published heuristic
  instead lets any idle PE take the next row from one global list. Here,
  rows are still scheduled heaviest first, but only within their own PE's
  list.
- Copy d of bank b's part of `p` is stored in bank (b+d) mod N_PE, at offset
  d·rows.
- The Beneš network uses one bit per 2×2 switch. Its control is registered
  one cycle to line up with the vector-memory read.
- The divider operands are chosen by the broadcast select: rs_new/rs_old for
  β, and rs_old/p'Ap otherwise.

## Limits

With r and x sharing LMA, a PE holds at most 422 rows. So the default build
takes N ≤ 54 016, with 563/(N/128) copies of `p`. The original design claims
72K without duplication, a limit set by the vector memory alone. Of the paper's benchmark
matrices, `cant` and `crankseg_2` are larger than that. The scheduler, the
DRAM controller and the host link are not hardware in this repository. The
testbench contains a behavioural model of the scheduler.

## Tests (`tb/`)

Each block has a self-checking testbench, `tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M`, and checks exact cycle latencies where the
paper gives them. `fp_ref_pkg.sv` provides a real-number reference.
`cg_host_tb.sv` is the test host. It builds a random SPD system, computes the
index allocation, the group split, the Algorithm 2 schedule and the Beneš
settings, and streams whole CG solves with random bubbles. It compares α,
rs_new and the final x with a double-precision CG. It also counts stalls,
duplicate-copy reads, single-nonzero rows, bubbles and convergence.

- `tb_cg_top`: 8 PEs.
- `tb_cg_top_full`: the default 128-PE configuration, N = 512.

Run with Verilator, for example:

    verilator --binary --top-module tb_cg_top tb/fp_ref_pkg.sv rtl/cg_pkg.sv -y rtl -y tb tb/tb_cg_top.sv
