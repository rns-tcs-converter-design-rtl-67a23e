# Pipelined RNS to two's-complement converter (CRT I)

A residue number system (RNS) stores an integer as its remainders modulo a
set of small, pairwise co-prime moduli. Addition and multiplication then work
digit by digit with no carries between digits, but getting an ordinary
binary number back is hard. This design does that conversion in hardware.
It takes eight 5-bit residues for the base

    B = {17, 19, 23, 25, 27, 29, 31, 32},   M = 17*19*23*25*27*29*31*32 = 144 259 293 600

(37.07 bits of range) and returns the signed integer X in [-M/2, M/2) as a
39-bit two's-complement word. It is fully pipelined: one conversion per
clock, with a latency of 5 clocks.

## How the conversion works

By the Chinese Remainder Theorem, the unsigned value N in [0, M) with
residues n_j is

    N = | N_1 + N_2 + ... + N_8 |_M,     N_j = M_j * | M_j^-1 * n_j |_(m_j),   M_j = M / m_j

Each term N_j (the *orthogonal projection* of lane j) depends only on that
lane's residue. It can therefore be read from a small table with m_j entries
instead of being computed. Then only two problems remain: adding eight 38-bit
numbers, and reducing that sum modulo M, which is not a power of two.

### The modulo-M reduction (the hard part)

The sum S of the eight projections is below 8M < 2^41. The design splits S at
bit 37:

    S = S_H * 2^37 + S_L,     S_H = S[41:37] (5 bits),   S_L = S[36:0]

The split point is chosen so that 2^37 - 1 < M, so S_L < M. The high segment
can take only a handful of values, so a second table (`modm_lut`, called
LT_N+1) maps it directly to |S_H * 2^37|_M, which is also below M. The two
numbers left to add are both below M. Their sum is below 2M, so a single
conditional subtraction finishes the job:

    BA1:  s = LT_N+1(S_H) + S_L
    BA2:  d = LT_N+1(S_H) + S_L - M
    MUX:  N = (d < 0) ? s : d

Done directly, BA2 has to wait for BA1. `mod_reduce` avoids this by default
(`PARALLEL = 1`). A 3:2 carry-save adder first folds the three operands
LT_N+1(S_H), S_L and -M into two vectors. BA1 and BA2 then run side by side.
The critical path becomes one carry-propagate adder plus a full-adder cell
and the multiplexer, instead of two adders. With `PARALLEL = 0` the two
adders are chained. Both forms give the same result, and both are tested.

All of this arithmetic is 39-bit two's complement. The sign bit of BA2 is
the "carry" that steers the multiplexer.

### Recovering the sign

N in [0, M) is read as a signed number. The upper half of the range stands
for negative values:

    X = N        if N <  M/2
    X = N - M    if N >= M/2

`sign_select` computes N - M/2 (BA3) and N - M (BA4) in parallel. The sign
of BA3 picks the result. N = M/2 maps to -M/2, so the output range is exactly
[-M/2, M/2). With a strict `N > M/2` comparison, N = M/2 would instead come
out as +M/2, and the range would be (-M/2, M/2]. For an odd M the threshold becomes
(M-1)/2.

## Pipeline and interface

| stage | module         | work                                           | register |
|-------|----------------|------------------------------------------------|----------|
| 1     | `proj_lut` x 8 | projection look-up, one table per modulus      | table read register |
| 2     | `mba`          | 8-operand binary sum, 42 bits                  | `sum_q`  |
| 3     | `modm_lut`     | \|S_H * 2^37\|_M look-up; S_L delayed alongside | table read register, `low_q` |
| 4     | `mod_reduce`   | reduction from [0, 2M) to [0, M)               | `n_q`    |
| 5     | `sign_select`  | TCS value and sign                             | `x_o`, `neg_o` |

Top module: `rns_tcs_converter`.

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | clock |
| `rst_n`       | in  | 1     | asynchronous active-low reset; clears all pipeline registers |
| `in_valid_i`  | in  | 1     | `res_i` carries a word this cycle |
| `res_i`       | in  | 8 x 5 | `res_i[k]` is the residue modulo `rns_pkg::MODULI[k]` (lane 0 = 17, lane 7 = 32) |
| `out_valid_o` | out | 1     | `x_o` is valid |
| `x_o`         | out | 39    | signed result |
| `neg_o`       | out | 1     | result is negative |

A word sampled with `in_valid_i` high at a rising edge appears on `x_o`,
with `out_valid_o` high, after the 5th rising edge that follows. There is no
back-pressure and no stall: the pipeline always advances, and the valid bit
only marks which outputs mean something. A residue code at or above its
modulus is not a residue. Its table reads 0, so the output is then
meaningless but harmless.

## Files

- `rtl/rns_pkg.sv`: the base, M, the word widths, and the elaboration-time
  functions (modular inverse, projection, log2) used to fill the tables.
- `rtl/proj_lut.sv`: one projection table. It is built from the formula
  above for any `MOD`, so changing the base means editing `MODULI` only.
- `rtl/mba.sv`: multi-operand adder, a balanced tree of two-operand adders.
- `rtl/modm_lut.sv`: the LT_N+1 table, entry h = |h * 2^37|_M.
- `rtl/csa.sv`: 3:2 carry-save adder.
- `rtl/mod_reduce.sv`, `rtl/sign_select.sv`: the final two stages.
- `rtl/rns_tcs_converter.sv`: the pipeline.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

All tables are computed at elaboration; there are no data files. For the base
above, the largest sum only reaches S_H = 8. All 32 LT_N+1 entries are still
built, so the table stays correct for any input code.

## Where this departs from, or fills in, the underlying design

- The pipeline cut points, the valid bit, the reset and the registered table
  reads are choices made here. The converter's description gives the
  datapath, not its timing. Five stages is a conservative cut: each stage
  holds at most one carry-propagate adder (stage 2 holds a three-level adder
  tree).
- The 8-operand sum is a single binary adder tree rather than a carry-save
  tree, as in the high-level-synthesis version of the converter. The tree
  shape is a choice made here.
- The split S_L = 37 bits, S_H = 5 bits of a 42-bit sum follows the detailed
  version of the design. A 38-bit S_L would not guarantee S_L < M.
- At N = M/2 the output is -M/2 (see "Recovering the sign").

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv \
        tb/tb_rns_tcs_converter.sv --top-module tb_rns_tcs_converter
    ./obj_dir/Vtb_rns_tcs_converter

- `tb_proj_lut` checks every entry of all eight tables by the CRT property
  (below M, equal to n mod its own modulus, 0 mod every other modulus). It
  also compares the modulus-17 table with its known values, starting
  0, 67 886 726 400, 135 773 452 800, ...
- `tb_modm_lut`, `tb_mba`, `tb_csa`, `tb_mod_reduce` and `tb_sign_select`
  compare against 64-bit reference arithmetic. They use random operands plus
  the boundary cases, with both forms of `mod_reduce`.
- `tb_rns_tcs_converter` runs the top at its default parameters. It sends
  20 008 signed integers through the converter, each as its residues: the
  range ends, 0 and ±1, then random values, with random idle cycles and long
  back-to-back bursts. It checks every result, the sign flag and the exact
  5-cycle latency. It also counts, and requires, both outcomes of the
  modulo-M selection, a non-zero high segment, negative and non-negative
  results, idle cycles and back-to-back words. It runs in well under a second.

The design has been linted with Verilator (`--lint-only -Wall`) and
elaborated with Yosys through its slang front end. The remaining
Verilator warnings are expected. They concern package constants that a
given module does not use, and the reduction stage's `wrapped` flag, which
the top leaves unconnected and only the testbench observes.
