// mba: multi-operand binary adder (mBA) of the converter.
//
// Adds N_OPS unsigned operands of IN_W bits into one OUT_W-bit sum. The
// operands are the orthogonal projections N_1..N_n, each below M, so the sum
// is below n*M and OUT_W must cover ceil(log2(n*M)). Unlike a carry-save tree,
// the result is a single non-redundant binary vector, which is then split
// into a high and a low segment by the caller.
//
// The adder is a balanced tree of two-operand adders (log2(N_OPS) levels)
// rather than a chain, a design choice that shortens the critical path and
// gives the same sum. Purely combinational.
// Summing the projections as one binary vector (instead of a carry-save
// tree) follows the converter design; the 42-bit sum width is its own.
module mba #(
  parameter int unsigned N_OPS = 8,
  parameter int unsigned IN_W  = 38,
  parameter int unsigned OUT_W = 42
) (
  input  logic [N_OPS-1:0][IN_W-1:0] op_i,
  output logic [OUT_W-1:0]           sum_o
);

  // Tree levels: level 0 holds the operands and level l holds the
  // ceil(N_OPS / 2^l) pairwise sums of level l-1; an element without a
  // partner is passed on unchanged.
  localparam int unsigned LEVELS = (N_OPS <= 1) ? 1 : $clog2(N_OPS) + 1;

  function automatic int unsigned count_at(int unsigned l);
    return (N_OPS + (1 << l) - 1) >> l;
  endfunction

  logic [LEVELS-1:0][N_OPS-1:0][OUT_W-1:0] lvl;

  always_comb begin
    lvl = '0;
    for (int unsigned i = 0; i < N_OPS; i++) lvl[0][i] = OUT_W'(op_i[i]);
    for (int unsigned l = 1; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < count_at(l); i++) begin
        if (2 * i + 1 < count_at(l - 1)) lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else                             lvl[l][i] = lvl[l-1][2*i];
      end
    end
    sum_o = lvl[LEVELS-1][0];
  end

endmodule
