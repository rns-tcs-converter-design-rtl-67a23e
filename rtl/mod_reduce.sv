// mod_reduce: two-operand modulo-M addition with inputs below M each
// ("ternary addition" of the converter).
//
// Computes n = | hm + low |_M for hm < M (output of the modulo-M generator)
// and low < M (low-order segment of the projection sum). Since
// hm + low < 2M, one conditional subtraction of M suffices:
//   BA1:  s = hm + low
//   BA2:  d = hm + low - M          (two's complement, W = M_W + 1 bits)
//   MUX:  n = (d < 0) ? s : d       (select on the sign bit of d)
// PARALLEL selects how BA2 gets its operands:
//   1  (default) a carry-save adder first compresses hm, low and -M into two
//      vectors, so BA1 and BA2 are two carry-propagate adders side by side
//      and the delay is one adder plus a CSA cell and the multiplexer;
//   0  BA2 adds -M to the output of BA1, two adders in series.
// Both give the same result. Purely combinational.
// Both forms come from the converter design; reading BA2's carry as the
// sign bit of a 39-bit two's-complement sum is this implementation's reading.
module mod_reduce
#(
  parameter longint unsigned M_RNG    = rns_pkg::M_RANGE,
  parameter int unsigned     M_W      = rns_pkg::M_W,
  parameter int unsigned     LOW_W    = rns_pkg::LOW_W,
  parameter bit              PARALLEL = 1'b1
) (
  input  logic [M_W-1:0]   hm_i,
  input  logic [LOW_W-1:0] low_i,
  output logic [M_W-1:0]   n_o,
  output logic             wrapped_o   // 1 when M was subtracted
);

  localparam int unsigned W = M_W + 1;
  localparam logic [W-1:0] NEG_M = W'(-longint'(M_RNG));

  logic [W-1:0] s_ba1, d_ba2, cs_sum, cs_carry;

  csa #(.W(W)) u_csa (
    .a_i    (W'(hm_i)),
    .b_i    (W'(low_i)),
    .c_i    (NEG_M),
    .sum_o  (cs_sum),
    .carry_o(cs_carry)
  );

  always_comb begin
    s_ba1 = W'(hm_i) + W'(low_i);
    if (PARALLEL) d_ba2 = cs_sum + cs_carry;
    else          d_ba2 = s_ba1 + NEG_M;
    wrapped_o = ~d_ba2[W-1];
    n_o       = wrapped_o ? d_ba2[M_W-1:0] : s_ba1[M_W-1:0];
  end

endmodule
