// sign_select: maps a CRT result N in [0, M) to its two's-complement value.
//
// N at or above the threshold T (T = M/2 for even M, (M-1)/2 for odd M)
// stands for the negative number N - M; below it N is itself:
//   BA3:  t = N - T        its sign bit is the selection signal
//   BA4:  x_d = N - M
//   MUX:  x = (t < 0) ? N : x_d
// The output is X_W = M_W + 1 bits wide and signed. Purely combinational.
// The structure follows the converter design. At N = M/2 exactly this
// module gives -M/2, matching the usual definition of the signed range
// [-M/2, M/2); a strict N > M/2 comparison would return +M/2 there instead.
module sign_select
#(
  parameter longint unsigned M_RNG = rns_pkg::M_RANGE,
  parameter int unsigned     M_W   = rns_pkg::M_W
) (
  input  logic [M_W-1:0]        n_i,
  output logic signed [M_W:0]   x_o,
  output logic                  neg_o     // 1 when the value is negative
);

  localparam int unsigned  W      = M_W + 1;
  localparam logic [W-1:0] NEG_T  = W'(-longint'(M_RNG / 2));
  localparam logic [W-1:0] NEG_M  = W'(-longint'(M_RNG));

  logic [W-1:0] t_ba3, x_ba4;

  always_comb begin
    t_ba3 = W'(n_i) + NEG_T;
    x_ba4 = W'(n_i) + NEG_M;
    neg_o = ~t_ba3[W-1];
    x_o   = neg_o ? signed'(x_ba4) : signed'(W'(n_i));
  end

endmodule
