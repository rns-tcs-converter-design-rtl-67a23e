// rns_tcs_converter: pipelined residue number system (RNS) to two's-complement
// (TCS) converter based on the Chinese Remainder Theorem (CRT I).
//
// Input is one RNS word: eight residues, res_i[k] being the residue modulo
// MODULI[k] of rns_pkg (17, 19, 23, 25, 27, 29, 31, 32). Output is the signed
// integer X in [-M/2, M/2) with that residue vector, M = 144 259 293 600,
// on X_W = 39 bits.
//
// Datapath, one pipeline stage per line:
//   1  LT_1..LT_8   (proj_lut)  look up the orthogonal projections N_j
//   2  mBA          (mba)       S = sum of N_j, one 42-bit binary vector
//   3  LT_N+1       (modm_lut)  | S_H * 2^37 |_M for the 5 high bits S_H;
//                               the 37 low bits S_L travel alongside
//   4  ternary add  (mod_reduce) N = | LT_N+1 + S_L |_M, both inputs < M
//   5  BA3/BA4/MUX  (sign_select) X = N, or N - M when N >= M/2
// The segment split makes the wide modulo-M reduction cheap: S_L < M and the
// table output is < M, so their sum is < 2M and needs one conditional
// subtraction. PARALLEL_RED chooses the carry-save form of that subtraction
// (two adders side by side, default) or two adders in series.
//
// Timing: fully pipelined, one conversion per clock. A word presented with
// in_valid_i high at a rising edge appears on x_o with out_valid_o high
// LATENCY = 5 edges later, with neg_o
// flagging a negative result. There is no back-pressure. rst_n is an
// asynchronous, active-low reset that clears all pipeline registers.
// The datapath and widths follow the converter design; the pipeline cut
// points, the valid signal and the reset are this implementation's choice.
module rns_tcs_converter
  import rns_pkg::*;
#(
  parameter bit PARALLEL_RED = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid_i,
  input  logic [N_MOD-1:0][RES_W-1:0]  res_i,
  output logic                         out_valid_o,
  output logic signed [X_W-1:0]        x_o,
  output logic                         neg_o
);

  localparam int unsigned LATENCY = 5;

  logic [LATENCY-1:0]            vld_q;
  logic [N_MOD-1:0][M_W-1:0]     proj;
  logic [SUM_W-1:0]              sum_c, sum_q;
  logic [M_W-1:0]                hmod;
  logic [LOW_W-1:0]              low_q;
  logic [M_W-1:0]                n_c, n_q;
  logic                          wrapped;   // reduction subtracted M; observed in simulation only
  logic signed [X_W-1:0]         x_c;
  logic                          neg;

  // Stage 1: projection tables, one per modulus.
  for (genvar k = 0; k < N_MOD; k++) begin : g_lt
    proj_lut #(
      .MOD  (MODULI[k]),
      .M_RNG(M_RANGE),
      .IN_W (RES_W),
      .OUT_W(M_W)
    ) u_lt (
      .clk   (clk),
      .rst_n (rst_n),
      .en_i  (1'b1),
      .res_i (res_i[k]),
      .proj_o(proj[k])
    );
  end

  // Stage 2: multi-operand binary adder.
  mba #(
    .N_OPS(N_MOD),
    .IN_W (M_W),
    .OUT_W(SUM_W)
  ) u_mba (
    .op_i (proj),
    .sum_o(sum_c)
  );

  // Stage 3: modulo-M generator for the high segment; low segment delayed.
  modm_lut #(
    .M_RNG (M_RANGE),
    .HIGH_W(HIGH_W),
    .LOW_W (LOW_W),
    .OUT_W (M_W)
  ) u_ltn1 (
    .clk   (clk),
    .rst_n (rst_n),
    .en_i  (1'b1),
    .high_i(sum_q[SUM_W-1:LOW_W]),
    .mod_o (hmod)
  );

  // Stage 4: reduction from [0, 2M) to [0, M).
  mod_reduce #(
    .M_RNG   (M_RANGE),
    .M_W     (M_W),
    .LOW_W   (LOW_W),
    .PARALLEL(PARALLEL_RED)
  ) u_red (
    .hm_i     (hmod),
    .low_i    (low_q),
    .n_o      (n_c),
    .wrapped_o(wrapped)
  );

  // Stage 5: sign recovery.
  sign_select #(
    .M_RNG(M_RANGE),
    .M_W  (M_W)
  ) u_sign (
    .n_i  (n_q),
    .x_o  (x_c),
    .neg_o(neg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      sum_q <= '0;
      low_q <= '0;
      n_q   <= '0;
      x_o   <= '0;
      neg_o <= 1'b0;
    end else begin
      vld_q <= {vld_q[LATENCY-2:0], in_valid_i};
      sum_q <= sum_c;
      low_q <= sum_q[LOW_W-1:0];
      n_q   <= n_c;
      x_o   <= x_c;
      neg_o <= neg;
    end
  end

  assign out_valid_o = vld_q[LATENCY-1];

endmodule
