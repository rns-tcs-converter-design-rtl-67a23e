// tb_rns_tcs_converter: end-to-end, self-checking testbench of the converter
// at its default parameters.
//
// Picks signed integers X in [-M/2, M/2), forms their residues modulo
// 17, 19, 23, 25, 27, 29, 31 and 32 here, and streams them into the
// converter, with random idle cycles between some words and long
// back-to-back bursts. Every result must equal the X it came from, carry the
// right sign flag and leave the pipeline exactly 5 clock edges after it
// entered. Boundary values (0, +-1, the ends of the range) are included.
// The testbench counts how often each mechanism of the datapath acted: the
// modulo-M reduction subtracting M or not, a non-zero high segment (the
// modulo-M generator in use), negative and non-negative results, idle
// cycles and back-to-back words; one that never happened is a failure.
module tb_rns_tcs_converter;
  import rns_pkg::*;

  localparam longint unsigned M_REF   = 64'd144259293600;
  localparam int              LAT     = 5;
  localparam int              N_WORDS = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  logic [N_MOD-1:0][RES_W-1:0] res;
  logic out_valid;
  logic signed [X_W-1:0] x;
  logic neg;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_wrap = 0, n_nowrap = 0, n_high = 0, n_neg = 0, n_pos = 0;
  int n_idle = 0, n_b2b = 0, n_out = 0;

  longint exp_x [$];
  int     exp_t [$];

  always #5 clk = ~clk;

  rns_tcs_converter dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .res_i(res),
    .out_valid_o(out_valid), .x_o(x), .neg_o(neg)
  );

  initial begin
    repeat (4 * N_WORDS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_MOD-1:0][RES_W-1:0] to_rns(longint v);
    logic [N_MOD-1:0][RES_W-1:0] r;
    for (int k = 0; k < N_MOD; k++) begin
      longint m = longint'(MODULI[k]);
      r[k] = RES_W'(((v % m) + m) % m);
    end
    return r;
  endfunction

  // Cycle counter and output checker.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // Internal activity of the reduction stage, sampled when its word is valid.
      if (dut.vld_q[2]) begin
        if (dut.u_red.wrapped_o) n_wrap++; else n_nowrap++;
      end
      if (dut.vld_q[1] && dut.sum_q[SUM_W-1:LOW_W] != 0) n_high++;
      if (out_valid) begin
        n_out++;
        checks++;
        if (exp_x.size() == 0) begin
          failures++;
          $display("FAIL: output without input");
        end else begin
          longint want;
          int     t0;
          want = exp_x.pop_front();
          t0   = exp_t.pop_front();
          if (longint'(x) != want || neg != (want < 0)) begin
            failures++;
            $display("FAIL: got %0d (neg %0b) want %0d", x, neg, want);
          end
          checks++;
          if (cycle - t0 != LAT) begin
            failures++;
            $display("FAIL: latency %0d, expected %0d", cycle - t0, LAT);
          end
          if (want < 0) n_neg++; else n_pos++;
        end
      end
    end
  end

  task automatic send(longint v);
    @(negedge clk);
    in_valid = 1'b1;
    res      = to_rns(v);
    exp_x.push_back(v);
    exp_t.push_back(cycle);  // value the checker reads at the sampling edge
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    res      = {$urandom, $urandom};   // garbage while idle
    n_idle++;
  endtask

  initial begin
    longint half;
    longint corner [8];
    bit prev_valid;
    half = longint'(M_REF / 2);
    corner = '{0, 1, -1, half - 1, -half, -half + 1, 2, -2};
    prev_valid = 1'b0;
    in_valid = 1'b0;
    res = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) begin
      send(corner[i]);
      if (prev_valid) n_b2b++;
      prev_valid = 1'b1;
    end
    for (int n = 0; n < N_WORDS; n++) begin
      longint v;
      v = longint'({$urandom, $urandom} % M_REF) - half;
      if ($urandom_range(0, 9) == 0) begin
        idle();
        prev_valid = 1'b0;
      end
      send(v);
      if (prev_valid) n_b2b++;
      prev_valid = 1'b1;
    end
    idle();
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_x.size() != 0 || n_out != N_WORDS + 8) begin
      failures++;
      $display("FAIL: %0d results missing", exp_x.size());
    end
    $display("mechanisms: reduce-subtract=%0d reduce-keep=%0d high-segment=%0d",
             n_wrap, n_nowrap, n_high);
    $display("            negative=%0d non-negative=%0d idle=%0d back-to-back=%0d",
             n_neg, n_pos, n_idle, n_b2b);
    checks++;
    if (n_wrap == 0 || n_nowrap == 0 || n_high == 0 || n_neg == 0 || n_pos == 0 ||
        n_idle == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
