// tb_sign_select: self-checking testbench for sign_select.
//
// Drives random N in [0, M) and the values around the threshold M/2 and
// compares the signed output with N (N < M/2) or N - M (N >= M/2) worked
// out here, together with the negative flag.
module tb_sign_select;
  localparam longint unsigned M_REF = 64'd144259293600;

  logic [37:0]        n;
  logic signed [38:0] x;
  logic               neg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  sign_select u_dut (.n_i(n), .x_o(x), .neg_o(neg));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint unsigned v);
    longint want;
    n = 38'(v);
    #1;
    want = (v >= M_REF / 2) ? longint'(v) - longint'(M_REF) : longint'(v);
    checks++;
    if (longint'(x) != want || neg != (want < 0)) begin
      failures++;
      $display("FAIL: N=%0d got %0d want %0d", v, x, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) apply({$urandom, $urandom} % M_REF);
    apply(0);
    apply(1);
    apply(M_REF / 2 - 1);
    apply(M_REF / 2);
    apply(M_REF / 2 + 1);
    apply(M_REF - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
