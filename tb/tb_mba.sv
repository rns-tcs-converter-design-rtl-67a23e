// tb_mba: self-checking testbench for mba, the multi-operand binary adder.
//
// Drives random 38-bit operands, all-ones operands (the largest sum) and
// single non-zero operands (each tree leaf alone), and compares the 42-bit
// sum with one computed by 64-bit accumulation in the testbench. An odd
// operand count (5) is also built to exercise the pass-through of the tree.
module tb_mba;
  logic [7:0][37:0] op8;
  logic [41:0]      sum8;
  logic [4:0][37:0] op5;
  logic [40:0]      sum5;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  mba u_dut8 (.op_i(op8), .sum_o(sum8));
  mba #(.N_OPS(5), .IN_W(38), .OUT_W(41)) u_dut5 (.op_i(op5), .sum_o(sum5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [37:0] rnd38();
    return {$urandom, $urandom};
  endfunction

  task automatic check8();
    longint unsigned ref_sum = 0;
    for (int i = 0; i < 8; i++) ref_sum += longint'(op8[i]);
    #1;
    checks++;
    if (sum8 != 42'(ref_sum)) begin
      failures++;
      $display("FAIL mba8: got %0d want %0d", sum8, ref_sum);
    end
  endtask

  task automatic check5();
    longint unsigned ref_sum = 0;
    for (int i = 0; i < 5; i++) ref_sum += longint'(op5[i]);
    #1;
    checks++;
    if (sum5 != 41'(ref_sum)) begin
      failures++;
      $display("FAIL mba5: got %0d want %0d", sum5, ref_sum);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 8; i++) op8[i] = rnd38();
      for (int i = 0; i < 5; i++) op5[i] = rnd38();
      check8();
      check5();
    end
    op8 = '1; op5 = '1;
    check8(); check5();
    for (int i = 0; i < 8; i++) begin
      op8 = '0; op8[i] = rnd38() | 38'h1;
      check8();
    end
    for (int i = 0; i < 5; i++) begin
      op5 = '0; op5[i] = rnd38() | 38'h1;
      check5();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
