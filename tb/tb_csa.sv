// tb_csa: self-checking testbench for csa, the 3:2 carry-save adder.
//
// For random and corner operands it checks that sum + carry equals
// a + b + c modulo 2^39, that the sum vector is the bitwise XOR and that the
// carry vector has bit 0 clear.
module tb_csa;
  logic [38:0] a, b, c, s, cy;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  csa u_dut (.a_i(a), .b_i(b), .c_i(c), .sum_o(s), .carry_o(cy));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned want;
    #1;
    want = (longint'(a) + longint'(b) + longint'(c)) & ((64'd1 << 39) - 1);
    checks++;
    if (39'(s + cy) != 39'(want) || s != (a ^ b ^ c) || cy[0] != 1'b0) begin
      failures++;
      $display("FAIL: a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      c = {$urandom, $urandom};
      check();
    end
    a = '1; b = '1; c = '1; check();
    a = '1; b = 39'd1; c = '0; check();
    a = '0; b = '0; c = '0; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
