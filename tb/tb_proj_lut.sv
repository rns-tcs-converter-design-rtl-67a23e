// tb_proj_lut: self-checking testbench for proj_lut.
//
// Builds one table per modulus of the base and reads every residue address.
// Each projection is checked by the CRT property it must have: it is below M,
// congruent to the residue modulo its own modulus and divisible by every
// other modulus. The modulus-17 table is also compared entry by entry with
// the published projection values. It checks the one-cycle read latency and
// that a low enable holds the output.
module tb_proj_lut;
  import rns_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [RES_W-1:0] res;
  logic [N_MOD-1:0][M_W-1:0] proj;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < N_MOD; k++) begin : g_dut
    proj_lut #(.MOD(MODULI[k])) u_dut (
      .clk(clk), .rst_n(rst_n), .en_i(en), .res_i(res), .proj_o(proj[k])
    );
  end

  // Projections of modulus 17, N_j = 8485840800 * |8 n|_17.
  longint unsigned ref17 [17] = '{
    0, 64'd67886726400, 64'd135773452800, 64'd59400885600, 64'd127287612000, 64'd50915044800,
    64'd118801771200, 64'd42429204000, 64'd110315930400, 64'd33943363200, 64'd101830089600,
    64'd25457522400, 64'd93344248800, 64'd16971681600, 64'd84858408000, 64'd8485840800,
    64'd76372567200};

  localparam longint unsigned M_REF = 64'd144259293600;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en  = 1'b0;
    res = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      res = RES_W'(a);
      en  = 1'b1;
      @(negedge clk);
      for (int k = 0; k < N_MOD; k++) begin
        longint unsigned p;
        p = longint'(proj[k]);
        if (a < int'(MODULI[k])) begin
          check(p < M_REF, $sformatf("lane %0d addr %0d: projection %0d not below M", k, a, p));
          for (int j = 0; j < N_MOD; j++) begin
            longint unsigned want;
            want = (j == k) ? longint'(a) : 0;
            check(p % longint'(MODULI[j]) == want,
                  $sformatf("lane %0d addr %0d: projection %0d mod %0d != %0d",
                            k, a, p, MODULI[j], want));
          end
          if (MODULI[k] == 17)
            check(p == ref17[a], $sformatf("m=17 addr %0d: %0d != %0d", a, p, ref17[a]));
        end
      end
      // Enable low: a new address must not change the output.
      en  = 1'b0;
      res = RES_W'(a + 1);
      @(negedge clk);
      check(proj[0] == M_W'(a < 17 ? ref17[a] : 0), "output changed with enable low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
