// tb_mod_reduce: self-checking testbench for mod_reduce.
//
// Builds both forms of the reduction (carry-save with parallel adders, and
// two adders in series) and drives random and boundary pairs hm < M,
// low < 2^37. Each output is compared with (hm + low) mod M computed here,
// and the wrapped flag with hm + low >= M. Both outcomes of the selection
// must occur.
module tb_mod_reduce;
  localparam longint unsigned M_REF = 64'd144259293600;

  logic [37:0] hm, n_par, n_ser;
  logic [36:0] low;
  logic        w_par, w_ser;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_keep = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  mod_reduce u_par (.hm_i(hm), .low_i(low), .n_o(n_par), .wrapped_o(w_par));
  mod_reduce #(.PARALLEL(1'b0)) u_ser (.hm_i(hm), .low_i(low), .n_o(n_ser), .wrapped_o(w_ser));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint unsigned h, longint unsigned l);
    longint unsigned want;
    bit wrap;
    hm  = 38'(h);
    low = 37'(l);
    #1;
    wrap = (h + l) >= M_REF;
    want = (h + l) % M_REF;
    if (wrap) n_wrap++; else n_keep++;
    checks += 2;
    if (n_par != 38'(want) || w_par != wrap) begin
      failures++;
      $display("FAIL parallel: %0d + %0d -> %0d (want %0d)", h, l, n_par, want);
    end
    if (n_ser != 38'(want) || w_ser != wrap) begin
      failures++;
      $display("FAIL serial: %0d + %0d -> %0d (want %0d)", h, l, n_ser, want);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++)
      apply(({$urandom, $urandom} & 64'h3F_FFFF_FFFF) % M_REF,
            {$urandom, $urandom} & 64'h1F_FFFF_FFFF);
    apply(0, 0);
    apply(M_REF - 1, 0);
    apply(M_REF - 1, 1);
    apply(M_REF - 1, (64'd1 << 37) - 1);
    apply(M_REF - 100, 99);
    apply(M_REF - 100, 100);
    checks++;
    if (n_wrap == 0 || n_keep == 0) begin
      failures++;
      $display("FAIL: selection not exercised both ways (%0d/%0d)", n_wrap, n_keep);
    end
    $display("wrapped=%0d kept=%0d", n_wrap, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
