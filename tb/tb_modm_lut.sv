// tb_modm_lut: self-checking testbench for modm_lut, the modulo-M generator.
//
// Reads all 32 addresses and compares each entry with (h * 2^37) mod M
// worked out in 64-bit arithmetic here, checking the one-cycle read latency
// and that a low enable holds the output.
module tb_modm_lut;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [4:0] high;
  logic [37:0] modv;
  int checks = 0, failures = 0;

  localparam longint unsigned M_REF = 64'd144259293600;

  always #5 clk = ~clk;

  modm_lut u_dut (.clk(clk), .rst_n(rst_n), .en_i(en), .high_i(high), .mod_o(modv));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    high = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (modv != 0) begin failures++; $display("FAIL: not cleared by reset"); end
    rst_n = 1'b1;
    for (int h = 0; h < 32; h++) begin
      longint unsigned want;
      want = (longint'(h) << 37) % M_REF;
      @(negedge clk);
      high = 5'(h);
      en   = 1'b1;
      checks++;
      if (h > 0 && modv == 38'(want)) begin
        failures++;
        $display("FAIL: h=%0d value visible before the clock edge", h);
      end
      @(negedge clk);
      checks++;
      if (modv != 38'(want)) begin
        failures++;
        $display("FAIL: h=%0d got %0d want %0d", h, modv, want);
      end
      en = 1'b0;
      high = 5'(h + 7);
      @(negedge clk);
      checks++;
      if (modv != 38'(want)) begin
        failures++;
        $display("FAIL: h=%0d output changed with enable low", h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
