// modm_lut: modulo-M generator (LT_N+1) for the high-order segment of the
// projection sum.
//
// The projection sum S is split as S = S_H * 2^LOW_W + S_L. This table maps
// the HIGH_W-bit segment S_H to | S_H * 2^LOW_W |_M, a value below M, so that
// |S|_M = | table(S_H) + S_L |_M with table(S_H) + S_L < 2M. The contents are
// computed at elaboration from that formula.
//
// Timing: synchronous read like proj_lut: the address is sampled on a rising
// edge with en_i high and the value appears on mod_o in the next cycle.
// The table and its role follow the converter design; its contents are
// derived here from the segment split, and the registered read is a choice.
module modm_lut
#(
  parameter longint unsigned M_RNG  = rns_pkg::M_RANGE,
  parameter int unsigned     HIGH_W = rns_pkg::HIGH_W,
  parameter int unsigned     LOW_W  = rns_pkg::LOW_W,
  parameter int unsigned     OUT_W  = rns_pkg::M_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  logic [HIGH_W-1:0] high_i,
  output logic [OUT_W-1:0]  mod_o
);

  localparam int unsigned DEPTH = 1 << HIGH_W;
  typedef logic [DEPTH-1:0][OUT_W-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r;
    longint unsigned step = (longint'(1) << LOW_W) % M_RNG;
    longint unsigned acc  = 0;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      r[a] = OUT_W'(acc);
      acc  = (acc + step) % M_RNG;
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mod_o <= '0;
    else if (en_i) mod_o <= ROM[high_i];
  end

endmodule
