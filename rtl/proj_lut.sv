// proj_lut: orthogonal projection look-up table (LT_j) of a CRT I converter.
//
// For a residue n of modulus MOD it returns the projection
//   N_j = M_j * | M_j^-1 * n |_MOD,   M_j = M_RANGE / MOD,
// an integer below M_RANGE. The table is filled at elaboration from that
// formula, so only the modulus and the range are parameters; nothing is
// multiplied in hardware. A converter holds one table per modulus, addressed
// by that lane's residue.
//
// Timing: synchronous read, as a block RAM would give. res_i is sampled on a
// rising clock edge with en_i high and proj_o holds the projection from the
// next cycle on; with en_i low proj_o keeps its value. Reset clears proj_o.
// Addresses at or above MOD are not residues; they read 0 (design choice).
// The formula and one table per modulus follow the CRT I converter; the
// registered read, enable and reset are this implementation's choices.
module proj_lut
#(
  parameter int unsigned     MOD   = 17,
  parameter longint unsigned M_RNG = rns_pkg::M_RANGE,
  parameter int unsigned     IN_W  = rns_pkg::RES_W,
  parameter int unsigned     OUT_W = rns_pkg::M_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  input  logic [IN_W-1:0]  res_i,
  output logic [OUT_W-1:0] proj_o
);

  localparam int unsigned DEPTH = 1 << IN_W;
  typedef logic [DEPTH-1:0][OUT_W-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned a = 0; a < DEPTH; a++)
      r[a] = (a < MOD) ? OUT_W'(rns_pkg::projection(longint'(MOD), M_RNG, longint'(a))) : '0;
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    proj_o <= '0;
    else if (en_i) proj_o <= ROM[res_i];
  end

endmodule
