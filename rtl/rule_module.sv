// rule_module: matches a set of up to 16 strings with four bit-split tiles.
//
// Tile k receives bits [2k+1:2k] of every input byte; all tiles share the
// enable and reset. A string is matched only when all four tiles report it
// in the same cycle, so the 16-bit match vector is the bitwise AND of the
// four partial match vectors. This is the prototype's rule module. Bit i of
// mv is set in cycle t+2 when the byte presented with en=1 in cycle t ends
// string i of the module's set.
//
// tbl_we loads row tbl_addr of tile tbl_tile with tbl_data.
module rule_module
  import snids_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [7:0]  din,
  output pmv_t        mv,
  input  logic        tbl_we,
  input  logic [1:0]  tbl_tile,
  input  state_t      tbl_addr,
  input  entry_t      tbl_data
);

  pmv_t pmv [TILES];

  for (genvar k = 0; k < TILES; k++) begin : g_tile
    tile u_tile (
      .clk      (clk),
      .rst      (rst),
      .en       (en),
      .din      (din[SPLIT_W*k +: SPLIT_W]),
      .pmv      (pmv[k]),
      .tbl_we   (tbl_we && tbl_tile == 2'(k)),
      .tbl_addr (tbl_addr),
      .tbl_data (tbl_data)
    );
  end

  assign mv = pmv[0] & pmv[1] & pmv[2] & pmv[3];

endmodule
