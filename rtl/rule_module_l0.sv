// rule_module_l0: pipelined Level-0 rule module for the hierarchical string
// matching engine.
//
// Same four tiles and AND of partial match vectors as rule_module, wrapped in
// pipeline registers so that many modules can be placed far apart: the input
// byte and enable are registered on the way in, the 16-bit match vector is
// registered, encoded to a 5-bit ID (0 = no match, i+1 = string i) and
// registered again on the way out. These registers, the encoder and the
// 5-bit width follow the prototype's Level-0 module. The reset is carried
// through the input register together with byte and enable so that it
// stays in order with the stream; that, and encoding the lowest set bit when
// several are set, are this design's choices.
//
// Timing: a byte presented with en=1 in cycle t yields its ID on id in cycle
// t+5 (input register, state step, PMV register, match register, ID
// register).
module rule_module_l0
  import snids_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [7:0]          din,
  output logic [L0_ID_W-1:0]  id,
  input  tbl_wr_t             tbl_wr   // rm field must be 0 to address this module
);

  logic [7:0] din_q;
  logic       en_q, rst_q;
  pmv_t       mv, mv_q;

  always_ff @(posedge clk) begin
    din_q <= din;
    en_q  <= en && !rst;
    rst_q <= rst;
  end

  rule_module u_rm (
    .clk      (clk),
    .rst      (rst_q),
    .en       (en_q),
    .din      (din_q),
    .mv       (mv),
    .tbl_we   (tbl_wr.we && tbl_wr.rm == '0),
    .tbl_tile (tbl_wr.tile),
    .tbl_addr (tbl_wr.addr),
    .tbl_data (tbl_wr.data)
  );

  always_ff @(posedge clk) begin
    if (rst_q) begin
      mv_q <= '0;
      id   <= '0;
    end else begin
      mv_q <= mv;
      id   <= encode_mv(mv_q);
    end
  end

endmodule
