// string_matching_engine: NUM_RM rule modules fed with the same byte stream,
// and an encoder that reports the matched string ID.
//
// Every input byte (with its enable) is broadcast to all rule modules; their
// 16-bit match vectors go to a monolithic priority encoder (match_encoder).
// sid is nonzero in cycle t+2 when the byte presented with en=1 in cycle t
// completes a string of the rule set, and names that string (lowest ID wins
// if several complete together). rst resets every FSM to its root state.
// The structure and the four-module default follow the prototype.
//
// The load bus writes one state-table row of one tile of rule module
// tbl_wr.rm.
module string_matching_engine
  import snids_pkg::*;
#(
  parameter int unsigned NUM_RM = 4,
  parameter int unsigned SID_W  = $clog2(PMV_W * NUM_RM + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [7:0]        din,
  output logic [SID_W-1:0]  sid,
  input  tbl_wr_t           tbl_wr
);

  pmv_t mv [NUM_RM];

  for (genvar m = 0; m < NUM_RM; m++) begin : g_rm
    rule_module u_rm (
      .clk      (clk),
      .rst      (rst),
      .en       (en),
      .din      (din),
      .mv       (mv[m]),
      .tbl_we   (tbl_wr.we && tbl_wr.rm == RM_IDX_W'(m)),
      .tbl_tile (tbl_wr.tile),
      .tbl_addr (tbl_wr.addr),
      .tbl_data (tbl_wr.data)
    );
  end

  match_encoder #(.NUM_RM(NUM_RM), .SID_W(SID_W)) u_enc (
    .mv  (mv),
    .sid (sid)
  );

endmodule
