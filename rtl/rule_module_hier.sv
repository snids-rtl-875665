// rule_module_hier: Level-LEVEL rule module of the hierarchical, pipelined
// string matching engine; it matches 16 * 2**LEVEL strings.
//
// A Level-0 module is rule_module_l0. A Level-k module (k >= 1) registers the
// input byte, enable and reset, feeds them to two Level-(k-1) modules and
// merges their (4+k)-bit IDs into one registered (5+k)-bit ID: the ID of
// module 0 if it is nonzero, otherwise the ID of module 1 plus 16 * 2**(k-1),
// otherwise 0. The encoder is thus spread over the tree and each level adds
// one register stage on the input and one on the output. Registers, widths
// and the pairing of two lower-level modules follow the prototype; the
// priority of module 0 over module 1 matches the prototype's lowest-module
// priority. The resulting IDs equal the SIDs of string_matching_engine with
// NUM_RM = 2**LEVEL.
//
// The tree is written out level by level with generate loops: g_lvl[k]
// .g_node[j] is node j of level k, fed by node j/2 of level k+1 and merging
// nodes 2j and 2j+1 of level k-1 (the leaves g_leaf[] at level 0).
//
// Timing: a byte presented with en=1 in cycle t yields its ID in cycle
// t + 5 + 2*LEVEL.
//
// Load bus: rule module r of the tree (0 .. 2**LEVEL - 1) is selected by
// tbl_wr.rm == r.
module rule_module_hier
  import snids_pkg::*;
#(
  parameter int unsigned LEVEL = 2,
  parameter int unsigned ID_W  = L0_ID_W + LEVEL
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [7:0]       din,
  output logic [ID_W-1:0]  id,
  input  tbl_wr_t          tbl_wr
);

  localparam int unsigned N_LEAF = 1 << LEVEL;

  // inner nodes, from the root (level LEVEL) down to level 1
  for (genvar k = 1; k <= int'(LEVEL); k++) begin : g_lvl
    for (genvar j = 0; j < (1 << (int'(LEVEL) - k)); j++) begin : g_node
      logic [7:0]        din_q;
      logic              en_q, rst_q;
      logic [L0_ID_W+k-1:0] id_q;
      logic [L0_ID_W+k-2:0] id_lo, id_hi;

      // input registers, fed by the parent node or by the module inputs
      if (k == int'(LEVEL)) begin : g_src
        always_ff @(posedge clk) begin
          din_q <= din;
          en_q  <= en && !rst;
          rst_q <= rst;
        end
      end else begin : g_src
        always_ff @(posedge clk) begin
          din_q <= g_lvl[k+1].g_node[j/2].din_q;
          en_q  <= g_lvl[k+1].g_node[j/2].en_q && !g_lvl[k+1].g_node[j/2].rst_q;
          rst_q <= g_lvl[k+1].g_node[j/2].rst_q;
        end
      end

      // IDs of the two children
      if (k == 1) begin : g_kids
        assign id_lo = g_leaf[2*j].id_l0;
        assign id_hi = g_leaf[2*j+1].id_l0;
      end else begin : g_kids
        assign id_lo = g_lvl[k-1].g_node[2*j].id_q;
        assign id_hi = g_lvl[k-1].g_node[2*j+1].id_q;
      end

      // encoder: module 0 first, module 1 offset by the strings of module 0
      always_ff @(posedge clk) begin
        if (rst_q)            id_q <= '0;
        else if (id_lo != '0) id_q <= (L0_ID_W+k)'(id_lo);
        else if (id_hi != '0) id_q <= (L0_ID_W+k)'(id_hi) + (L0_ID_W+k)'(PMV_W << (k - 1));
        else                  id_q <= '0;
      end
    end
  end

  // Level-0 rule modules
  for (genvar j = 0; j < int'(N_LEAF); j++) begin : g_leaf
    logic [L0_ID_W-1:0] id_l0;
    logic [7:0]         leaf_din;
    logic               leaf_en, leaf_rst;
    tbl_wr_t            leaf_tbl;

    if (LEVEL == 0) begin : g_src
      assign leaf_din = din;
      assign leaf_en  = en;
      assign leaf_rst = rst;
    end else begin : g_src
      assign leaf_din = g_lvl[1].g_node[j/2].din_q;
      assign leaf_en  = g_lvl[1].g_node[j/2].en_q;
      assign leaf_rst = g_lvl[1].g_node[j/2].rst_q;
    end

    always_comb begin
      leaf_tbl    = tbl_wr;
      leaf_tbl.rm = '0;
      leaf_tbl.we = tbl_wr.we && tbl_wr.rm == RM_IDX_W'(j);
    end

    rule_module_l0 u_l0 (
      .clk    (clk),
      .rst    (leaf_rst),
      .en     (leaf_en),
      .din    (leaf_din),
      .id     (id_l0),
      .tbl_wr (leaf_tbl)
    );
  end

  if (LEVEL == 0) begin : g_out
    assign id = ID_W'(g_leaf[0].id_l0);
  end else begin : g_out
    assign id = ID_W'(g_lvl[LEVEL].g_node[0].id_q);
  end

endmodule
