// snids: the snooping network intrusion detection core, an OPB slave that
// checks every Ethernet frame the processor copies out of the EMAC against a
// fixed set of strings.
//
// The OPB snooping front-end (opb_snoop_frontend) picks the frame length and
// the frame words off the bus while the processor reads them from the EMAC,
// and feeds the frame one byte per cycle to the string matching engine.
// After copying the frame, the processor reads C_BASEADDR and gets the ID of
// the first string found in the frame, or 0 for a clean frame. This split
// into front-end and engine follows the prototype.
//
// Engine choice: HIER = 0 (default) builds the prototype's engine, NUM_RM
// rule modules and one monolithic encoder (string_matching_engine). HIER = 1
// builds the pipelined tree of rule modules the prototype proposes for large
// rule sets (rule_module_hier, NUM_RM must then be a power of two). Both
// give the same IDs; the tree only adds latency, which the front-end
// absorbs because it keeps the ID until the processor asks for it.
//
// The state tables of all tiles are written through tbl_wr before frames
// arrive (see snids_pkg). OPB_BE and OPB_SeqAddr are part of the OPB slave
// port but carry nothing the core needs.
module snids
  import snids_pkg::*;
#(
  parameter int unsigned  NUM_RM               = 4,
  parameter bit           HIER                 = 1'b0,
  parameter logic [0:31]  C_BASEADDR           = 32'h7E00_0000,
  parameter logic [0:31]  C_EMAC_BASEADDR      = 32'h40C0_0000,
  parameter logic [0:31]  C_EMAC_RXLEN_OFFSET  = 32'h0000_3010,
  parameter logic [0:31]  C_EMAC_RXFIFO_OFFSET = 32'h0000_8100,
  parameter int unsigned  SID_W                = $clog2(PMV_W * NUM_RM + 1)
) (
  input  logic         OPB_Clk,
  input  logic         OPB_Rst,
  input  logic [0:31]  OPB_ABus,
  input  logic [0:3]   OPB_BE,
  input  logic [0:31]  OPB_DBus,
  input  logic         OPB_RNW,
  input  logic         OPB_Select,
  input  logic         OPB_SeqAddr,
  input  logic         OPB_xferAck,
  output logic [0:31]  Sln_DBus,
  output logic         Sln_xferAck,
  output logic         Sln_errAck,
  output logic         Sln_retry,
  output logic         Sln_toutSup,
  input  tbl_wr_t      tbl_wr
);

  logic [7:0]       eng_din;
  logic             eng_en, eng_rst;
  logic [SID_W-1:0] eng_sid;

  opb_snoop_frontend #(
    .C_BASEADDR           (C_BASEADDR),
    .C_EMAC_BASEADDR      (C_EMAC_BASEADDR),
    .C_EMAC_RXLEN_OFFSET  (C_EMAC_RXLEN_OFFSET),
    .C_EMAC_RXFIFO_OFFSET (C_EMAC_RXFIFO_OFFSET),
    .SID_W                (SID_W),
    .ENG_LAT              (HIER ? 5 + 2 * $clog2(NUM_RM) : 2)
  ) u_frontend (
    .OPB_Clk     (OPB_Clk),
    .OPB_Rst     (OPB_Rst),
    .OPB_ABus    (OPB_ABus),
    .OPB_BE      (OPB_BE),
    .OPB_DBus    (OPB_DBus),
    .OPB_RNW     (OPB_RNW),
    .OPB_Select  (OPB_Select),
    .OPB_SeqAddr (OPB_SeqAddr),
    .OPB_xferAck (OPB_xferAck),
    .Sln_DBus    (Sln_DBus),
    .Sln_xferAck (Sln_xferAck),
    .Sln_errAck  (Sln_errAck),
    .Sln_retry   (Sln_retry),
    .Sln_toutSup (Sln_toutSup),
    .eng_din     (eng_din),
    .eng_en      (eng_en),
    .eng_rst     (eng_rst),
    .eng_sid     (eng_sid)
  );

  if (HIER) begin : g_hier
    rule_module_hier #(.LEVEL($clog2(NUM_RM)), .ID_W(SID_W)) u_engine (
      .clk    (OPB_Clk),
      .rst    (eng_rst),
      .en     (eng_en),
      .din    (eng_din),
      .id     (eng_sid),
      .tbl_wr (tbl_wr)
    );
  end else begin : g_flat
    string_matching_engine #(.NUM_RM(NUM_RM), .SID_W(SID_W)) u_engine (
      .clk    (OPB_Clk),
      .rst    (eng_rst),
      .en     (eng_en),
      .din    (eng_din),
      .sid    (eng_sid),
      .tbl_wr (tbl_wr)
    );
  end

endmodule
