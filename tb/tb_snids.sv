// tb_snids: end-to-end test of the SNIDS core with every parameter at its
// default (four rule modules, monolithic encoder): tables for 64 strings are
// loaded, 120 frames are copied out of a stand-in EMAC over the OPB, and the
// matched-ID register is read and checked after each. See
// snids_e2e_body.svh for the stimulus, the reference and the mechanisms
// that must occur.
module tb_snids;
  import snids_pkg::*;
  import bitsplit_ac_pkg::*;

  localparam int          N_FRAMES   = 120;
  localparam int          N_STR      = 64;
  localparam bit          ACK_WAIT_EXPECTED = 1'b0;
  localparam logic [0:31] SNIDS_ADDR = 32'h7E00_0000;

  logic    clk = 0, rst = 1;
  int      checks = 0, failures = 0;
  tbl_wr_t tbl_wr;

  always #5 clk = ~clk;

  `include "opb_bus_model.svh"

  snids dut (
    .OPB_Clk (clk), .OPB_Rst (rst), .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW,
    .OPB_Select, .OPB_SeqAddr, .OPB_xferAck, .Sln_DBus, .Sln_xferAck,
    .Sln_errAck, .Sln_retry, .Sln_toutSup, .tbl_wr
  );

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "snids_e2e_body.svh"
endmodule
