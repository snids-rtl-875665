// state_table: the memory of one bit-split tile, 256 rows of 48 bits.
//
// It models the FPGA block RAM the prototype uses for each tile: the address
// is registered on every clock edge and the row at the registered address
// appears on rdata during the following cycle. Because the address register
// sits inside the memory, it also serves as the tile's current-state
// register, as in the prototype. Row layout is snids_pkg::entry_t.
//
// Write port (this design's stand-in for filling a ROM at configuration
// time): when we is high at a clock edge, wdata is stored at waddr. Reads and
// writes are independent; reading a row in the cycle it is written returns
// the old contents until the next edge.
module state_table
  import snids_pkg::*;
#(
  parameter int unsigned DEPTH = N_STATES
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  addr,   // read address, registered
  output entry_t                    rdata,  // row at the registered address
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  entry_t                    wdata
);

  entry_t                     mem [DEPTH];
  logic [$clog2(DEPTH)-1:0]   addr_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    addr_q <= addr;
  end

  assign rdata = mem[addr_q];

endmodule
