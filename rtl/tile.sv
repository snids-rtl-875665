// tile: one bit-split Aho-Corasick state machine working on two bits of every
// input byte.
//
// The current state is the address last registered by the state table. The
// table row of that state supplies four candidate next states and the PMV
// of the state. A 4:1 byte multiplexer, steered by the two input bits,
// picks the next state, which becomes the table address at the next edge.
// While en is low the address is taken from saved_state instead, so the
// machine holds its state through gaps in the byte stream for as long as
// needed; saved_state follows the selected next state whenever en is high.
// This structure follows the prototype's tile.
//
// Timing: a byte presented with en=1 in cycle t moves the state at edge
// t+1; the PMV of the new state is registered at edge t+2 and held on pmv
// during cycle t+2. The PMV register loads only in the cycle after an
// enabled byte and is cleared otherwise, so each consumed byte produces
// exactly one PMV; that gating is this design's choice (the prototype does
// not say what the register holds during a stall). A synchronous rst
// returns the machine to state 0 (the Aho-Corasick root) at the next edge.
module tile
  import snids_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [SPLIT_W-1:0]  din,        // two bits of the input byte
  output pmv_t                pmv,        // partial match vector
  // state table load port
  input  logic                tbl_we,
  input  state_t              tbl_addr,
  input  entry_t              tbl_data
);

  entry_t row;
  state_t next_state, saved_state, table_addr;
  logic   en_q;

  state_table u_table (
    .clk   (clk),
    .addr  (table_addr),
    .rdata (row),
    .we    (tbl_we),
    .waddr (tbl_addr),
    .wdata (tbl_data)
  );

  // 4:1 byte multiplexer over the candidate next states
  assign next_state = row.next[din];

  always_comb begin
    if (rst)     table_addr = '0;
    else if (en) table_addr = next_state;
    else         table_addr = saved_state;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      saved_state <= '0;
      en_q        <= 1'b0;
      pmv         <= '0;
    end else begin
      if (en) saved_state <= next_state;
      en_q <= en;
      pmv  <= en_q ? row.pmv : '0;
    end
  end

endmodule
