// snids_pkg: types and constants shared by the SNIDS string matching
// hardware.
//
// A rule module matches up to 16 strings with a four-way bit-split
// Aho-Corasick machine. Each of its four tiles owns a 256-entry state table;
// an entry holds the four possible next states (one per value of the tile's
// two input bits) and the 16-bit partial match vector (PMV) of the state.
// These sizes are the ones the SNIDS prototype uses. The placement of the
// fields inside the 48-bit entry (next states in the low 32 bits, next state
// for input value v in bits [8v+7:8v], PMV in the high 16 bits) follows the
// prototype's description of the table output; the order of the four next
// states inside the low word is this design's choice.
//
// The state tables are written through a load bus (tbl_wr_t) before
// matching starts. In the prototype they were ROMs filled when the FPGA was
// configured; the load bus is this design's stand-in for that step.
package snids_pkg;

  localparam int unsigned TILES      = 4;    // bit-split ways per rule module
  localparam int unsigned SPLIT_W    = 2;    // input bits per tile
  localparam int unsigned STATE_W    = 8;    // bit-split state code
  localparam int unsigned N_STATES   = 256;  // rows of a state table
  localparam int unsigned PMV_W      = 16;   // strings per rule module
  localparam int unsigned ENTRY_W    = TILES * STATE_W + PMV_W;  // 48
  localparam int unsigned RM_IDX_W   = 16;   // rule module index on the load bus
  localparam int unsigned L0_ID_W    = 5;    // encoded ID of one rule module

  typedef logic [STATE_W-1:0] state_t;
  typedef logic [PMV_W-1:0]   pmv_t;

  // One row of a tile's state table.
  typedef struct packed {
    pmv_t                          pmv;   // [47:32]
    logic [TILES-1:0][STATE_W-1:0] next;  // next[v] at [8v+7:8v]
  } entry_t;

  // Write port into the state tables of all rule modules.
  typedef struct packed {
    logic                  we;
    logic [RM_IDX_W-1:0]   rm;    // rule module number
    logic [1:0]            tile;  // tile number, 0 handles input bits [1:0]
    state_t                addr;  // row (bit-split state)
    entry_t                data;
  } tbl_wr_t;

  // Encode a 16-bit match vector as 0 (no match) or 1 + index of the lowest
  // set bit.
  function automatic logic [L0_ID_W-1:0] encode_mv(input pmv_t mv);
    logic [L0_ID_W-1:0] id;
    id = '0;
    for (int i = PMV_W - 1; i >= 0; i--)
      if (mv[i]) id = L0_ID_W'(i + 1);
    return id;
  endfunction

endpackage
