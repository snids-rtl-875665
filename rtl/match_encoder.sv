// match_encoder: turns the match vectors of all rule modules into one
// string ID (SID).
//
// String i (0..15) of rule module m has SID 16*m + i + 1; SID 0 means no
// string matched. When several strings match at once the one with the lowest
// SID wins: the lowest-numbered rule module first, then the lowest bit. The
// rule set is sorted before it is split over the modules, so this is
// lexicographic priority. The numbering and the priority order follow the
// prototype (64 strings numbered 1 to 64 over four modules, lowest module
// first); the choice of the lowest bit inside one module is this design's.
// Purely combinational.
module match_encoder
  import snids_pkg::*;
#(
  parameter int unsigned NUM_RM = 4,
  parameter int unsigned SID_W  = $clog2(PMV_W * NUM_RM + 1)
) (
  input  pmv_t              mv [NUM_RM],
  output logic [SID_W-1:0]  sid
);

  always_comb begin
    sid = '0;
    for (int m = int'(NUM_RM) - 1; m >= 0; m--)
      for (int i = PMV_W - 1; i >= 0; i--)
        if (mv[m][i]) sid = SID_W'(PMV_W * m + i + 1);
  end

endmodule
