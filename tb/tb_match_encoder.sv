// tb_match_encoder: applies random sparse match vectors for four rule
// modules and compares the SID with a reference that scans the strings in
// numbering order (string i of module m is SID 16*m + i + 1).
module tb_match_encoder;
  import snids_pkg::*;

  pmv_t        mv [4];
  logic [6:0]  sid;
  int          checks = 0, failures = 0, multi = 0;

  match_encoder dut (.mv(mv), .sid(sid));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int e, nset;
      nset = 0;
      for (int m = 0; m < 4; m++) begin
        mv[m] = '0;
        for (int i = 0; i < 16; i++)
          if ($urandom_range(0, 40) == 0) mv[m][i] = 1'b1;
      end
      e = 0;
      for (int m = 0; m < 4; m++)
        for (int i = 0; i < 16; i++)
          if (mv[m][i]) begin
            nset++;
            if (e == 0) e = 16 * m + i + 1;
          end
      if (nset > 1) multi++;
      #1;
      checks++;
      if (int'(sid) != e) begin
        failures++;
        if (failures < 10) $display("sid %0d expected %0d", sid, e);
      end
    end
    if (multi == 0) failures++;
    $display("cases with several matches: %0d", multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
