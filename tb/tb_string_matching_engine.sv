// tb_string_matching_engine: four rule modules loaded with 64 random strings
// (sorted, then split 16 per module as the table generator does), fed a
// random stream with planted strings, random stalls and an occasional reset.
// The SID must equal, two cycles after each enabled byte, the lowest-numbered
// string the byte history ends with (string i of module m is 16*m + i + 1),
// and 0 otherwise. Counts cycles where strings of different rule modules end
// together, so the module priority is exercised.
module tb_string_matching_engine;
  import snids_pkg::*;
  import bitsplit_ac_pkg::*;

  localparam int NRM = 4;

  logic        clk = 0, rst = 1, en = 0;
  logic [7:0]  din = '0;
  logic [6:0]  sid;
  tbl_wr_t     tbl_wr = '0;
  int          checks = 0, failures = 0, hits = 0, multi_rm = 0, stalls = 0, resets = 0;

  always #5 clk = ~clk;

  string_matching_engine dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitsplit_ac g;
  string      all[$];
  string      grp[NRM][$];
  byte        hist[$];
  int         exp_q[$];

  function automatic int ref_sid(output int nmods);
    int e;
    e = 0;
    nmods = 0;
    for (int m = 0; m < NRM; m++) begin
      bit any;
      any = 0;
      for (int i = 0; i < grp[m].size(); i++)
        if (ends_with(hist, grp[m][i])) begin
          any = 1;
          if (e == 0) e = 16 * m + i + 1;
        end
      if (any) nmods++;
    end
    return e;
  endfunction

  task automatic step(input bit e_en, input byte b, input bit e_rst);
    int nm;
    rst = e_rst;
    en  = e_en;
    din = b;
    if (e_rst) begin
      hist.delete();
      exp_q[exp_q.size() - 1] = 0;
      exp_q.push_back(0);
      resets++;
    end else if (e_en) begin
      hist.push_back(b);
      exp_q.push_back(ref_sid(nm));
      if (nm > 1) multi_rm++;
    end else begin
      exp_q.push_back(0);
      stalls++;
    end
    @(posedge clk); #1;
    begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (e != 0) hits++;
      if (int'(sid) != e) begin
        failures++;
        if (failures < 10) $display("%0t sid=%0d expected %0d", $time, sid, e);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    int first[$], count[$];
    // 64 distinct random strings of 2..6 letters from "a".."f"
    while (all.size() < 64) begin
      string x;
      bit dup;
      x = "";
      for (int j = $urandom_range(2, 6); j > 0; j--)
        x = {x, string'(8'("a" + $urandom_range(0, 5)))};
      dup = 0;
      foreach (all[i]) if (all[i] == x) dup = 1;
      if (!dup) all.push_back(x);
    end
    sort_strings(all);
    partition(all, first, count);
    if (first.size() != NRM) begin
      failures++;
      $display("partition gave %0d rule modules", first.size());
    end
    for (int m = 0; m < NRM && m < first.size(); m++)
      for (int i = 0; i < count[m]; i++) grp[m].push_back(all[first[m] + i]);
    g = new();
    for (int m = 0; m < NRM; m++) begin
      g.build(grp[m]);
      if (!g.ok) failures++;
      for (int k = 0; k < 4; k++)
        for (int a = 0; a < 256; a++) begin
          @(negedge clk);
          tbl_wr.we = 1; tbl_wr.rm = RM_IDX_W'(m); tbl_wr.tile = 2'(k);
          tbl_wr.addr = state_t'(a); tbl_wr.data = g.tbl[k][a];
        end
    end
    @(negedge clk); tbl_wr.we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    exp_q = '{0};
    for (int t = 0; t < 8000; t++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r == 0) step(0, 0, 1);
      else if (r < 20) step(0, 8'($urandom), 0);
      else if (r < 30) begin
        string p;
        p = all[$urandom_range(0, all.size() - 1)];
        for (int j = 0; j < p.len(); j++) step(1, p[j], 0);
      end else step(1, 8'("a" + $urandom_range(0, 6)), 0);
    end
    $display("match cycles %0d, cycles with several modules matching %0d, stalls %0d, resets %0d",
             hits, multi_rm, stalls, resets);
    if (hits == 0 || multi_rm == 0 || stalls == 0 || resets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
