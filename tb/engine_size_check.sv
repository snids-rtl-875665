// engine_size_check: drives one string_matching_engine of NRM rule modules
// with 16*NRM random strings (sorted and split 16 per module) and a random
// byte stream with planted strings and stalls, and compares every SID with
// plain string search, two cycles after each enabled byte. Reports its
// check and failure counts and raises done when finished. Used by
// tb_engine_sizes to run the engine sizes of the frequency study.
module engine_size_check
  import snids_pkg::*;
  import bitsplit_ac_pkg::*;
#(
  parameter int NRM    = 8,
  parameter int NBYTES = 3000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   hits,
  output bit   done
);
  localparam int SW = $clog2(PMV_W * NRM + 1);

  logic          rst = 1, en = 0;
  logic [7:0]    din = '0;
  logic [SW-1:0] sid;
  tbl_wr_t       tbl_wr = '0;

  string_matching_engine #(.NUM_RM(NRM)) dut (.*);

  bitsplit_ac g;
  string      all[$];
  string      grp[NRM][$];
  byte        hist[$];
  int         exp_q[$];

  function automatic int ref_sid();
    for (int m = 0; m < NRM; m++)
      foreach (grp[m][i])
        if (ends_with(hist, grp[m][i])) return 16 * m + i + 1;
    return 0;
  endfunction

  task automatic step(input bit e_en, input byte b);
    en  = e_en;
    din = b;
    if (e_en) begin
      hist.push_back(b);
      if (hist.size() > 16) void'(hist.pop_front());
      exp_q.push_back(ref_sid());
    end else exp_q.push_back(0);
    @(posedge clk); #1;
    begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (e != 0) hits++;
      if (int'(sid) != e) begin
        failures++;
        if (failures < 5) $display("NUM_RM=%0d: sid %0d expected %0d", NRM, sid, e);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    int first[$], count[$];
    checks = 0; failures = 0; hits = 0; done = 0;
    while (all.size() < 16 * NRM) begin
      string x;
      bit dup;
      x = "";
      for (int j = $urandom_range(3, 7); j > 0; j--)
        x = {x, string'(8'("a" + $urandom_range(0, 7)))};
      dup = 0;
      foreach (all[i]) if (all[i] == x) dup = 1;
      if (!dup) all.push_back(x);
    end
    sort_strings(all);
    partition(all, first, count);
    checks++;
    if (first.size() != NRM) begin
      failures++;
      $display("NUM_RM=%0d: partition gave %0d rule modules", NRM, first.size());
    end
    g = new();
    for (int m = 0; m < NRM && m < first.size(); m++) begin
      for (int i = 0; i < count[m]; i++) grp[m].push_back(all[first[m] + i]);
      g.build(grp[m]);
      if (!g.ok) failures++;
      for (int k = 0; k < 4; k++)
        for (int a = 0; a < g.n_bs[k]; a++) begin
          @(negedge clk);
          tbl_wr.we = 1; tbl_wr.rm = RM_IDX_W'(m); tbl_wr.tile = 2'(k);
          tbl_wr.addr = state_t'(a); tbl_wr.data = g.tbl[k][a];
        end
    end
    @(negedge clk);
    tbl_wr = '0;
    rst = 0;
    exp_q = '{0};
    for (int t = 0; t < NBYTES; t++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 15) step(0, 8'($urandom));
      else if (r < 30) begin
        string p;
        p = all[$urandom_range(0, all.size() - 1)];
        for (int j = 0; j < p.len(); j++) step(1, p[j]);
      end else step(1, 8'("a" + $urandom_range(0, 8)));
    end
    $display("NUM_RM=%0d (%0d strings): %0d checks, %0d match cycles, %0d failures",
             NRM, 16 * NRM, checks, hits, failures);
    done = 1;
  end
endmodule
