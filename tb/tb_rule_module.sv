// tb_rule_module: one rule module loaded with the bit-split tables of 16
// strings, fed a random byte stream over a small alphabet with the strings
// planted in it and random gaps in en. After every enabled byte the match
// vector must show, two cycles later, exactly the strings that the byte
// history ends with (plain string comparison as reference).
module tb_rule_module;
  import snids_pkg::*;
  import bitsplit_ac_pkg::*;

  logic        clk = 0, rst = 1, en = 0;
  logic [7:0]  din = '0;
  pmv_t        mv;
  logic        tbl_we = 0;
  logic [1:0]  tbl_tile = '0;
  state_t      tbl_addr = '0;
  entry_t      tbl_data = '0;
  int          checks = 0, failures = 0, hits = 0;

  always #5 clk = ~clk;

  rule_module dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitsplit_ac g;
  string      s[$];
  byte        hist[$];
  pmv_t       exp_q[$];

  initial begin
    g = new();
    s = '{"abc", "abd", "bca", "cab", "dcba", "hello", "he", "she",
          "hers", "ab", "cc", "dabc", "aaaa", "bbbb", "cdcd", "dd"};
    g.build(s);
    if (!g.ok) failures++;
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        tbl_we = 1; tbl_tile = 2'(k); tbl_addr = state_t'(a); tbl_data = g.tbl[k][a];
      end
    @(negedge clk); tbl_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    exp_q = '{'0};
    for (int t = 0; t < 6000; t++) begin
      en = ($urandom_range(0, 4) != 0);
      if (en) begin
        if ($urandom_range(0, 9) == 0) begin
          // plant a whole string, one byte per enabled cycle
          string p;
          p = s[$urandom_range(0, s.size() - 1)];
          for (int j = 0; j < p.len(); j++) begin
            din = p[j];
            hist.push_back(din);
            exp_q.push_back('0);
            for (int i = 0; i < s.size(); i++) exp_q[$][i] = ends_with(hist, s[i]);
            @(posedge clk); #1;
            check();
            @(negedge clk);
          end
          continue;
        end
        din = "a" + 8'($urandom_range(0, 7));
        hist.push_back(din);
        exp_q.push_back('0);
        for (int i = 0; i < s.size(); i++) exp_q[$][i] = ends_with(hist, s[i]);
      end else begin
        din = 8'($urandom);
        exp_q.push_back('0);
      end
      @(posedge clk); #1;
      check();
      @(negedge clk);
    end
    $display("match cycles: %0d, bit-split states per tile: %0d %0d %0d %0d",
             hits, g.n_bs[0], g.n_bs[1], g.n_bs[2], g.n_bs[3]);
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    pmv_t e;
    e = exp_q.pop_front();
    checks++;
    if (e != '0) hits++;
    if (mv !== e) begin
      failures++;
      if (failures < 10) $display("%0t mv=%h expected %h", $time, mv, e);
    end
  endtask
endmodule
