// tb_tile: checks one bit-split tile against a walk of its own state table.
//
// The table is tile 0 of the bit-split automaton for {"abab", "ac"} (the
// textbook Aho-Corasick example). Random 2-bit inputs are applied with
// random gaps in en; the expected PMV is obtained by stepping the table in
// the testbench only on enabled inputs, and must appear exactly two cycles
// after the enabled input and be zero after a stall cycle. A mid-stream
// reset must return the tile to state 0.
module tb_tile;
  import snids_pkg::*;
  import bitsplit_ac_pkg::*;

  logic        clk = 0, rst = 1, en = 0;
  logic [1:0]  din = '0;
  pmv_t        pmv;
  logic        tbl_we = 0;
  state_t      tbl_addr = '0;
  entry_t      tbl_data = '0;
  int          checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  tile dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitsplit_ac g;
  pmv_t   exp_q [$];
  int     cur;

  initial begin
    string s[$];
    g = new();
    s = '{"abab", "ac"};
    g.build(s);
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      tbl_we = 1; tbl_addr = state_t'(a); tbl_data = g.tbl[0][a];
    end
    @(negedge clk); tbl_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    cur = 0;
    exp_q = '{'0};
    for (int t = 0; t < 3000; t++) begin
      // inputs for this cycle
      if (t == 1500) begin
        rst = 1; en = 0;
      end else begin
        rst = 0;
        en  = ($urandom_range(0, 3) != 0);
        din = 2'($urandom);
      end
      // model: PMV of the state after this cycle's input, seen two cycles on
      if (rst) begin
        cur = 0;
        exp_q[exp_q.size() - 1] = '0;  // reset also clears the PMV register
        exp_q.push_back('0);
      end else if (en) begin
        cur = int'(g.tbl[0][cur].next[din]);
        exp_q.push_back(g.tbl[0][cur].pmv);
      end else begin
        stalls++;
        exp_q.push_back('0);
      end
      @(posedge clk);
      #1;
      begin
        pmv_t e;
        e = exp_q.pop_front();
        checks++;
        if (pmv !== e) begin
          failures++;
          if (failures < 10) $display("t=%0d pmv=%h expected %h", t, pmv, e);
        end
      end
      @(negedge clk);
    end
    if (stalls == 0) failures++;
    $display("stall cycles: %0d, bit-split states: %0d", stalls, g.n_bs[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
