// tb_state_table: write random rows into the 256 x 48 table, then read them
// back in random order and check that each row appears one cycle after its
// address is presented (registered address), and that the output holds while
// the address changes between edges.
module tb_state_table;
  import snids_pkg::*;

  logic    clk = 0;
  state_t  addr = '0, waddr = '0;
  entry_t  rdata, wdata = '0;
  logic    we = 0;
  entry_t  ref_mem [256];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  state_table dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = state_t'(a);
      wdata = {$urandom, $urandom};
      ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      state_t a;
      a = state_t'($urandom);
      addr = a;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d read %h expected %h", a, rdata, ref_mem[a]);
      end
      // a new address must not show before the next edge
      addr = a + 8'd1;
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("row changed before the clock edge");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
