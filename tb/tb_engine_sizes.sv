// tb_engine_sizes: runs the string matching engine at the sizes the
// prototype was evaluated at beyond its default four rule modules: 8, 32
// and 64 rule modules (the frequency study) and 9 (the most that fit the
// block RAM left on the prototype board). Each size gets its own random
// rule set and stream (see engine_size_check); every size must see matches.
module tb_engine_sizes;
  logic clk = 0;
  int   c[4], f[4], h[4];
  bit   d[4];
  int   checks, failures;

  always #5 clk = ~clk;

  engine_size_check #(.NRM(8))  u_8  (.clk, .checks(c[0]), .failures(f[0]), .hits(h[0]), .done(d[0]));
  engine_size_check #(.NRM(9))  u_9  (.clk, .checks(c[1]), .failures(f[1]), .hits(h[1]), .done(d[1]));
  engine_size_check #(.NRM(32)) u_32 (.clk, .checks(c[2]), .failures(f[2]), .hits(h[2]), .done(d[2]));
  engine_size_check #(.NRM(64)) u_64 (.clk, .checks(c[3]), .failures(f[3]), .hits(h[3]), .done(d[3]));

  function automatic void total();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
      if (h[i] == 0) failures++;
    end
  endfunction

  initial begin
    #100000000;
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
