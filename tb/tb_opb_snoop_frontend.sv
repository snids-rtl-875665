// tb_opb_snoop_frontend: drives the front-end through OPB transactions of a
// processor copying frames out of the EMAC, with a stand-in engine that
// reports byte values 0x81..0xFF as "matches" (ID = low seven bits) two
// cycles later. Checks, per frame:
//  * the bytes handed to the engine, in order, are exactly the frame bytes
//    (so the counter stops a frame whose length is not a multiple of four),
//  * the engine is reset when the length is captured,
//  * the rate: byte j of a word is fed exactly j+1 cycles after the FIFO
//    read that carried the word completed, one byte per cycle,
//  * the ID read back is that of the first matching byte, 0 for a clean
//    frame,
// and counts the stalls between words, the partial last words, frames with
// several matches (later ones must be ignored) and clean frames.
module tb_opb_snoop_frontend;

  logic clk = 0, rst = 1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  `include "opb_bus_model.svh"

  localparam logic [0:31] SNIDS_ADDR = 32'h7E00_0000;

  logic [7:0] eng_din;
  logic       eng_en, eng_rst;
  logic [6:0] eng_sid, sid_d1 = '0, sid_d2 = '0;

  opb_snoop_frontend dut (
    .OPB_Clk (clk), .OPB_Rst (rst), .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW,
    .OPB_Select, .OPB_SeqAddr, .OPB_xferAck, .Sln_DBus, .Sln_xferAck,
    .Sln_errAck, .Sln_retry, .Sln_toutSup, .eng_din, .eng_en, .eng_rst, .eng_sid
  );

  // stand-in engine with the real engine's two-cycle latency
  always_ff @(posedge clk) begin
    sid_d1 <= (eng_en && !eng_rst && eng_din[7] && eng_din[6:0] != 0) ? eng_din[6:0] : '0;
    sid_d2 <= eng_rst ? '0 : sid_d1;
  end
  assign eng_sid = sid_d2;

  byte seen[$];
  int  n_rst = 0, stalls = 0, partial = 0, multi = 0, clean = 0;
  bit  in_frame = 0;

  // feed rate: cycles since the last completed FIFO read, bytes fed since
  int since = 0, nb = 0, rate_checks = 0, rate_fails = 0;
  always @(posedge clk) begin
    if (eng_en) begin
      rate_checks++;
      if (since != nb + 1) begin
        rate_fails++;
        if (rate_fails < 5) $display("byte %0d of a word fed %0d cycles after its read", nb, since);
      end
      nb++;
    end
    if (OPB_Select && OPB_RNW && OPB_xferAck && OPB_ABus == RXFIFO_ADDR) begin
      since = 1;
      nb = 0;
    end else if (since > 0) since++;
  end

  always @(posedge clk) begin
    if (eng_en) seen.push_back(eng_din);
    if (eng_rst && !rst) n_rst++;
    if (in_frame && !eng_en && dut.count != 0) stalls++;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int fr = 0; fr < 200; fr++) begin
      byte f[$];
      int len, nmatch, exp_id, rst_before;
      logic [0:31] rd;
      len = $urandom_range(1, 80);
      f.delete();
      nmatch = 0;
      exp_id = 0;
      for (int i = 0; i < len; i++) begin
        byte b;
        b = ($urandom_range(0, 30) == 0) ? byte'(32'h81 + $urandom_range(0, 126))
                                         : byte'($urandom_range(0, 127));
        f.push_back(b);
        if (b[7]) begin
          nmatch++;
          if (exp_id == 0) exp_id = int'(b[6:0]);
        end
      end
      if (len % 4 != 0) partial++;
      if (nmatch > 1) multi++;
      if (nmatch == 0) clean++;
      seen.delete();
      rst_before = n_rst;
      in_frame = 1;
      receive_frame(f, 8, 1);
      in_frame = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (n_rst != rst_before + 1) begin
        failures++;
        $display("frame %0d: engine reset %0d times", fr, n_rst - rst_before);
      end
      checks++;
      if (seen.size() != f.size()) begin
        failures++;
        $display("frame %0d: %0d bytes fed, %0d expected", fr, seen.size(), f.size());
      end else
        foreach (f[i]) if (seen[i] != f[i]) begin
          failures++;
          $display("frame %0d byte %0d: %h expected %h", fr, i, seen[i], f[i]);
          break;
        end
      snids_read(SNIDS_ADDR, rd);
      checks++;
      if (rd != 32'(exp_id)) begin
        failures++;
        $display("frame %0d: read ID %0d expected %0d", fr, rd, exp_id);
      end
    end
    $display("stall cycles %0d, partial last words %0d, frames with several matches %0d, clean frames %0d",
             stalls, partial, multi, clean);
    if (stalls == 0 || partial == 0 || multi == 0 || clean == 0) failures++;
    $display("bytes checked for feed timing %0d", rate_checks);
    checks += rate_checks;
    failures += rate_fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
