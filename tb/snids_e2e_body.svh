// snids_e2e_body.svh: end-to-end test of the SNIDS core, shared by the
// testbenches of the two engine variants. Included in a testbench module
// that declares clk, rst, checks, failures, tbl_wr, SNIDS_ADDR, N_FRAMES,
// N_STR, ACK_WAIT_EXPECTED and
// instantiates the core as `dut` on the signals of opb_bus_model.svh.
//
// N_STR random strings (3..7 letters) are sorted, split 16 per rule module
// and turned into bit-split tables, which are written into the core; rule
// modules left without strings get the table of an empty string set (one
// state that never matches). Then
// N_FRAMES Ethernet frames of random length (the length register read, the
// FIFO words copied with random gaps of at least four cycles) pass the
// core, and after each one the processor reads the matched-ID register. The
// expected ID is computed by plain string search over the frame alone: at
// the first byte position where any string ends, the lowest-numbered such
// string.
//
// Mechanisms counted (each must occur at least once):
//   stall       engine idle mid-frame, waiting for the next word
//   partial     frame length not a multiple of four, last word cut short
//   multi       more than one match in a frame, later ones ignored
//   priority    strings of different rule modules ending on the same byte
//               (only required when there are more than 16 strings)
//   clean       frame with no match, ID 0 read back
//   split       a string split across two consecutive frames, which must
//               not match because the FSMs are reset at every frame start
//   ack wait    ID read held back until the engine pipeline drained; only
//               required (ACK_WAIT_EXPECTED) for the pipelined engine

bitsplit_ac g;
string      all[$];
string      grp[4][$];
int         n_stall = 0, n_partial = 0, n_multi = 0, n_prio = 0, n_clean = 0, n_split = 0;
bit         in_frame = 0;

// A word occupies the engine for four cycles; a longer gap between two FIFO
// reads of one frame means the engine was stalled waiting for the next word.
int since_word = -1;
always @(posedge clk) begin
  if (!in_frame) since_word = -1;
  else if (OPB_Select && OPB_xferAck && OPB_ABus == RXFIFO_ADDR) begin
    if (since_word > 4) n_stall++;
    since_word = 0;
  end else if (since_word >= 0) since_word++;
end

// expected result of a frame; also reports how many positions matched and
// whether two rule modules matched at the same position
function automatic int frame_id(input byte f[$], output int npos, output bit prio);
  byte h[$];
  int  id;
  id = 0;
  npos = 0;
  prio = 0;
  foreach (f[p]) begin
    int e, nm;
    h.push_back(f[p]);
    e = 0;
    nm = 0;
    for (int m = 0; m < 4; m++) begin
      bit any;
      any = 0;
      foreach (grp[m][i])
        if (ends_with(h, grp[m][i])) begin
          any = 1;
          if (e == 0) e = 16 * m + i + 1;
        end
      if (any) nm++;
    end
    if (e != 0) npos++;
    if (nm > 1) prio = 1;
    if (id == 0) id = e;
  end
  return id;
endfunction

// true if some string is a suffix of a string placed in another rule module
function automatic bit cross_suffix(input int first[$], input int count[$]);
  foreach (first[a])
    foreach (first[b])
      if (a != b)
        for (int i = first[a]; i < first[a] + count[a]; i++)
          for (int j = first[b]; j < first[b] + count[b]; j++)
            if (all[j].len() > all[i].len() &&
                all[j].substr(all[j].len() - all[i].len(), all[j].len() - 1) == all[i])
              return 1;
  return 0;
endfunction

initial begin
  int  first[$], count[$];
  byte carry[$];
  tbl_wr = '0;
  // Some strings are made suffixes of others, so that strings of two rule
  // modules can end on the same byte; with more than 16 strings the set is
  // drawn again until at least one such pair spans two rule modules.
  do begin
    all.delete();
    first.delete();
    count.delete();
    while (all.size() < N_STR) begin
      string x;
      bit dup;
      x = "";
      if (all.size() > 0 && $urandom_range(0, 5) == 0) begin
        string y;
        y = all[$urandom_range(0, all.size() - 1)];
        if (y.len() > 3) x = y.substr($urandom_range(1, y.len() - 3), y.len() - 1);
      end
      if (x == "")
        for (int j = $urandom_range(3, 7); j > 0; j--)
          x = {x, string'(8'("a" + $urandom_range(0, 7)))};
      dup = 0;
      foreach (all[i]) if (all[i] == x) dup = 1;
      if (!dup) all.push_back(x);
    end
    sort_strings(all);
    partition(all, first, count);
  end while (N_STR > 16 && !cross_suffix(first, count));
  checks++;
  if (first.size() != (N_STR + 15) / 16) begin
    failures++;
    $display("partition gave %0d rule modules", first.size());
  end
  g = new();
  for (int m = 0; m < 4; m++) begin
    if (m < first.size())
      for (int i = 0; i < count[m]; i++) grp[m].push_back(all[first[m] + i]);
    g.build(grp[m]);
    checks++;
    if (!g.ok) failures++;
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        tbl_wr.we = 1; tbl_wr.rm = RM_IDX_W'(m); tbl_wr.tile = 2'(k);
        tbl_wr.addr = state_t'(a); tbl_wr.data = g.tbl[k][a];
      end
  end
  @(negedge clk);
  tbl_wr = '0;
  repeat (3) @(negedge clk);
  rst = 0;
  repeat (3) @(negedge clk);

  for (int fr = 0; fr < N_FRAMES; fr++) begin
    byte f[$];
    int  len, npos, exp_id;
    bit  prio, clean_try;
    logic [0:31] rd;
    f.delete();
    // start with the tail of a string split at the previous frame's end
    foreach (carry[i]) f.push_back(carry[i]);
    carry.delete();
    len = $urandom_range(1, 90);
    clean_try = (fr % 5 == 1);
    while (f.size() < len) begin
      if (!clean_try && $urandom_range(0, 7) == 0) begin
        string p;
        p = all[$urandom_range(0, all.size() - 1)];
        for (int j = 0; j < p.len(); j++) f.push_back(p[j]);
      end else if (clean_try) f.push_back(byte'($urandom_range(32'h30, 32'h39)));
      else f.push_back(byte'(32'h61 + $urandom_range(0, 9)));
    end
    // every fourth frame: end with the head of a string, the next frame
    // starts with its last letter
    if (fr % 4 == 3 && fr + 1 < N_FRAMES) begin
      string p;
      p = all[$urandom_range(0, all.size() - 1)];
      for (int j = 0; j + 1 < p.len(); j++) f.push_back(p[j]);
      carry.push_back(p[p.len() - 1]);
    end
    exp_id = frame_id(f, npos, prio);
    if (fr % 4 == 0 && fr > 0) begin
      // this frame began with the carried last letter of a string; without
      // the reset at frame start it would complete that string at byte 0
      n_split++;
    end
    if (f.size() % 4 != 0) n_partial++;
    if (npos > 1) n_multi++;
    if (prio) n_prio++;
    if (exp_id == 0) n_clean++;
    in_frame = 1;
    receive_frame(f, 9, 1);
    in_frame = 0;
    repeat (3) @(negedge clk);
    snids_read(SNIDS_ADDR, rd);
    checks++;
    if (rd != 32'(exp_id)) begin
      failures++;
      $display("frame %0d (%0d bytes): ID %0d read, %0d expected", fr, f.size(), rd, exp_id);
    end
  end
  $display("frames %0d: stalls %0d, partial last words %0d, several matches %0d, same-byte matches in two modules %0d, clean %0d, split strings %0d",
           N_FRAMES, n_stall, n_partial, n_multi, n_prio, n_clean, n_split);
  if (n_stall == 0)   begin failures++; $display("no stall"); end
  if (n_partial == 0) begin failures++; $display("no partial word"); end
  if (n_multi == 0)   begin failures++; $display("no frame with several matches"); end
  if (n_prio == 0 && N_STR > 16) begin failures++; $display("no same-byte match in two modules"); end
  if (n_clean == 0)   begin failures++; $display("no clean frame"); end
  if (n_split == 0)   begin failures++; $display("no split string"); end
  $display("ID reads held back: %0d", n_ack_wait);
  if (ACK_WAIT_EXPECTED && n_ack_wait == 0) begin failures++; $display("no held-back read"); end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
