// opb_bus_model.svh: OPB bus, processor and EMAC stand-ins shared by the
// testbenches of the snooping front-end and of the whole core. Included
// inside a testbench module that declares clk, checks and failures.
//
// The OR-ed OPB data and acknowledge are built here from the master, the
// EMAC stand-in and the core's slave outputs (Sln_*). The processor side is
// a set of tasks:
//   emac_read(addr, data, wait)  a read of the EMAC; the EMAC stand-in
//                                acknowledges after `wait` cycles, putting
//                                data on the bus
//   receive_frame(bytes, gap)    the driver's copy loop: read the length
//                                register, then one FIFO word per load,
//                                `gap` (or a random 4..gap) cycles apart
//   snids_read(addr, data)       read the matched-ID register; checks the
//                                acknowledge arrives within 16 cycles and
//                                lasts one cycle; counts in n_ack_wait the
//                                reads whose acknowledge was held back
// Bytes of a word go big-endian: byte 0 in OPB_DBus[0:7].

localparam logic [0:31] EMAC_BASE   = 32'h40C0_0000;
localparam logic [0:31] RXLEN_ADDR  = EMAC_BASE + 32'h0000_3010;
localparam logic [0:31] RXFIFO_ADDR = EMAC_BASE + 32'h0000_8100;

logic [0:31] OPB_ABus = '0, m_dbus = '0, emac_dbus = '0;
logic [0:3]  OPB_BE = '0;
logic        OPB_RNW = 0, OPB_Select = 0, OPB_SeqAddr = 0, emac_ack = 0;
logic [0:31] OPB_DBus, Sln_DBus;
logic        OPB_xferAck, Sln_xferAck, Sln_errAck, Sln_retry, Sln_toutSup;
int          n_ack_wait = 0;

assign OPB_DBus    = m_dbus | emac_dbus | Sln_DBus;
assign OPB_xferAck = emac_ack | Sln_xferAck;

// the slave outputs must be zero except while acknowledging
always @(posedge clk) begin
  if (!Sln_xferAck && Sln_DBus != '0) begin
    failures++;
    $display("%0t Sln_DBus driven outside an acknowledge", $time);
  end
  if (Sln_errAck || Sln_retry || Sln_toutSup) begin
    failures++;
    $display("%0t unexpected errAck/retry/toutSup", $time);
  end
end

task automatic emac_read(input logic [0:31] addr, input logic [0:31] data, input int wait_cycles);
  @(negedge clk);
  OPB_Select = 1; OPB_RNW = 1; OPB_ABus = addr; OPB_BE = 4'hF;
  repeat (wait_cycles) @(negedge clk);
  emac_ack = 1; emac_dbus = data;
  @(negedge clk);
  emac_ack = 0; emac_dbus = '0;
  OPB_Select = 0; OPB_RNW = 0; OPB_ABus = '0; OPB_BE = '0;
endtask

task automatic receive_frame(input byte f[$], input int gap, input bit random_gap);
  int nw;
  emac_read(RXLEN_ADDR, 32'(f.size()), 1);
  repeat (3) @(negedge clk);
  nw = (f.size() + 3) / 4;
  for (int w = 0; w < nw; w++) begin
    logic [0:31] d;
    d = '0;
    for (int b = 0; b < 4; b++)
      if (4 * w + b < f.size()) d[8*b +: 8] = f[4 * w + b];
    emac_read(RXFIFO_ADDR, d, 1);
    repeat (random_gap ? $urandom_range(3, gap) : gap) @(negedge clk);
  end
endtask

task automatic snids_read(input logic [0:31] addr, output logic [0:31] data);
  int n;
  @(negedge clk);
  OPB_Select = 1; OPB_RNW = 1; OPB_ABus = addr;
  n = 0;
  data = '0;
  while (!Sln_xferAck && n < 20) begin
    @(posedge clk); #1;
    n++;
  end
  checks++;
  if (!Sln_xferAck || n > 16) begin
    failures++;
    $display("%0t no acknowledge within 16 cycles", $time);
  end
  if (n > 1) n_ack_wait++;
  data = Sln_DBus;
  @(negedge clk);
  OPB_Select = 0; OPB_RNW = 0; OPB_ABus = '0;
  @(posedge clk); #1;
  checks++;
  if (Sln_xferAck) begin
    failures++;
    $display("%0t acknowledge longer than one cycle", $time);
  end
endtask
