// opb_snoop_frontend: OPB slave that watches the processor read a received
// Ethernet frame out of the EMAC, turns the frame into a byte stream for the
// string matching engine, and reports the first matched string ID.
//
// How it works (structure as in the prototype's front-end):
//  * Address decoder: a completed read (OPB_Select, OPB_RNW and the bus-wide
//    OPB_xferAck all high) from the EMAC receive-length register starts a
//    frame: the length (bytes, OPB_DBus[16:31]) loads the counter register,
//    the matched-ID register is cleared and the engine is reset in the same
//    cycle. A completed read from the EMAC receive FIFO loads the 32-bit
//    word into the content register.
//  * Controller: while a word is held and the counter is nonzero, one byte
//    per cycle goes to the engine with eng_en high, byte 0 (OPB_DBus[0:7],
//    the first byte in memory on this big-endian bus) first, selected by a
//    2-bit position register. The counter decrements per byte, so a frame
//    whose length is not a multiple of four stops mid-word. Between words,
//    or once the counter is zero, eng_en is low and the engine holds its
//    state. A word therefore needs four cycles; the next FIFO read must not
//    complete sooner (the processor's copy loop is slower than that), or the
//    unfinished word is overwritten, a limitation of the original design.
//  * Matched String ID register: takes the first nonzero eng_sid after the
//    frame start and keeps it; later matches in the same frame are ignored.
//  * Slave port: an access to C_BASEADDR is acknowledged (Sln_xferAck) for
//    one cycle; on a read the ID is returned right-aligned in Sln_DBus.
//    Outside that cycle every slave output is zero, as OPB requires for its
//    OR-ed bus. Writes are acknowledged and ignored.
//  * Engine latency (ENG_LAT, cycles from a byte to its SID): the
//    acknowledge is held back while bytes fed in the last ENG_LAT cycles
//    are still inside the engine, so the ID read covers the whole frame,
//    and for ENG_LAT cycles after a frame start the engine output is not
//    recorded, so a late result of the previous frame cannot land in the
//    new one. With the monolithic engine (ENG_LAT = 2) and a processor copy
//    loop of a few instructions per word neither ever delays anything; they
//    matter for the deeper pipelined engine. The wait stays well inside the
//    16 cycles OPB allows before an acknowledge.
//
// The addresses are parameters, as in the prototype; their default values,
// the 16-bit length field, resetting the engine in the capture cycle, the
// one-cycle acknowledge and the latency handling are this design's
// choices.
module opb_snoop_frontend #(
  parameter logic [0:31]  C_BASEADDR           = 32'h7E00_0000,
  parameter logic [0:31]  C_EMAC_BASEADDR      = 32'h40C0_0000,
  parameter logic [0:31]  C_EMAC_RXLEN_OFFSET  = 32'h0000_3010,
  parameter logic [0:31]  C_EMAC_RXFIFO_OFFSET = 32'h0000_8100,
  parameter int unsigned  LEN_W                = 16,
  parameter int unsigned  SID_W                = 7,
  parameter int unsigned  ENG_LAT              = 2   // engine: byte in to SID out, cycles
) (
  // global OPB signals
  input  logic               OPB_Clk,
  input  logic               OPB_Rst,
  input  logic [0:31]        OPB_ABus,
  input  logic [0:3]         OPB_BE,
  input  logic [0:31]        OPB_DBus,
  input  logic               OPB_RNW,
  input  logic               OPB_Select,
  input  logic               OPB_SeqAddr,
  input  logic               OPB_xferAck,
  // slave OPB signals
  output logic [0:31]        Sln_DBus,
  output logic               Sln_xferAck,
  output logic               Sln_errAck,
  output logic               Sln_retry,
  output logic               Sln_toutSup,
  // string matching engine
  output logic [7:0]         eng_din,
  output logic               eng_en,
  output logic               eng_rst,
  input  logic [SID_W-1:0]   eng_sid
);

  localparam logic [0:31] RXLEN_ADDR  = C_EMAC_BASEADDR + C_EMAC_RXLEN_OFFSET;
  localparam logic [0:31] RXFIFO_ADDR = C_EMAC_BASEADDR + C_EMAC_RXFIFO_OFFSET;

  // address decoder
  logic rd_done, cap_len, cap_word, own_hit;
  assign rd_done  = OPB_Select && OPB_RNW && OPB_xferAck;
  assign cap_len  = rd_done && OPB_ABus == RXLEN_ADDR;
  assign cap_word = rd_done && OPB_ABus == RXFIFO_ADDR;
  assign own_hit  = OPB_Select && OPB_ABus[0:29] == C_BASEADDR[0:29];

  // counter, content and position registers, matched-ID register
  logic [LEN_W-1:0]  count;
  logic [0:31]       word;
  logic [1:0]        pos;
  logic              word_valid;
  logic [SID_W-1:0]  sid_q;
  logic              ack_q, rd_q;
  logic [$clog2(ENG_LAT+1)-1:0] drain, blank;
  logic              busy;

  assign eng_en  = word_valid && count != '0;
  assign eng_din = word[8*pos +: 8];
  assign eng_rst = OPB_Rst || cap_len;

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      count      <= '0;
      word       <= '0;
      pos        <= '0;
      word_valid <= 1'b0;
      sid_q      <= '0;
    end else if (cap_len) begin
      count      <= OPB_DBus[32-LEN_W:31];
      word_valid <= 1'b0;
      pos        <= '0;
      sid_q      <= '0;
    end else begin
      if (cap_word) begin
        word       <= OPB_DBus;
        pos        <= '0;
        word_valid <= 1'b1;
      end else if (eng_en) begin
        pos <= pos + 2'd1;
        if (pos == 2'd3 || count == LEN_W'(1)) word_valid <= 1'b0;
      end
      if (eng_en) count <= count - LEN_W'(1);
      if (sid_q == '0 && eng_sid != '0 && blank == '0) sid_q <= eng_sid;
    end
  end

  // Engine pipeline tracking: drain counts down the cycles until the last
  // byte fed has left the engine; blank hides the engine output for as long
  // after a frame start, so a result of the previous frame still on its way
  // out is not taken for this frame.
  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      drain <= '0;
      blank <= '0;
    end else begin
      if (eng_en)              drain <= ($bits(drain))'(ENG_LAT);
      else if (drain != '0)    drain <= drain - 1'b1;
      if (cap_len)             blank <= ($bits(blank))'(ENG_LAT);
      else if (blank != '0)    blank <= blank - 1'b1;
    end
  end
  assign busy = eng_en || drain != '0;

  // slave port: one-cycle acknowledge, data only during the acknowledge
  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      ack_q <= 1'b0;
      rd_q  <= 1'b0;
    end else begin
      ack_q <= own_hit && !ack_q && !busy;
      rd_q  <= OPB_RNW;
    end
  end

  always_comb begin
    Sln_DBus = '0;
    if (ack_q && rd_q) Sln_DBus[32-SID_W:31] = sid_q;
  end
  assign Sln_xferAck = ack_q;
  assign Sln_errAck  = 1'b0;
  assign Sln_retry   = 1'b0;
  assign Sln_toutSup = 1'b0;

endmodule
