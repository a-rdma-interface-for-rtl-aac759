// packet_fifo: input FIFO of the RoCEv2 transmitter.
//
// Accepts a shot as an AXI-Stream (64-byte words, tkeep on the last word, tlast
// at the end of the shot) and cuts it into payloads of at most MAX_PAYLOAD
// bytes: a payload closes after MAX_PAYLOAD/64 words or at tlast. Payload words
// go into a word memory of DEPTH entries; the byte length of each closed
// payload goes into a small length queue. pkt_avail rises only when a complete
// payload is stored, which is the event that starts the frame generator.
// The FIFO holding one complete payload of at most 4096 bytes follows the
// published design; the length queue, the split rule and the first-word-fall-
// through read port are this implementation's choices.
//
// Interface: write side is AXIS (s_tready low when either store is full). Read
// side: rd_data shows the oldest word (first-word fall-through), rd_en pops
// it; pkt_len is the oldest complete payload's length in bytes, pkt_pop
// removes it. Payload lengths are assumed to be multiples of 4 bytes.
module packet_fifo
  import roce_pkg::*;
#(
  parameter int unsigned DEPTH       = 64,
  parameter int unsigned MAX_PAYLOAD = 4096,
  parameter int unsigned LQ_DEPTH    = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [DATA_W-1:0]     s_tdata,
  input  logic [WORD_BYTES-1:0] s_tkeep,
  input  logic                  s_tlast,
  input  logic                  s_tvalid,
  output logic                  s_tready,
  output logic                  pkt_avail,
  output logic [LEN_W-1:0]      pkt_len,
  input  logic                  pkt_pop,
  output logic [DATA_W-1:0]     rd_data,
  input  logic                  rd_en
);
  localparam int unsigned AW        = $clog2(DEPTH);
  localparam int unsigned LAW       = $clog2(LQ_DEPTH);
  localparam int unsigned MAX_WORDS = MAX_PAYLOAD / WORD_BYTES;

  // word store
  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW:0]       wp, rp;
  logic              full, empty;
  // length queue
  logic [LEN_W-1:0]  lq [LQ_DEPTH];
  logic [LAW:0]      lwp, lrp;
  logic              lq_full, lq_empty;
  // current payload
  logic [LEN_W-1:0]  bytes_q;
  logic [LEN_W-1:0]  bytes_now;
  logic              wr, close;

  assign full     = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign empty    = (wp == rp);
  assign lq_full  = (lwp[LAW] != lrp[LAW]) && (lwp[LAW-1:0] == lrp[LAW-1:0]);
  assign lq_empty = (lwp == lrp);

  assign s_tready = !full && !lq_full;
  assign wr       = s_tvalid && s_tready;

  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < WORD_BYTES; i++) n += int'(s_tkeep[i]);
    bytes_now = bytes_q + LEN_W'(n);
  end
  assign close = s_tlast || (bytes_now >= LEN_W'(MAX_WORDS * WORD_BYTES));

  always_ff @(posedge clk) begin
    if (wr) mem[wp[AW-1:0]] <= s_tdata;
    if (wr && close) lq[lwp[LAW-1:0]] <= bytes_now;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; lwp <= '0; lrp <= '0; bytes_q <= '0;
    end else begin
      if (wr) begin
        wp      <= wp + 1'b1;
        bytes_q <= close ? '0 : bytes_now;
        if (close) lwp <= lwp + 1'b1;
      end
      if (rd_en && !empty)      rp  <= rp + 1'b1;
      if (pkt_pop && !lq_empty) lrp <= lrp + 1'b1;
    end
  end

  assign pkt_avail = !lq_empty;
  assign pkt_len   = lq[lrp[LAW-1:0]];
  assign rd_data   = mem[rp[AW-1:0]];

  // the frame generator only reads words of payloads that are complete
  property p_no_underflow;
    @(posedge clk) disable iff (rst) rd_en |-> !empty;
  endproperty
  a_no_underflow: assert property (p_no_underflow);

endmodule
