// roce_tx: RoCEv2 (RDMA over Converged Ethernet v2) transmitter for a 64-byte
// AXI-Stream data path.
//
// A shot arriving on s_* is cut into payloads of at most MAX_PAYLOAD bytes in
// the packet FIFO. For each complete payload the frame generator emits an
// Ethernet/IPv4/UDP/BTH/DETH frame with a dummy ICRC at its end. That stream
// feeds two paths in parallel: the 16-stage ICRC calculator and a 16-stage
// delay line. When a word leaves the delay line, the ICRC of its frame is
// final, and the output multiplexer writes it over the dummy bytes (the four
// ICRC bytes may fall in one word or straddle two). The structure is the
// published one; the whole-pipeline stall (every stage advances only when the
// output is free) is this implementation's choice.
//
// Interface: AXIS slave in, AXIS master out (64-byte words, tkeep/tlast), both
// on clk. Throughput: one word per clock while the output is ready, plus two
// idle cycles per frame. Latency: about 17 cycles from a frame word leaving the
// generator to the output.
module roce_tx
  import roce_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD = 4096,
  parameter int unsigned FIFO_DEPTH  = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  hdr_cfg_t              cfg,
  input  logic [DATA_W-1:0]     s_tdata,
  input  logic [WORD_BYTES-1:0] s_tkeep,
  input  logic                  s_tlast,
  input  logic                  s_tvalid,
  output logic                  s_tready,
  output logic [DATA_W-1:0]     m_tdata,
  output logic [WORD_BYTES-1:0] m_tkeep,
  output logic                  m_tlast,
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic [31:0]           frames
);
  localparam int unsigned SB_W  = 1 + LEN_W + 1 + WORD_BYTES;  // sof, len, last, keep
  localparam int unsigned STAGES = 16;

  logic                  pkt_avail, pkt_pop, fifo_rd;
  logic [LEN_W-1:0]      pkt_len;
  logic [DATA_W-1:0]     fifo_data;

  logic [DATA_W-1:0]     g_data;
  logic [WORD_BYTES-1:0] g_keep;
  logic                  g_last, g_valid, g_sof;
  logic [LEN_W-1:0]      g_len;
  logic                  en;

  packet_fifo #(.DEPTH(FIFO_DEPTH), .MAX_PAYLOAD(MAX_PAYLOAD)) u_fifo (
    .clk, .rst,
    .s_tdata, .s_tkeep, .s_tlast, .s_tvalid, .s_tready,
    .pkt_avail, .pkt_len, .pkt_pop,
    .rd_data(fifo_data), .rd_en(fifo_rd)
  );

  frame_gen u_gen (
    .clk, .rst, .cfg,
    .pkt_avail, .pkt_len, .pkt_pop,
    .fifo_data, .fifo_rd,
    .m_tdata(g_data), .m_tkeep(g_keep), .m_tlast(g_last), .m_tvalid(g_valid),
    .m_tready(en), .m_sof(g_sof), .m_len(g_len)
  );

  // ---------------- ICRC and delay line, stalled together -----------------
  logic              c_valid;
  logic [31:0]       icrc;
  logic              q_valid;
  logic [DATA_W-1:0] q_data;
  logic [SB_W-1:0]   q_sb;

  assign en = !q_valid || m_tready;

  icrc_calc u_icrc (
    .clk, .rst, .en,
    .s_valid(g_valid), .s_sof(g_sof), .s_len(g_len), .s_data(g_data),
    .o_valid(c_valid), .icrc
  );

  stream_delay #(.DEPTH(STAGES), .W(DATA_W + SB_W)) u_dly (
    .clk, .rst, .en, .d_valid(g_valid), .d({g_sof, g_len, g_last, g_keep, g_data}),
    .q_valid, .q({q_sb, q_data})
  );

  // ---------------- ICRC insertion ("dummy CRC?" multiplexer) -------------
  logic                  q_sof, q_last;
  logic [LEN_W-1:0]      q_len;
  logic [WORD_BYTES-1:0] q_keep;
  logic [LEN_W-1:0]      widx_q, widx;

  assign {q_sof, q_len, q_last, q_keep} = q_sb;
  assign widx = q_sof ? '0 : widx_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      widx_q <= '0;
      frames <= '0;
    end else if (q_valid && m_tready) begin
      widx_q <= widx + 1'b1;
      if (q_last) frames <= frames + 1'b1;
    end
  end

  always_comb begin
    logic [LEN_W-1:0] icrc_pos;
    icrc_pos = q_len - LEN_W'(ICRC_BYTES);
    m_tdata  = q_data;
    for (int j = 0; j < WORD_BYTES; j++) begin
      logic [LEN_W:0] f;
      f = (LEN_W+1)'({widx, 6'd0}) + (LEN_W+1)'(j);
      for (int b = 0; b < int'(ICRC_BYTES); b++)
        if (f == (LEN_W+1)'(icrc_pos) + (LEN_W+1)'(b)) m_tdata[8*j +: 8] = icrc[8*b +: 8];
    end
  end

  assign m_tkeep  = q_keep;
  assign m_tlast  = q_last;
  assign m_tvalid = q_valid;

  // the ICRC pipeline and the delay line must stay aligned
  a_aligned: assert property (@(posedge clk) disable iff (rst) c_valid == q_valid);

endmodule
