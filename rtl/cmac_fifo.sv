// cmac_fifo: store-and-forward clock-domain bridge from the signal processing
// domain (160 MHz) to the CMAC transmit domain (322.27 MHz).
//
// The 100G MAC must receive each frame without gaps, while frames are written
// at less than half of the read clock rate. The FIFO therefore counts complete
// frames on the write side (at tlast), passes that count to the read side as a
// Gray code through a two-flop synchroniser, and starts reading a frame only
// when it is stored completely; once started, the frame is read out at the
// full read clock rate. DEPTH must hold the largest frame (66 words for a
// 4096-byte payload). The bridge itself follows the published design; packet
// mode and depth are this implementation's choices.
//
// Interface: AXIS slave (s_*, wr_clk) and AXIS master (m_*, rd_clk), 64-byte
// words with tkeep and tlast.
module cmac_fifo
  import roce_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                  wr_clk,
  input  logic                  wr_rst,
  input  logic [DATA_W-1:0]     s_tdata,
  input  logic [WORD_BYTES-1:0] s_tkeep,
  input  logic                  s_tlast,
  input  logic                  s_tvalid,
  output logic                  s_tready,
  input  logic                  rd_clk,
  input  logic                  rd_rst,
  output logic [DATA_W-1:0]     m_tdata,
  output logic [WORD_BYTES-1:0] m_tkeep,
  output logic                  m_tlast,
  output logic                  m_tvalid,
  input  logic                  m_tready
);
  localparam int unsigned W  = DATA_W + WORD_BYTES + 1;
  localparam int unsigned CW = $clog2(DEPTH) + 1;     // frame counter width

  logic full, empty, rd;

  async_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .wr_clk, .wr_rst, .wr_en(s_tvalid), .wr_data({s_tlast, s_tkeep, s_tdata}), .wr_full(full),
    .rd_clk, .rd_rst, .rd_en(rd), .rd_data({m_tlast, m_tkeep, m_tdata}), .rd_empty(empty)
  );

  assign s_tready = !full;

  // ---------------- complete frames written (write domain) ----------------
  logic [CW-1:0] wcnt, wcnt_gray;
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wcnt <= '0; wcnt_gray <= '0;
    end else if (s_tvalid && s_tready && s_tlast) begin
      wcnt      <= wcnt + 1'b1;
      wcnt_gray <= (wcnt + 1'b1) ^ ((wcnt + 1'b1) >> 1);
    end
  end

  // ---------------- frames available (read domain) ------------------------
  logic [CW-1:0] g1, g2, wcnt_r, rcnt;
  logic          in_frame;

  always_comb begin
    wcnt_r = '0;
    for (int i = CW - 1; i >= 0; i--)
      wcnt_r[i] = (i == CW - 1) ? g2[i] : (wcnt_r[i+1] ^ g2[i]);
  end

  assign m_tvalid = !empty && (in_frame || (wcnt_r != rcnt));
  assign rd       = m_tvalid && m_tready;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      g1 <= '0; g2 <= '0; rcnt <= '0; in_frame <= 1'b0;
    end else begin
      g1 <= wcnt_gray;
      g2 <= g1;
      if (rd) begin
        in_frame <= !m_tlast;
        if (m_tlast) rcnt <= rcnt + 1'b1;
      end
    end
  end

endmodule
