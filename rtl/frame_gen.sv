// frame_gen: RoCEv2 frame generator (Ethernet / IPv4 / UDP / BTH / DETH).
//
// When the packet FIFO reports a complete payload of P bytes, the generator
// emits one frame of F = 62 + P + 4 bytes on the 64-byte AXIS bus:
//   bytes 0..61      headers: Ethernet II, IPv4 (DF, TTL 64, computed header
//                    checksum), UDP to port 4791 (checksum 0), InfiniBand BTH
//                    for an unreliable-datagram SEND-only (opcode 0x64, PSN
//                    counting up per frame) and DETH (Q_Key, source QP),
//   bytes 62..61+P   the payload, realigned by 62 bytes across word borders,
//   bytes 62+P..F-1  a dummy ICRC (zero), replaced further down the pipeline.
// Output word n holds bytes 2..63 of payload word n-1 and bytes 0..1 of payload
// word n, so it is produced in the cycle payload word n is read; up to two
// words after the last payload word are flushed from the carry register.
// Header-then-payload-then-placeholder follows the published design; the exact
// header fields and their values are this implementation's choices, taken from
// the RoCEv2 unreliable-datagram packet format.
//
// Interface: AXIS master with tkeep/tlast plus sideband m_sof (first word) and
// m_len (F, constant over the frame). One idle cycle separates frames. The
// payload FIFO is read first-word-fall-through with fifo_rd.
module frame_gen
  import roce_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  hdr_cfg_t              cfg,
  input  logic                  pkt_avail,
  input  logic [LEN_W-1:0]      pkt_len,
  output logic                  pkt_pop,
  input  logic [DATA_W-1:0]     fifo_data,
  output logic                  fifo_rd,
  output logic [DATA_W-1:0]     m_tdata,
  output logic [WORD_BYTES-1:0] m_tkeep,
  output logic                  m_tlast,
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic                  m_sof,
  output logic [LEN_W-1:0]      m_len
);
  localparam int unsigned NB = WORD_BYTES;

  typedef enum logic {IDLE, SEND} state_t;
  state_t state;
  logic [23:0] psn;               // BTH packet sequence number

  logic [LEN_W-1:0]      plen, flen, nwords, pwords, n;
  logic [8*HDR_BYTES-1:0] hdr_q, hdr_d;
  logic [DATA_W-1:0]     carry;
  logic                  adv;

  assign adv = !m_tvalid || m_tready;

  // ---------------- header bytes for a payload of pkt_len bytes ----------
  function automatic logic [15:0] ip_checksum(logic [15:0] tot_len, logic [31:0] sip, logic [31:0] dip);
    logic [19:0] s;
    s = 20'h4500 + 20'(tot_len) + 20'h4000 + 20'h4011
      + 20'(sip[31:16]) + 20'(sip[15:0]) + 20'(dip[31:16]) + 20'(dip[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

  always_comb begin
    logic [7:0]  h [HDR_BYTES];
    logic [15:0] ip_len, udp_len, csum;
    ip_len  = 16'(pkt_len) + 16'd52;   // IPv4 20 + UDP 8 + BTH 12 + DETH 8 + ICRC 4
    udp_len = 16'(pkt_len) + 16'd32;
    csum    = ip_checksum(ip_len, cfg.src_ip, cfg.dst_ip);
    for (int i = 0; i < 6; i++) begin
      h[i]     = cfg.dst_mac[8*(5-i) +: 8];
      h[6 + i] = cfg.src_mac[8*(5-i) +: 8];
    end
    h[12] = 8'h08; h[13] = 8'h00;                         // EtherType IPv4
    h[14] = 8'h45; h[15] = 8'h00;                         // version/IHL, ToS
    h[16] = ip_len[15:8]; h[17] = ip_len[7:0];
    h[18] = 8'h00; h[19] = 8'h00;                         // identification
    h[20] = 8'h40; h[21] = 8'h00;                         // DF
    h[22] = 8'h40; h[23] = 8'h11;                         // TTL 64, UDP
    h[24] = csum[15:8]; h[25] = csum[7:0];
    for (int i = 0; i < 4; i++) begin
      h[26 + i] = cfg.src_ip[8*(3-i) +: 8];
      h[30 + i] = cfg.dst_ip[8*(3-i) +: 8];
    end
    h[34] = cfg.udp_src_port[15:8]; h[35] = cfg.udp_src_port[7:0];
    h[36] = ROCEV2_UDP_PORT[15:8];  h[37] = ROCEV2_UDP_PORT[7:0];
    h[38] = udp_len[15:8]; h[39] = udp_len[7:0];
    h[40] = 8'h00; h[41] = 8'h00;                         // UDP checksum unused
    h[42] = BTH_OPC_UD_SEND_ONLY;
    h[43] = 8'h00;                                        // SE, M, PadCnt, TVer
    h[44] = cfg.p_key[15:8]; h[45] = cfg.p_key[7:0];
    h[46] = 8'h00;                                        // Resv8a
    for (int i = 0; i < 3; i++) begin
      h[47 + i] = cfg.dest_qp[8*(2-i) +: 8];
      h[51 + i] = psn[8*(2-i) +: 8];
      h[59 + i] = cfg.src_qp[8*(2-i) +: 8];
    end
    h[50] = 8'h00;                                        // AckReq, Resv7
    for (int i = 0; i < 4; i++) h[54 + i] = cfg.q_key[8*(3-i) +: 8];
    h[58] = 8'h00;
    for (int i = 0; i < HDR_BYTES; i++) hdr_d[8*i +: 8] = h[i];
  end

  // ---------------- output word n --------------------------------------
  logic              rd_now;
  logic [DATA_W-1:0] word;
  logic [WORD_BYTES-1:0] keep;

  assign rd_now = (state == SEND) && adv && (n < pwords);

  always_comb begin
    for (int j = 0; j < NB; j++) begin
      logic [LEN_W:0] f;
      logic [7:0]     b;
      f = (LEN_W+1)'({n, 6'd0}) + (LEN_W+1)'(j);
      if (n == 0 && j < int'(HDR_BYTES))  b = hdr_q[8*j +: 8];
      else if (j >= int'(HDR_BYTES))      b = fifo_data[8*(j - HDR_BYTES) +: 8];
      else                                b = carry[8*(j + NB - HDR_BYTES) +: 8];
      if (f >= (LEN_W+1)'(plen) + (LEN_W+1)'(HDR_BYTES)) b = 8'h00;  // ICRC placeholder, tail
      word[8*j +: 8] = b;
      keep[j]        = (f < (LEN_W+1)'(flen));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      m_tvalid <= 1'b0;
      psn      <= '0;
      n        <= '0;
      plen     <= '0;
      flen     <= '0;
      nwords   <= '0;
      pwords   <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      unique case (state)
        IDLE: if (pkt_avail) begin
          plen   <= pkt_len;
          flen   <= pkt_len + LEN_W'(OVERHEAD);
          nwords <= (pkt_len + LEN_W'(OVERHEAD) + LEN_W'(NB - 1)) >> 6;
          pwords <= (pkt_len + LEN_W'(NB - 1)) >> 6;
          n      <= '0;
          state  <= SEND;
        end
        SEND: if (adv) begin
          m_tvalid <= 1'b1;
          n        <= n + 1'b1;
          if (n == nwords - 1'b1) begin
            state <= IDLE;
            psn   <= psn + 1'b1;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == IDLE && pkt_avail) hdr_q <= hdr_d;
    if (rd_now) carry <= fifo_data;
    if (state == SEND && adv) begin
      m_tdata <= word;
      m_tkeep <= keep;
      m_tlast <= (n == nwords - 1'b1);
      m_sof   <= (n == 0);
      m_len   <= flen;
    end
  end

  assign pkt_pop = (state == IDLE) && pkt_avail;
  assign fifo_rd = rd_now;

endmodule
