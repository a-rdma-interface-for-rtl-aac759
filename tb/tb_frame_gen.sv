// tb_frame_gen: feeds payloads of random length (4 to 4096 bytes, multiples of
// 4) from a model of the packet FIFO, with random backpressure, and checks every
// byte of each generated frame: Ethernet, IPv4 (length, checksum), UDP (port
// 4791, length), BTH (opcode, P_Key, destination QP, PSN counting up), DETH,
// the realigned payload and the zero ICRC placeholder, plus tkeep, tlast,
// m_sof and m_len. It also checks that the frame words follow each other
// without gaps while the sink is ready (one word per clock).
module tb_frame_gen;
  import roce_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  hdr_cfg_t              cfg;
  logic                  pkt_avail, pkt_pop, fifo_rd;
  logic [LEN_W-1:0]      pkt_len;
  logic [DATA_W-1:0]     fifo_data, m_tdata;
  logic [WORD_BYTES-1:0] m_tkeep;
  logic                  m_tlast, m_tvalid, m_tready, m_sof;
  logic [LEN_W-1:0]      m_len;
  int checks = 0, failures = 0;

  frame_gen dut (.clk, .rst, .cfg, .pkt_avail, .pkt_len, .pkt_pop, .fifo_data, .fifo_rd,
                 .m_tdata, .m_tkeep, .m_tlast, .m_tvalid, .m_tready, .m_sof, .m_len);

  // packet FIFO model
  int                len_q[$];
  logic [DATA_W-1:0] word_q[$];
  logic [7:0]        pay_q[$][$];   // expected payload bytes per packet
  function automatic void show_head();
    pkt_avail = len_q.size() > 0;
    pkt_len   = pkt_avail ? LEN_W'(len_q[0]) : '0;
    fifo_data = (word_q.size() > 0) ? word_q[0] : '0;
  endfunction
  always @(posedge clk) begin
    if (pkt_pop) void'(len_q.pop_front());
    if (fifo_rd) begin
      checks++;
      if (word_q.size() == 0) begin failures++; $display("read from empty FIFO"); end
      else void'(word_q.pop_front());
    end
    #1 show_head();
  end

  task automatic add_packet(int p);
    logic [7:0] b[$];
    for (int w = 0; w < (p + 63) / 64; w++) begin
      logic [DATA_W-1:0] d;
      for (int j = 0; j < 64; j++) begin
        d[8*j +: 8] = 8'($urandom);
        if (64*w + j < p) b.push_back(d[8*j +: 8]);
      end
      word_q.push_back(d);
    end
    pay_q.push_back(b);
    len_q.push_back(p);
    show_head();
  endtask

  bit ready_always = 1;
  always @(negedge clk) m_tready <= ready_always ? 1'b1 : 1'($urandom % 3 != 0);

  // collect frames
  logic [7:0] fr[$];
  int nframes = 0, gaps = 0, wcount = 0;
  logic in_frame = 0;
  always @(posedge clk) if (!rst) begin
    if (in_frame && !m_tvalid && ready_always) gaps++;
    if (m_tvalid && m_tready) begin
      checks++;
      if (m_sof !== (wcount == 0)) begin failures++; $display("m_sof wrong at word %0d", wcount); end
      for (int j = 0; j < 64; j++) if (m_tkeep[j]) fr.push_back(m_tdata[8*j +: 8]);
      wcount++;
      in_frame = !m_tlast;
      if (m_tlast) begin
        check_frame(int'(m_len));
        fr.delete();
        wcount = 0;
        nframes++;
      end
    end
  end

  task automatic check_frame(int mlen);
    logic [7:0] pay[$];
    int p;
    int e;
    pay = pay_q.pop_front();
    p = pay.size();
    e = 0;
    if (fr.size() != p + 66 || mlen != p + 66) e++;
    else begin
      for (int i = 0; i < 6; i++) begin
        if (fr[i] != cfg.dst_mac[8*(5-i) +: 8]) e++;
        if (fr[6+i] != cfg.src_mac[8*(5-i) +: 8]) e++;
      end
      if (be16(fr, 12) != 32'h0800 || fr[14] != 8'h45) e++;
      if (be16(fr, 16) != 52 + p) e++;
      if (!ip_csum_ok(fr)) e++;
      if (fr[23] != 8'h11) e++;
      for (int i = 0; i < 4; i++) begin
        if (fr[26+i] != cfg.src_ip[8*(3-i) +: 8]) e++;
        if (fr[30+i] != cfg.dst_ip[8*(3-i) +: 8]) e++;
        if (fr[54+i] != cfg.q_key[8*(3-i) +: 8]) e++;
      end
      if (be16(fr, 34) != 32'(cfg.udp_src_port) || be16(fr, 36) != 4791 || be16(fr, 38) != 32 + p) e++;
      if (fr[42] != 8'h64 || be16(fr, 44) != 32'(cfg.p_key)) e++;
      if (be24(fr, 47) != 32'(cfg.dest_qp) || be24(fr, 59) != 32'(cfg.src_qp)) e++;
      if (be24(fr, 51) != nframes) e++;
      for (int i = 0; i < p; i++) if (fr[62+i] != pay[i]) e++;
      for (int i = 0; i < 4; i++) if (fr[62+p+i] != 8'h00) e++;
    end
    checks++;
    if (e != 0) begin failures++; $display("frame %0d (payload %0d): %0d wrong fields/bytes", nframes, p, e); end
  endtask

  initial begin
    cfg = '{dst_mac: 48'h0C42A1B2C3D4, src_mac: 48'h02000000AB01, src_ip: 32'hC0A80A02,
            dst_ip: 32'hC0A80A01, udp_src_port: 16'hC001, p_key: 16'hFFFF,
            dest_qp: 24'h000123, q_key: 32'h11111111, src_qp: 24'h000001};
    m_tready = 1;
    show_head();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // unthrottled: frames must be gap-free
    for (int i = 0; i < 6; i++) add_packet(4096 - 4 * i * 17);
    while (!(len_q.size() == 0 && nframes == 6)) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (gaps != 0) begin failures++; $display("%0d idle cycles inside frames", gaps); end
    ready_always = 0;
    for (int i = 0; i < 60; i++) add_packet(4 * (1 + $urandom % 1024));
    for (int p = 4; p <= 256; p += 4) add_packet(p);
    while (nframes != 6 + 60 + 64) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (word_q.size() != 0) begin failures++; $display("%0d payload words not read", word_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired: frames %0d, lengths left %0d, words left %0d, state %0d", nframes, len_q.size(), word_q.size(), dut.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
