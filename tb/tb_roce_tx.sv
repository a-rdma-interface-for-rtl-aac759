// tb_roce_tx: end-to-end test of the RoCEv2 transmitter. Shots of random size
// (multiples of 4 bytes, up to 40000 bytes) go in; the frames that come out are
// checked for length, header fields, PSN sequence and ICRC (against a
// bit-serial reference), and their payloads are concatenated and compared with
// the shots. Part of the run has random backpressure at the output. With the
// output always ready, a stream of 4096-byte payloads must leave at one frame
// per 72 clocks or better (66 words plus the refill of the one-payload FIFO).
module tb_roce_tx;
  import roce_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  hdr_cfg_t              cfg;
  logic [DATA_W-1:0]     s_tdata, m_tdata;
  logic [WORD_BYTES-1:0] s_tkeep, m_tkeep;
  logic                  s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  logic [31:0]           frames;
  int checks = 0, failures = 0;

  roce_tx dut (.clk, .rst, .cfg, .s_tdata, .s_tkeep, .s_tlast, .s_tvalid, .s_tready,
               .m_tdata, .m_tkeep, .m_tlast, .m_tvalid, .m_tready, .frames);

  logic [7:0] exp_bytes[$];
  int         exp_frames = 0;

  task automatic send_shot(int bytes);
    int nw = (bytes + 63) / 64;
    exp_frames += (bytes + 4095) / 4096;
    #1;
    for (int w = 0; w < nw; w++) begin
      for (int j = 0; j < 64; j++) begin
        s_tdata[8*j +: 8] = 8'($urandom);
        s_tkeep[j] = (64*w + j < bytes);
        if (s_tkeep[j]) exp_bytes.push_back(s_tdata[8*j +: 8]);
      end
      s_tlast  = (w == nw - 1);
      s_tvalid = 1;
      @(negedge clk);
      while (!s_tready) @(negedge clk);
      @(posedge clk); #1;
      s_tvalid = 0;
    end
  endtask

  bit random_ready = 0;
  always @(negedge clk) m_tready <= random_ready ? 1'($urandom % 3 != 0) : 1'b1;

  logic [7:0] fr[$];
  int     nframes = 0, straddle = 0;
  longint cyc = 0, t_first = 0, t_last = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    for (int j = 0; j < 64; j++) if (m_tkeep[j]) fr.push_back(m_tdata[8*j +: 8]);
    if (m_tlast) begin
      int p, e;
      e = 0;
      p = fr.size() - 66;
      if (p <= 0 || p > 4096) e++;
      else begin
        if (be16(fr, 16) != 32'(52 + p) || !ip_csum_ok(fr)) e++;
        if (be16(fr, 36) != 32'd4791 || fr[42] != 8'h64) e++;
        if (be24(fr, 51) != 32'(nframes)) e++;
        if ({fr[fr.size()-1], fr[fr.size()-2], fr[fr.size()-3], fr[fr.size()-4]} != icrc_ref(fr)) begin
          e++;
          $display("ICRC %h, expected %h", {fr[fr.size()-1], fr[fr.size()-2], fr[fr.size()-3], fr[fr.size()-4]}, icrc_ref(fr));
        end
        if ((62 + p) % 64 > 60) straddle++;
        for (int i = 0; i < p; i++) begin
          if (exp_bytes.size() == 0 || fr[62+i] != exp_bytes[0]) e++;
          if (exp_bytes.size() > 0) void'(exp_bytes.pop_front());
        end
      end
      checks++;
      if (e != 0) begin failures++; $display("frame %0d (payload %0d): %0d errors", nframes, p, e); end
      fr.delete();
      nframes++;
      t_last = cyc;
    end
    if (fr.size() == 64 && nframes == 0) t_first = cyc;
  end

  initial begin
    cfg = '{dst_mac: 48'h0C42A1B2C3D4, src_mac: 48'h02000000AB01, src_ip: 32'hC0A80A02,
            dst_ip: 32'hC0A80A01, udp_src_port: 16'hC001, p_key: 16'hFFFF,
            dest_qp: 24'h000123, q_key: 32'h11111111, src_qp: 24'h000001};
    s_tvalid = 0; s_tlast = 0; s_tkeep = '0; s_tdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // rate: 16 full payloads, output always ready
    send_shot(16 * 4096);
    while (nframes != 16) @(posedge clk);
    checks++;
    $display("16 frames of 4096-byte payload in %0d cycles after the first", t_last - t_first);
    if (t_last - t_first > 15 * 72) begin failures++; $display("too slow"); end
    // random sizes with backpressure
    random_ready = 1;
    for (int i = 0; i < 25; i++) send_shot(4 * (1 + $urandom % 10000));
    send_shot(4096 + 64 * 4);
    while (nframes != exp_frames) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_bytes.size() != 0 || frames != 32'(nframes)) begin
      failures++; $display("%0d bytes missing, frame counter %0d vs %0d", exp_bytes.size(), frames, nframes);
    end
    checks++;
    if (straddle == 0) begin failures++; $display("no ICRC straddled two words"); end
    $display("frames %0d, ICRC across a word border %0d", nframes, straddle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: frames %0d of %0d", nframes, exp_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
