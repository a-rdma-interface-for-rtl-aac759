// tb_packet_fifo: sends shots of random length (multiples of 4 bytes, up to
// 20000 bytes) and checks that they come out as payloads of 4096 bytes plus one
// shorter last payload, with the right lengths and data, that a payload is
// announced only once all of its words are stored, and that the writer is held
// off when the 64-word store is full.
module tb_packet_fifo;
  import roce_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [DATA_W-1:0]     s_tdata, rd_data;
  logic [WORD_BYTES-1:0] s_tkeep;
  logic                  s_tlast, s_tvalid, s_tready;
  logic                  pkt_avail, pkt_pop, rd_en;
  logic [LEN_W-1:0]      pkt_len;
  int checks = 0, failures = 0;
  int full_seen = 0;

  packet_fifo dut (.clk, .rst, .s_tdata, .s_tkeep, .s_tlast, .s_tvalid, .s_tready,
                   .pkt_avail, .pkt_len, .pkt_pop, .rd_data, .rd_en);

  int          exp_len[$];
  logic [DATA_W-1:0] exp_word[$];
  int          words_written = 0;     // words of the currently open payload written

  task automatic send_shot(int bytes);
    int nw = (bytes + 63) / 64;
    int rem = bytes;
    while (rem > 0) begin
      int p = (rem > 4096) ? 4096 : rem;
      exp_len.push_back(p);
      rem -= p;
    end
    #1;
    for (int w = 0; w < nw; w++) begin
      for (int j = 0; j < 16; j++) s_tdata[32*j +: 32] = $urandom;
      s_tlast  = (w == nw - 1);
      s_tkeep  = '1;
      if (s_tlast) for (int j = 0; j < 64; j++) s_tkeep[j] = (64*w + j < bytes);
      s_tvalid = 1;
      exp_word.push_back(s_tdata);
      @(negedge clk);
      while (!s_tready) begin full_seen++; @(negedge clk); end
      @(posedge clk); #1;
      s_tvalid = 0;
      if ($urandom % 8 == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    s_tvalid = 0; s_tlast = 0; s_tkeep = '0; s_tdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 12; i++) send_shot(4 * (1 + $urandom % 5000));
    send_shot(4096);
    send_shot(8192);
    send_shot(4100);
  end

  // reader: waits for a complete payload, then reads its words with gaps
  initial begin
    automatic int n = 0;
    pkt_pop = 0; rd_en = 0;
    @(negedge rst);
    forever begin
      int len, nw;
      @(posedge clk); #1;
      if (!pkt_avail) continue;
      len = int'(pkt_len);
      checks++;
      if (exp_len.size() == 0 || len != exp_len[0]) begin
        failures++; $display("payload %0d length %0d, expected %0d", n, len, exp_len.size() > 0 ? exp_len[0] : -1);
      end
      if (exp_len.size() > 0) void'(exp_len.pop_front());
      pkt_pop = 1; @(posedge clk); #1; pkt_pop = 0;
      // a slow reader makes the store fill up
      if (n % 3 == 0) repeat (150) @(posedge clk);
      nw = (len + 63) / 64;
      for (int w = 0; w < nw; w++) begin
        #0;
        checks++;
        if (rd_data !== exp_word[0]) begin failures++; $display("payload %0d word %0d data mismatch", n, w); end
        void'(exp_word.pop_front());
        rd_en = 1; @(posedge clk); #1; rd_en = 0;
        if ($urandom % 4 == 0) begin @(posedge clk); #1; end
      end
      n++;
      if (n == 0) break;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    checks++;
    if (exp_len.size() != 0 || exp_word.size() != 0) begin
      failures++; $display("left over: %0d payloads, %0d words", exp_len.size(), exp_word.size());
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("store never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
