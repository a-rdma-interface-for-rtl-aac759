// tb_cmac_fifo: frames of random length (2 to 66 words) are written at 160 MHz
// with random gaps and read at 322.27 MHz. Checks: every word arrives in order
// with its tkeep and tlast; with the MAC always ready, a frame, once started,
// leaves without a single idle cycle (store-and-forward); and a frame is not
// started before its last word has been written.
module tb_cmac_fifo;
  import roce_pkg::*;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #3.125 wclk = ~wclk;   // 160 MHz
  always #1.5515 rclk = ~rclk;  // 322.27 MHz

  logic [DATA_W-1:0]     s_tdata, m_tdata;
  logic [WORD_BYTES-1:0] s_tkeep, m_tkeep;
  logic                  s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  int checks = 0, failures = 0;

  cmac_fifo dut (.wr_clk(wclk), .wr_rst(wrst), .s_tdata, .s_tkeep, .s_tlast, .s_tvalid, .s_tready,
                 .rd_clk(rclk), .rd_rst(rrst), .m_tdata, .m_tkeep, .m_tlast, .m_tvalid, .m_tready);

  typedef struct packed { logic last; logic [WORD_BYTES-1:0] keep; logic [DATA_W-1:0] data; } w_t;
  w_t exp_q[$];
  int frames_written = 0, frames_read = 0, gaps = 0, early = 0;
  bit random_ready = 0;
  logic in_frame = 0;

  always @(negedge rclk) m_tready <= random_ready ? 1'($urandom % 4 != 0) : 1'b1;

  always @(posedge rclk) if (!rrst) begin
    if (in_frame && !m_tvalid && !random_ready) gaps++;
    if (m_tvalid && m_tready) begin
      w_t e;
      if (!in_frame && frames_read >= frames_written) early++;
      e = exp_q.pop_front();
      checks++;
      if ({m_tlast, m_tkeep, m_tdata} !== e) begin failures++; $display("word mismatch in frame %0d", frames_read); end
      in_frame = !m_tlast;
      if (m_tlast) frames_read++;
    end
  end

  task automatic send_frame(int nw);
    for (int w = 0; w < nw; w++) begin
      w_t x;
      while ($urandom % 3 == 0) @(posedge wclk);
      #0.1;
      for (int j = 0; j < 16; j++) x.data[32*j +: 32] = $urandom;
      x.last = (w == nw - 1);
      x.keep = x.last ? 64'((65'd1 << (1 + $urandom % 64)) - 1) : '1;
      {s_tlast, s_tkeep, s_tdata} = x;
      s_tvalid = 1;
      exp_q.push_back(x);
      @(negedge wclk);
      while (!s_tready) @(negedge wclk);
      @(posedge wclk);
      if (x.last) frames_written++;
      #0.1 s_tvalid = 0;
    end
  endtask

  initial begin
    s_tvalid = 0; s_tdata = '0; s_tkeep = '0; s_tlast = 0;
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    for (int i = 0; i < 40; i++) send_frame(2 + $urandom % 65);
    random_ready = 1;
    for (int i = 0; i < 40; i++) send_frame(2 + $urandom % 65);
    repeat (400) @(posedge wclk);
    checks++;
    if (frames_read != 80 || exp_q.size() != 0) begin failures++; $display("frames read %0d", frames_read); end
    checks++;
    if (gaps != 0) begin failures++; $display("%0d idle cycles inside frames", gaps); end
    checks++;
    if (early != 0) begin failures++; $display("%0d frames started before complete", early); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
