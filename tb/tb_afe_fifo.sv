// tb_afe_fifo: writes a counting sequence at 120 MHz (on 3 of 4 cycles, like
// the merged AFE stream) and reads it at 160 MHz with a random ready, checking
// order and content across the clock crossing and that nothing is dropped.
// Then the reader stops, the FIFO fills, and the words written into the full
// FIFO must be counted as overflows while the stored ones still read back in
// order.
module tb_afe_fifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #4.167 wclk = ~wclk;   // 120 MHz
  always #3.125 rclk = ~rclk;   // 160 MHz

  localparam int W = 513, D = 16;
  logic         wr_en, rd_valid, rd_ready;
  logic [W-1:0] wr_data, rd_data;
  logic [31:0]  overflow_cnt;
  int checks = 0, failures = 0;

  afe_fifo #(.WIDTH(W), .DEPTH(D)) dut (.wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .overflow_cnt,
                                        .rd_clk(rclk), .rd_rst(rrst), .rd_data, .rd_valid, .rd_ready);

  int wseq = 0, rseq = 0, written = 0;
  bit reader_on = 1, writer_on = 1;

  function automatic logic [W-1:0] pattern(int i);
    return {1'(i % 9 == 0), {16{32'(i * 32'h9E3779B9)}}};
  endfunction

  always @(posedge wclk) if (!wrst) begin
    if (writer_on && ($urandom % 4 != 0)) begin
      wr_en   <= 1'b1;
      wr_data <= pattern(wseq);
      wseq++;
    end else wr_en <= 1'b0;
  end

  always @(negedge rclk) rd_ready <= reader_on && ($urandom % 5 != 0);

  always @(posedge rclk) if (!rrst && rd_valid && rd_ready) begin
    checks++;
    if (rd_data !== pattern(rseq)) begin failures++; $display("word %0d wrong", rseq); end
    rseq++;
  end

  initial begin
    wr_en = 0; wr_data = '0; rd_ready = 0;
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    repeat (3000) @(posedge wclk);
    writer_on = 0;
    repeat (100) @(posedge wclk);
    checks++;
    if (rseq != wseq || overflow_cnt != 0) begin
      failures++; $display("read %0d of %0d, overflows %0d", rseq, wseq, overflow_cnt);
    end
    // overflow: stop reading, keep writing
    reader_on = 0;
    repeat (10) @(posedge rclk);
    begin
      automatic int start;
      start = wseq;
      writer_on = 1;
      repeat (100) @(posedge wclk);
      writer_on = 0;
      repeat (5) @(posedge wclk);
      written = wseq - start;
      checks++;
      if (overflow_cnt != 32'(written - D)) begin
        failures++; $display("overflows %0d, expected %0d", overflow_cnt, written - D);
      end
      reader_on = 1;
      repeat (60) @(posedge rclk);
      checks++;
      if (rseq != start + D) begin failures++; $display("read back %0d, expected %0d", rseq - start, D); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
