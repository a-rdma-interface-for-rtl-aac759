// tb_packetizer: feeds a continuous numbered word stream in which every ninth
// word carries the group flag (as the merged AFE stream does), sends triggers
// for shots of various N_s, and checks that each shot starts at the first group
// word after the trigger, has ceil(N_s*144/64) words, marks the valid bytes of
// its last word in tkeep and ends with tlast; that words outside shots are
// discarded; that triggers during a shot are counted as missed; and that the
// output is held under backpressure without losing words.
module tb_packetizer;
  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;

  logic         trigger, s_group, s_valid, s_ready;
  logic [15:0]  n_samples;
  logic [511:0] s_data, m_tdata;
  logic [63:0]  m_tkeep;
  logic         m_tlast, m_tvalid, m_tready, busy;
  logic [31:0]  shots, missed_triggers;
  int checks = 0, failures = 0;

  packetizer dut (.clk, .rst, .trigger, .n_samples, .s_data, .s_group, .s_valid, .s_ready,
                  .m_tdata, .m_tkeep, .m_tlast, .m_tvalid, .m_tready, .busy, .shots, .missed_triggers);

  // source: word i holds i; present with random gaps
  int src = 0;
  always @(posedge clk) if (!rst) begin
    if (s_valid && s_ready) src <= src + 1;
  end
  always @(negedge clk) begin
    s_valid <= !rst && ($urandom % 5 != 0);
  end
  assign s_data  = 512'(src);
  assign s_group = (src % 9 == 0);

  bit random_ready = 0;
  always @(negedge clk) m_tready <= random_ready ? 1'($urandom % 3 != 0) : 1'b1;

  // sink
  int cur_ns = 0, trig_src = 0, shot_words = 0, first = -1, prev = -1, got_shots = 0;
  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    automatic int v, exp_words, exp_last, exp_first;
    v         = int'(m_tdata[31:0]);
    exp_words = (cur_ns * 144 + 63) / 64;
    exp_last  = cur_ns * 144 - 64 * (exp_words - 1);
    if (shot_words == 0) begin
      exp_first = ((trig_src + 8) / 9) * 9;
      checks++;
      if (v < exp_first || v > exp_first + 9 || v % 9 != 0) begin
        failures++; $display("shot starts at word %0d, trigger at %0d", v, trig_src);
      end
    end else begin
      checks++;
      if (v != prev + 1) begin failures++; $display("word %0d after %0d", v, prev); end
    end
    prev = v;
    shot_words++;
    checks++;
    if (m_tlast != (shot_words == exp_words)) begin failures++; $display("tlast wrong at word %0d of %0d", shot_words, exp_words); end
    if (m_tlast) begin
      checks++;
      if (m_tkeep != 64'((65'd1 << exp_last) - 1)) begin failures++; $display("tkeep %h, %0d bytes expected", m_tkeep, exp_last); end
      shot_words = 0;
      got_shots++;
    end else begin
      checks++;
      if (m_tkeep != '1) begin failures++; $display("partial tkeep inside shot"); end
    end
  end

  task automatic shot(int ns, bit extra_trigger);
    @(posedge clk); #1;
    cur_ns = ns; n_samples = 16'(ns); trig_src = src;
    trigger = 1; @(posedge clk); #1; trigger = 0;
    if (extra_trigger) begin repeat (5) @(posedge clk); #1; trigger = 1; @(posedge clk); #1; trigger = 0; end
    while (busy) @(posedge clk);
    repeat ($urandom % 20) @(posedge clk);
  endtask

  initial begin
    trigger = 0; n_samples = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (30) @(posedge clk);
    shot(4, 0); shot(1, 0); shot(7, 1); shot(100, 0);
    random_ready = 1;
    shot(33, 1); shot(2, 0); shot(500, 1); shot(3, 0);
    repeat (10) @(posedge clk);
    checks++;
    if (got_shots != 8 || shots != 8) begin failures++; $display("shots %0d / %0d", got_shots, shots); end
    checks++;
    if (missed_triggers != 3) begin failures++; $display("missed %0d, expected 3", missed_triggers); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
