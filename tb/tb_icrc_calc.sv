// tb_icrc_calc: checks the pipelined ICRC against a bit-serial reference for
// frames of random length (70 to 4162 bytes, so the ICRC lands at every byte
// offset and sometimes straddles two words) with random pipeline stalls, and
// checks the 16-cycle latency when the pipeline is not stalled.
module tb_icrc_calc;
  import roce_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              en, s_valid, s_sof, o_valid;
  logic [LEN_W-1:0]  s_len;
  logic [DATA_W-1:0] s_data;
  logic [31:0]       icrc;
  int checks = 0, failures = 0;

  icrc_calc dut (.clk, .rst, .en, .s_valid, .s_sof, .s_len, .s_data, .o_valid, .icrc);

  // frames in flight: expected ICRC and word count
  logic [31:0] exp_q[$];
  int          words_q[$];
  int          in_word = 0, out_word = 0, frames_done = 0;
  longint      in_cycle_q[$];
  longint      cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // input side: remember when the last word of each frame entered
  int cur_words = 0;
  always @(posedge clk) if (!rst && en && s_valid) begin
    in_word = s_sof ? 1 : in_word + 1;
    if (in_word == (int'(s_len) + 63) / 64) in_cycle_q.push_back(cyc);
  end

  // output side: the ICRC is final while the last word of a frame is in stage 16
  always @(posedge clk) if (!rst && en && o_valid) begin
    out_word++;
    if (words_q.size() > 0 && out_word == words_q[0]) begin
      checks++;
      if (icrc !== exp_q[0]) begin
        failures++;
        $display("ICRC mismatch: got %h exp %h (frame words %0d)", icrc, exp_q[0], words_q[0]);
      end
      if (frames_done < 20) begin
        checks++;
        if (cyc - in_cycle_q[0] != 16) begin
          failures++; $display("latency %0d, expected 16 (frame %0d, words %0d)", cyc - in_cycle_q[0], frames_done, words_q[0]);
        end
      end
      void'(in_cycle_q.pop_front());
      exp_q.pop_front(); words_q.pop_front();
      out_word = 0;
      frames_done++;
    end
  end

  task automatic send_frame(int len, bit stall);
    logic [7:0] fr[$];
    int nw;
    for (int i = 0; i < len; i++) fr.push_back(8'($urandom));
    exp_q.push_back(icrc_ref(fr));
    nw = (len + 63) / 64;
    words_q.push_back(nw);
    for (int w = 0; w < nw; w++) begin
      for (int j = 0; j < 64; j++) s_data[8*j +: 8] = (64*w + j < len) ? fr[64*w + j] : 8'h00;
      s_sof = (w == 0); s_len = LEN_W'(len); s_valid = 1;
      en = stall ? ($urandom % 4 != 0) : 1'b1;
      @(posedge clk); #1;
      while (!en) begin en = 1; @(posedge clk); #1; end
    end
    s_valid = 0;
  endtask

  initial begin
    en = 1; s_valid = 0; s_sof = 0; s_len = '0; s_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // unstalled frames, latency checked
    for (int i = 0; i < 20; i++) send_frame(66 + 4 * ($urandom % 100), 0);
    en = 1;
    repeat (20) @(posedge clk);
    #1;
    // sizes around word borders and the maximum
    for (int l = 120; l < 200; l += 4) send_frame(l, 1);
    send_frame(4162, 1);
    send_frame(8188, 0);
    for (int i = 0; i < 60; i++) send_frame(66 + 4 * ($urandom % 1025), 1);
    en = 1; s_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d frames without result", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
