// tb_synth_data_gen: takes 3000 words from the synthetic generator with a
// random ready and checks that every accepted word holds the next sixteen
// consecutive 32-bit integers, that the group flag is set on exactly every
// ninth accepted word starting with the first, that a stalled word is held
// unchanged, and that a word is offered on every clock after reset.
module tb_synth_data_gen;
  import roce_pkg::*;

  logic clk = 0, rst = 1;
  always #3.125 clk = ~clk;   // 160 MHz

  logic [DATA_W-1:0] m_data;
  logic              m_group, m_valid, m_ready;

  synth_data_gen dut (.clk, .rst, .m_data, .m_group, .m_valid, .m_ready);

  int checks = 0, failures = 0;
  int unsigned next_int = 0;
  int          n_acc = 0, n_stall = 0;
  logic [DATA_W-1:0] held;
  logic              was_stalled = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int bad_data = 0, bad_group = 0, bad_hold = 0, bad_valid = 0;
    m_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (n_acc < 3000) begin
      m_ready = ($urandom % 4) != 0;
      @(negedge clk);
      if (!m_valid) bad_valid++;
      if (was_stalled && m_data != held) bad_hold++;
      if (m_valid && m_ready) begin
        for (int j = 0; j < 16; j++)
          if (m_data[32*j +: 32] != next_int + 32'(j)) bad_data++;
        if (m_group != (n_acc % 9 == 0)) bad_group++;
        next_int += 16;
        n_acc++;
        was_stalled = 0;
      end else begin
        held = m_data;
        was_stalled = 1;
        n_stall++;
      end
      @(posedge clk); #1;
    end
    checks += 4;
    if (bad_data  != 0) begin failures++; $display("%0d wrong integers", bad_data); end
    if (bad_group != 0) begin failures++; $display("%0d wrong group flags", bad_group); end
    if (bad_hold  != 0) begin failures++; $display("%0d words changed while stalled", bad_hold); end
    if (bad_valid != 0) begin failures++; $display("%0d cycles without a word", bad_valid); end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    checks += n_acc;   // each accepted word was compared in full
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
