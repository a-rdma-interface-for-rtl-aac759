// tb_stream_delay: pushes a numbered sequence through the delay line with a
// random enable and checks that each word comes out after exactly 16 enabled
// cycles, in order, with its valid flag.
module tb_stream_delay;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        en, d_valid, q_valid;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  stream_delay #(.DEPTH(16), .W(32)) dut (.clk, .rst, .en, .d_valid, .d, .q_valid, .q);

  // model: history of (valid, data) per enabled cycle
  logic [32:0] hist[$];

  always @(posedge clk) if (!rst && en) begin
    if (hist.size() >= 16) begin
      logic [32:0] e;
      e = hist[hist.size() - 16];
      checks++;
      if (q_valid !== e[32] || (e[32] && q !== e[31:0])) begin
        failures++;
        $display("mismatch: q_valid=%0b q=%h expected %0b %h", q_valid, q, e[32], e[31:0]);
      end
    end else begin
      checks++;
      if (q_valid) begin failures++; $display("valid before 16 enabled cycles"); end
    end
    hist.push_back({d_valid, d});
  end

  initial begin
    en = 0; d_valid = 0; d = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      en = (i < 100) ? 1'b1 : 1'($urandom % 3 != 0);
      d_valid = 1'($urandom % 4 != 0);
      d = $urandom;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
