// tb_jesd_stream_merge: drives three AFE lane streams built from known sample
// values (channel c, sample period t: value (t * 5 + c * 97) mod 4096), with the
// octet layout A[11:4], {A[3:0],B[11:8]}, B[7:0] per lane and phy_sof on the
// first octet, and occasional invalid cycles. It rebuilds the sample stream
// from the 512-bit output words, checks every sample in order, checks that
// m_group marks exactly the words that begin a sample period (every ninth word),
// and checks the rate: nine words per four sample periods.
module tb_jesd_stream_merge;
  logic clk = 0, rst = 1;
  always #4.167 clk = ~clk;

  localparam int N_AFE = 3, LANES = 16, NCH = N_AFE * LANES * 2;
  logic [N_AFE-1:0][127:0] phy_data;
  logic [N_AFE-1:0]        phy_valid, phy_sof;
  logic [511:0]            m_data;
  logic                    m_valid, m_group;
  int checks = 0, failures = 0;

  jesd_stream_merge dut (.clk, .rst, .phy_data, .phy_valid, .phy_sof, .m_data, .m_valid, .m_group);

  function automatic logic [11:0] sval(int t, int c);
    return 12'((t * 5 + c * 97) % 4096);
  endfunction

  // output side: bit stream -> samples
  bit     bits[$];
  int     t_out = 0, c_out = 0, words = 0, groups_ok = 0;
  always @(posedge clk) if (!rst && m_valid) begin
    checks++;
    if (m_group !== (bits.size() == 0 && c_out == 0)) begin
      failures++; $display("m_group=%0b at word %0d", m_group, words);
    end
    if (m_group) groups_ok++;
    for (int i = 0; i < 512; i++) bits.push_back(m_data[i]);
    words++;
    while (bits.size() >= 12) begin
      logic [11:0] v;
      for (int i = 0; i < 12; i++) v[i] = bits.pop_front();
      checks++;
      if (v !== sval(t_out, c_out)) begin
        failures++;
        if (failures < 5) $display("t=%0d c=%0d got %h exp %h", t_out, c_out, v, sval(t_out, c_out));
      end
      c_out++;
      if (c_out == NCH) begin c_out = 0; t_out++; end
    end
  end

  initial begin
    automatic int T = 400;
    phy_valid = '0; phy_sof = '0; phy_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < 3; k++) begin
        while ($urandom % 10 == 0) begin phy_valid = '0; @(posedge clk); #1; end
        for (int a = 0; a < N_AFE; a++)
          for (int l = 0; l < LANES; l++) begin
            logic [11:0] A, B;
            A = sval(t, a * 32 + 2 * l);
            B = sval(t, a * 32 + 2 * l + 1);
            phy_data[a][8*l +: 8] = (k == 0) ? A[11:4] : (k == 1) ? {A[3:0], B[11:8]} : B[7:0];
          end
        phy_valid = '1;
        phy_sof   = (k == 0) ? '1 : '0;
        @(posedge clk); #1;
      end
    end
    phy_valid = '0;
    repeat (10) @(posedge clk);
    checks++;
    if (t_out != T || words != T * 9 / 4) begin
      failures++; $display("sample periods %0d, words %0d", t_out, words);
    end
    checks++;
    if (groups_ok != T / 4) begin failures++; $display("%0d group words, expected %0d", groups_ok, T / 4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
