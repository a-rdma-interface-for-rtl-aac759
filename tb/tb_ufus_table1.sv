// tb_ufus_table1: runs the shot sizes and shot rates of the published
// measurement table through one probe FPGA at its default sizes. An external
// trigger runs at a fixed frequency, as a waveform generator would. For
// N_s = 500, 1000, 2000 and 4000 sample periods, three shots each are
// triggered at 69.68, 37.24, 19.28 and 9.82 kHz. Every trigger must start a
// shot, and no trigger may be missed. Every frame is checked (headers, PSN,
// ICRC) and every sample of every shot is compared with the AFE model. The
// testbench prints the resulting rate per link, in 10^9 and in 2^30 bit/s,
// counting only the shots that were taken.
// Finally, N_s = 500 is triggered at 100 kHz, faster than one shot takes
// (12.5 us). Every second trigger must then be missed, so four triggers give
// two shots and two missed triggers.
module tb_ufus_table1;
  import roce_pkg::*;
  import tb_ref_pkg::*;

  logic clk_afe = 0, clk_sp = 0, clk_tx = 0;
  logic rst_afe = 1, rst_sp = 1, rst_tx = 1;
  always #4.1667 clk_afe = ~clk_afe;   // 120 MHz
  always #3.125  clk_sp  = ~clk_sp;    // 160 MHz
  always #1.5515 clk_tx  = ~clk_tx;    // 322.27 MHz

  logic [2:0][127:0]     phy_data;
  logic [2:0]            phy_valid, phy_sof;
  logic                  trigger;
  logic [15:0]           n_samples;
  logic                  synth_mode;
  hdr_cfg_t              cfg;
  logic [DATA_W-1:0]     cmac_tdata;
  logic [WORD_BYTES-1:0] cmac_tkeep;
  logic                  cmac_tlast, cmac_tvalid, cmac_tready;
  logic [31:0]           afe_overflows, shots, missed_triggers, frames;
  logic                  busy;
  int checks = 0, failures = 0;

  ufus_fpga_top dut (
    .clk_afe, .rst_afe, .clk_sp, .rst_sp, .clk_tx, .rst_tx,
    .phy_data, .phy_valid, .phy_sof, .trigger, .n_samples, .synth_mode, .cfg,
    .cmac_tdata, .cmac_tkeep, .cmac_tlast, .cmac_tvalid, .cmac_tready,
    .afe_overflows, .busy, .shots, .missed_triggers, .frames
  );

  function automatic logic [11:0] sval(int t, int c);
    return 12'((t + c * 97) % 4096);
  endfunction

  // ---------------- AFE / JESD204 PHY model --------------------------------
  int t_afe = 0;
  initial begin
    phy_valid = '0; phy_sof = '0; phy_data = '0;
    @(negedge rst_afe);
    forever begin
      for (int k = 0; k < 3; k++) begin
        for (int a = 0; a < 3; a++)
          for (int l = 0; l < 16; l++) begin
            logic [11:0] A, B;
            A = sval(t_afe, a * 32 + 2 * l);
            B = sval(t_afe, a * 32 + 2 * l + 1);
            phy_data[a][8*l +: 8] = (k == 0) ? A[11:4] : (k == 1) ? {A[3:0], B[11:8]} : B[7:0];
          end
        phy_valid = '1;
        phy_sof   = (k == 0) ? '1 : '0;
        @(posedge clk_afe); #0.5;
      end
      t_afe++;
    end
  end

  // ---------------- MAC model ---------------------------------------------
  bit random_ready = 0;
  int bp_cycles = 0;
  always @(negedge clk_tx) cmac_tready <= random_ready ? 1'($urandom % 4 != 0) : 1'b1;
  always @(posedge clk_tx) if (cmac_tvalid && !cmac_tready) bp_cycles++;

  // mechanism counters
  int n_full = 0, n_short = 0, n_straddle = 0, arm_cycles = 0, sf_hold = 0;
  always @(posedge clk_sp) if (!rst_sp && dut.u_packetizer.state == 2'd1) arm_cycles++;
  always @(posedge clk_tx) if (!rst_tx && !dut.u_cmac_fifo.empty && !cmac_tvalid) sf_hold++;

  // ---------------- frame checker -----------------------------------------
  logic [7:0] fr[$];
  logic [7:0] shot_bytes[$];
  int     nframes = 0;
  realtime t_last_frame;
  always @(posedge clk_tx) if (!rst_tx && cmac_tvalid && cmac_tready) begin
    for (int j = 0; j < 64; j++) if (cmac_tkeep[j]) fr.push_back(cmac_tdata[8*j +: 8]);
    if (cmac_tlast) begin
      automatic int p = fr.size() - 66;
      automatic int e = 0;
      if (p <= 0 || p > 4096) e++;
      else begin
        if (be16(fr, 12) != 32'h0800 || be16(fr, 16) != 32'(52 + p) || !ip_csum_ok(fr)) e++;
        if (be16(fr, 36) != 32'd4791 || be16(fr, 38) != 32'(32 + p)) e++;
        if (fr[42] != 8'h64 || be24(fr, 51) != 32'(nframes) || be24(fr, 47) != 32'(cfg.dest_qp)) e++;
        if ({fr[fr.size()-1], fr[fr.size()-2], fr[fr.size()-3], fr[fr.size()-4]} != icrc_ref(fr)) e++;
        if (p == 4096) n_full++; else n_short++;
        if ((62 + p) % 64 > 60) n_straddle++;
        for (int i = 0; i < p; i++) shot_bytes.push_back(fr[62 + i]);
      end
      checks++;
      if (e != 0) begin failures++; $display("frame %0d (payload %0d): %0d header/ICRC errors", nframes, p, e); end
      fr.delete();
      nframes++;
      t_last_frame = $realtime;
    end
  end

  // unpack the oldest shot from shot_bytes and compare all samples
  task automatic check_shot(int ns);
    automatic int nbytes = ns * 144;
    automatic int t0, bad = 0;
    logic [11:0] v;
    checks++;
    if (shot_bytes.size() < nbytes) begin
      failures++; $display("only %0d bytes for a shot of %0d", shot_bytes.size(), nbytes);
      shot_bytes.delete();
      return;
    end
    t0 = 32'({shot_bytes[1][3:0], shot_bytes[0]});
    checks++;
    if (t0 % 4 != 0) begin failures++; $display("shot starts at period %0d, not on a group", t0); end
    for (int k = 0; k < ns; k++)
      for (int c = 0; c < 96; c++) begin
        automatic int bit0 = (k * 96 + c) * 12;
        for (int i = 0; i < 12; i++) v[i] = shot_bytes[(bit0 + i) / 8][(bit0 + i) % 8];
        if (v != sval(t0 + k, c)) bad++;
      end
    checks++;
    if (bad != 0) begin failures++; $display("shot N_s=%0d: %0d wrong samples", ns, bad); end
    repeat (nbytes) void'(shot_bytes.pop_front());
  endtask

  task automatic pulse_trigger();
    @(posedge clk_sp); #0.5;
    trigger = 1; @(posedge clk_sp); #0.5; trigger = 0;
  endtask

  // n_trig triggers every period_ns; expect n_shots shots to be taken
  task automatic run_rate(int ns, real f_khz, int n_trig, int n_shots);
    automatic real period_ns = 1.0e6 / f_khz;
    automatic int f0 = nframes, m0 = missed_triggers, s0 = shots;
    automatic int nf = (ns * 144 + 4095) / 4096;
    automatic real gbit = ns * 144 * 8.0 * f_khz * 1.0e3 * n_shots / n_trig;   // shots taken
    realtime t0;
    n_samples = 16'(ns);
    t0 = $realtime;
    fork
      for (int s = 0; s < n_trig; s++) begin
        pulse_trigger();
        while ($realtime < t0 + (s + 1) * period_ns) @(posedge clk_sp);
      end
      for (int s = 0; s < n_shots; s++) begin
        while (nframes < f0 + nf * (s + 1)) @(posedge clk_tx);
        check_shot(ns);
      end
    join
    repeat (40) @(posedge clk_sp);
    checks += 3;
    if (shots - s0 != n_shots) begin failures++; $display("N_s=%0d: %0d shots, expected %0d", ns, shots - s0, n_shots); end
    if (missed_triggers - m0 != n_trig - n_shots) begin
      failures++; $display("N_s=%0d: %0d missed triggers, expected %0d", ns, missed_triggers - m0, n_trig - n_shots);
    end
    if (nframes != f0 + nf * n_shots || shot_bytes.size() != 0) begin
      failures++; $display("N_s=%0d: %0d frames, %0d bytes left", ns, nframes - f0, shot_bytes.size());
    end
    $display("N_s=%0d at %0.2f kHz: %0d shots, %0d missed, %0d frames; %0.2f Gbit/s = %0.2f Gibit/s per link (x2 links: %0.2f Gibit/s)",
             ns, f_khz, shots - s0, missed_triggers - m0, nframes - f0, gbit / 1.0e9, gbit / 1073741824.0, 2.0 * gbit / 1073741824.0);
  endtask

  initial begin
    cfg = '{dst_mac: 48'h0C42A1B2C3D4, src_mac: 48'h02000000AB01, src_ip: 32'hC0A80A02,
            dst_ip: 32'hC0A80A01, udp_src_port: 16'hC001, p_key: 16'hFFFF,
            dest_qp: 24'h000123, q_key: 32'h11111111, src_qp: 24'h000001};
    trigger = 0; n_samples = '0; synth_mode = 0; cmac_tready = 1;
    repeat (5) @(posedge clk_sp);
    rst_afe = 0; rst_sp = 0; rst_tx = 0;
    repeat (50) @(posedge clk_sp);
    run_rate(500,  69.68, 3, 3);
    run_rate(1000, 37.24, 3, 3);
    run_rate(2000, 19.28, 3, 3);
    run_rate(4000,  9.82, 3, 3);
    run_rate(500, 100.0, 4, 2);
    checks++;
    if (afe_overflows != 0) begin failures++; $display("AFE FIFO overflowed %0d times", afe_overflows); end
    $display("payloads: %0d full, %0d short; ICRC across words %0d", n_full, n_short, n_straddle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired: %0d frames", nframes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
