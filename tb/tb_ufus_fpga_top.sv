// tb_ufus_fpga_top: end-to-end test of one probe FPGA at its default sizes.
//
// A model of three AFEs drives the JESD204 PHY ports continuously with known
// samples: channel c in sample period t carries (t + 97 c) mod 4096, packed
// three octets per lane per period. Shots are triggered with several N_s; the
// frames leaving on the MAC port (322.27 MHz) are checked one by one (length,
// IPv4 checksum, UDP port 4791, BTH opcode and PSN sequence, ICRC against a
// bit-serial reference), their payloads are joined per shot and unpacked into
// 12-bit samples, and every sample of every channel is compared with the model.
// Also checked: the shot starts on a four-period group boundary, the data rate
// keeps up with the ADCs (a shot has left within its acquisition time plus
// 10 us), the AFE FIFO never overflows, and the mechanisms below each happen:
// a trigger missed during a shot, full 4096-byte payloads, a short last
// payload, an ICRC split over two words, MAC backpressure, waiting for a group
// boundary, and the CMAC FIFO holding a frame until it is complete.
// One shot is taken from the synthetic generator instead (synth_mode): its
// payload must be a run of consecutive 32-bit integers starting at a multiple
// of 144, its payload rate from trigger to last frame must reach 70 Gbit/s,
// and the next shot must again carry AFE samples.
module tb_ufus_fpga_top;
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

  // unpack one shot from shot_bytes and compare all samples
  task automatic check_shot(int ns);
    automatic int nbytes = ns * 144;
    automatic int t0, bad = 0;
    logic [11:0] v;
    checks++;
    if (shot_bytes.size() != nbytes) begin
      failures++; $display("shot has %0d bytes, expected %0d", shot_bytes.size(), nbytes);
      shot_bytes.delete();
      return;
    end
    t0 = 32'({shot_bytes[1][3:0], shot_bytes[0]});     // channel 0 of the first period
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
    shot_bytes.delete();
  endtask

  // synthetic shot: little-endian 32-bit integers, consecutive
  task automatic check_synth_shot(int ns);
    automatic int nbytes = ns * 144;
    automatic int bad = 0;
    int unsigned first, v;
    checks++;
    if (shot_bytes.size() != nbytes) begin
      failures++; $display("synthetic shot has %0d bytes, expected %0d", shot_bytes.size(), nbytes);
      shot_bytes.delete();
      return;
    end
    first = {shot_bytes[3], shot_bytes[2], shot_bytes[1], shot_bytes[0]};
    checks++;
    if (first % 144 != 0) begin failures++; $display("synthetic shot starts at %0d", first); end
    for (int i = 0; i < nbytes / 4; i++) begin
      v = {shot_bytes[4*i+3], shot_bytes[4*i+2], shot_bytes[4*i+1], shot_bytes[4*i]};
      if (v != first + i) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("synthetic shot: %0d wrong integers", bad); end
    shot_bytes.delete();
    n_synth++;
  endtask

  int n_synth = 0;

  task automatic run_shot(int ns, bit extra_trigger, bit bp, bit synth = 0);
    automatic int f0 = nframes;
    automatic int nf = (ns * 144 + 4095) / 4096;
    realtime t0;
    random_ready = bp;
    @(posedge clk_sp); #0.5;
    n_samples = 16'(ns);
    trigger = 1; @(posedge clk_sp); #0.5; trigger = 0;
    t0 = $realtime;
    if (extra_trigger) begin
      repeat (50) @(posedge clk_sp); #0.5;
      trigger = 1; @(posedge clk_sp); #0.5; trigger = 0;
    end
    while (nframes != f0 + nf) @(posedge clk_tx);
    // acquisition time: ns periods of 25 ns, plus up to one group of wait
    checks++;
    if (!bp && (t_last_frame - t0) > (ns + 4) * 25.0 + 10000.0) begin
      failures++; $display("shot N_s=%0d took %0t", ns, t_last_frame - t0);
    end
    $display("shot N_s=%0d: %0d frames, %0.1f us from trigger to last frame", ns, nf, (t_last_frame - t0) / 1000.0);
    if (synth) begin
      automatic real gbps = ns * 144 * 8.0 / (t_last_frame - t0);
      $display("synthetic shot: %0.1f Gbit/s of payload", gbps);
      checks++;
      if (gbps < 70.0) begin failures++; $display("synthetic rate too low"); end
      check_synth_shot(ns);
    end else
      check_shot(ns);
    repeat (20) @(posedge clk_sp);
  endtask

  initial begin
    cfg = '{dst_mac: 48'h0C42A1B2C3D4, src_mac: 48'h02000000AB01, src_ip: 32'hC0A80A02,
            dst_ip: 32'hC0A80A01, udp_src_port: 16'hC001, p_key: 16'hFFFF,
            dest_qp: 24'h000123, q_key: 32'h11111111, src_qp: 24'h000001};
    trigger = 0; n_samples = '0; synth_mode = 0; cmac_tready = 1;
    repeat (5) @(posedge clk_sp);
    rst_afe = 0; rst_sp = 0; rst_tx = 0;
    repeat (50) @(posedge clk_sp);
    run_shot(8, 0, 0);
    run_shot(500, 1, 0);
    run_shot(93, 0, 1);
    synth_mode = 1;
    repeat (4) @(posedge clk_sp);
    run_shot(2000, 0, 0, 1);
    synth_mode = 0;
    repeat (4) @(posedge clk_sp);
    run_shot(4000, 0, 0);
    repeat (20) @(posedge clk_sp);
    checks++;
    if (shots != 5 || frames != 32'(nframes)) begin failures++; $display("shots %0d frames %0d/%0d", shots, frames, nframes); end
    checks++;
    if (afe_overflows != 0) begin failures++; $display("AFE FIFO overflowed %0d times", afe_overflows); end
    $display("mechanisms: missed triggers %0d, full payloads %0d, short payloads %0d, ICRC across words %0d, MAC backpressure cycles %0d, group waits %0d, CMAC FIFO hold cycles %0d, synthetic shots %0d",
             missed_triggers, n_full, n_short, n_straddle, bp_cycles, arm_cycles, sf_hold, n_synth);
    checks++; if (missed_triggers == 0) begin failures++; $display("no missed trigger"); end
    checks++; if (n_full == 0)        begin failures++; $display("no full payload"); end
    checks++; if (n_short == 0)       begin failures++; $display("no short payload"); end
    checks++; if (n_straddle == 0)    begin failures++; $display("no ICRC across words"); end
    checks++; if (bp_cycles == 0)     begin failures++; $display("no MAC backpressure"); end
    checks++; if (arm_cycles == 0)    begin failures++; $display("no group wait"); end
    checks++; if (n_synth == 0)       begin failures++; $display("no synthetic shot"); end
    checks++; if (sf_hold == 0)       begin failures++; $display("CMAC FIFO never held a frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired: %0d frames", nframes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
