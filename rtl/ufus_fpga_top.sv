// ufus_fpga_top: data path of one probe FPGA, from the JESD204 receivers of
// three ultrasound AFEs to the AXI-Stream transmit port of a 100G Ethernet MAC.
//
//   clk_afe (120 MHz)   jesd_stream_merge: de-interleave the lanes of 3 AFEs
//                       (96 channels, 12 bit, 40 MSPS) and pack 512-bit words
//                       afe_fifo: cross to clk_sp
//   clk_sp  (160 MHz)   packetizer: one shot of N_s sample periods per trigger
//                       roce_tx: split into payloads of up to 4096 bytes, add
//                       Ethernet/IPv4/UDP/BTH/DETH headers and the RoCEv2 ICRC
//                       cmac_fifo: store each frame, cross to clk_tx
//   clk_tx  (322.27 MHz) cmac_*: frames towards the MAC (which appends the FCS)
//
// The JESD204 PHYs, the MAC, the optical transceiver and the control processor
// are outside this module: the PHY words, the MAC port, the trigger and the
// header configuration are ports. The three clock domains and the chain of
// blocks follow the published design; a probe has two such FPGAs, each with
// its own link.
//
// synth_mode selects the packetizer's source: 0 for the AFE stream, 1 for the
// on-chip synthetic generator (full-bandwidth test); the AFE stream is then
// drained and discarded. The mode is taken over only while no shot is busy,
// so a shot never mixes sources. The generator follows the published design's
// synthetic test; the mode input and its switching rule are this design's.
//
// Each clock domain has its own synchronous active-high reset; apply all three
// together. cfg and n_samples are quasi-static (set while idle).
module ufus_fpga_top
  import roce_pkg::*;
#(
  parameter int unsigned N_AFE       = 3,
  parameter int unsigned MAX_PAYLOAD = 4096,
  parameter int unsigned AFE_FIFO_DEPTH  = 512,
  parameter int unsigned PKT_FIFO_DEPTH  = 64,
  parameter int unsigned CMAC_FIFO_DEPTH = 128
) (
  input  logic                      clk_afe,
  input  logic                      rst_afe,
  input  logic                      clk_sp,
  input  logic                      rst_sp,
  input  logic                      clk_tx,
  input  logic                      rst_tx,
  // JESD204 PHY outputs, 16 lanes x 8 bit per AFE
  input  logic [N_AFE-1:0][127:0]   phy_data,
  input  logic [N_AFE-1:0]          phy_valid,
  input  logic [N_AFE-1:0]          phy_sof,
  // control (clk_sp)
  input  logic                      trigger,
  input  logic [15:0]               n_samples,
  input  logic                      synth_mode,
  input  hdr_cfg_t                  cfg,
  // to the 100G MAC (clk_tx)
  output logic [DATA_W-1:0]         cmac_tdata,
  output logic [WORD_BYTES-1:0]     cmac_tkeep,
  output logic                      cmac_tlast,
  output logic                      cmac_tvalid,
  input  logic                      cmac_tready,
  // status
  output logic [31:0]               afe_overflows,   // clk_afe
  output logic                      busy,            // clk_sp
  output logic [31:0]               shots,           // clk_sp
  output logic [31:0]               missed_triggers, // clk_sp
  output logic [31:0]               frames           // clk_sp
);
  // ---------------- 120 MHz ----------------------------------------------
  logic [511:0] mg_data;
  logic         mg_valid, mg_group;

  jesd_stream_merge #(.N_AFE(N_AFE)) u_merge (
    .clk(clk_afe), .rst(rst_afe),
    .phy_data, .phy_valid, .phy_sof,
    .m_data(mg_data), .m_valid(mg_valid), .m_group(mg_group)
  );

  logic [511:0] af_data;
  logic         af_group, af_valid, af_ready;

  afe_fifo #(.WIDTH(513), .DEPTH(AFE_FIFO_DEPTH)) u_afe_fifo (
    .wr_clk(clk_afe), .wr_rst(rst_afe), .wr_en(mg_valid), .wr_data({mg_group, mg_data}),
    .overflow_cnt(afe_overflows),
    .rd_clk(clk_sp), .rd_rst(rst_sp), .rd_data({af_group, af_data}),
    .rd_valid(af_valid), .rd_ready(af_ready)
  );

  // ---------------- 160 MHz ----------------------------------------------
  logic [DATA_W-1:0]     sh_tdata;
  logic [WORD_BYTES-1:0] sh_tkeep;
  logic                  sh_tlast, sh_tvalid, sh_tready;

  // source select: AFE stream or synthetic generator
  logic [511:0] gen_data, pk_data;
  logic         gen_group, gen_valid, gen_ready;
  logic         pk_group, pk_valid, pk_ready;
  logic         mode_q;

  synth_data_gen u_gen (
    .clk(clk_sp), .rst(rst_sp),
    .m_data(gen_data), .m_group(gen_group), .m_valid(gen_valid), .m_ready(gen_ready)
  );

  always_ff @(posedge clk_sp) begin
    if (rst_sp)     mode_q <= 1'b0;
    else if (!busy) mode_q <= synth_mode;
  end

  assign pk_data   = mode_q ? gen_data  : af_data;
  assign pk_group  = mode_q ? gen_group : af_group;
  assign pk_valid  = mode_q ? gen_valid : af_valid;
  assign af_ready  = mode_q ? 1'b1      : pk_ready;
  assign gen_ready = mode_q && pk_ready;

  packetizer u_packetizer (
    .clk(clk_sp), .rst(rst_sp), .trigger, .n_samples,
    .s_data(pk_data), .s_group(pk_group), .s_valid(pk_valid), .s_ready(pk_ready),
    .m_tdata(sh_tdata), .m_tkeep(sh_tkeep), .m_tlast(sh_tlast),
    .m_tvalid(sh_tvalid), .m_tready(sh_tready),
    .busy, .shots, .missed_triggers
  );

  logic [DATA_W-1:0]     fr_tdata;
  logic [WORD_BYTES-1:0] fr_tkeep;
  logic                  fr_tlast, fr_tvalid, fr_tready;

  roce_tx #(.MAX_PAYLOAD(MAX_PAYLOAD), .FIFO_DEPTH(PKT_FIFO_DEPTH)) u_roce (
    .clk(clk_sp), .rst(rst_sp), .cfg,
    .s_tdata(sh_tdata), .s_tkeep(sh_tkeep), .s_tlast(sh_tlast),
    .s_tvalid(sh_tvalid), .s_tready(sh_tready),
    .m_tdata(fr_tdata), .m_tkeep(fr_tkeep), .m_tlast(fr_tlast),
    .m_tvalid(fr_tvalid), .m_tready(fr_tready),
    .frames
  );

  // ---------------- 322.27 MHz -------------------------------------------
  cmac_fifo #(.DEPTH(CMAC_FIFO_DEPTH)) u_cmac_fifo (
    .wr_clk(clk_sp), .wr_rst(rst_sp),
    .s_tdata(fr_tdata), .s_tkeep(fr_tkeep), .s_tlast(fr_tlast),
    .s_tvalid(fr_tvalid), .s_tready(fr_tready),
    .rd_clk(clk_tx), .rd_rst(rst_tx),
    .m_tdata(cmac_tdata), .m_tkeep(cmac_tkeep), .m_tlast(cmac_tlast),
    .m_tvalid(cmac_tvalid), .m_tready(cmac_tready)
  );

endmodule
