// jesd_stream_merge: de-interleaves and combines the JESD204 lane data of the
// AFEs of one FPGA into packed 512-bit sample words.
//
// Each AFE delivers 16 lanes, one octet per lane per 120 MHz cycle (128 bits).
// A lane carries two transducer channels; the ADCs sample at 40 MHz, so one
// sample period is three octets on a lane, holding two 12-bit samples:
//   octet 0 = A[11:4], octet 1 = {A[3:0], B[11:8]}, octet 2 = B[7:0],
// where lane l of AFE a carries channels 32a + 2l (A) and 32a + 2l + 1 (B).
// phy_sof marks octet 0. After the third octet the block forms a vector of all
// N_AFE*32 channels, channel c in bits 12c+11:12c (1152 bits for three AFEs),
// and a gearbox packs consecutive vectors, without gaps, into 512-bit words:
// four sample periods fill exactly nine words. m_group marks a word that begins
// with the first bit of a sample period, which happens once per four periods.
// That the lanes are de-interleaved and merged from three 128-bit PHY streams
// into a 512-bit stream follows the published design; the octet format, the
// channel order and the packing are this implementation's choices.
//
// Interface: no backpressure (ADC data cannot wait). Output words are
// registered; on average 0.75 words per valid input cycle.
module jesd_stream_merge #(
  parameter int unsigned N_AFE    = 3,
  parameter int unsigned LANES    = 16,
  parameter int unsigned SAMPLE_W = 12
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N_AFE-1:0][8*LANES-1:0] phy_data,
  input  logic [N_AFE-1:0]          phy_valid,
  input  logic [N_AFE-1:0]          phy_sof,
  output logic [511:0]              m_data,
  output logic                      m_valid,
  output logic                      m_group
);
  localparam int unsigned NCH   = N_AFE * LANES * 2;
  localparam int unsigned VEC_W = NCH * SAMPLE_W;
  localparam int unsigned BUF_W = VEC_W + 512;
  localparam int unsigned FW    = $clog2(BUF_W + 1);

  // ---------------- de-interleave: three octets per lane -----------------
  logic [1:0]                        phase;
  logic [N_AFE-1:0][8*LANES-1:0]     oct0, oct1;
  logic [VEC_W-1:0]                  vec;
  logic                              vec_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      vec_valid <= 1'b0;
    end else begin
      vec_valid <= 1'b0;
      if (phy_valid[0]) begin
        if (phy_sof[0] || phase == 2'd2) phase <= phy_sof[0] ? 2'd1 : 2'd0;
        else                             phase <= phase + 1'b1;
        if (!phy_sof[0] && phase == 2'd2) vec_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (phy_valid[0]) begin
      if (phy_sof[0])         oct0 <= phy_data;
      else if (phase == 2'd1) oct1 <= phy_data;
      else if (phase == 2'd2) begin
        for (int a = 0; a < int'(N_AFE); a++)
          for (int l = 0; l < int'(LANES); l++) begin
            logic [7:0] o0, o1, o2;
            o0 = oct0[a][8*l +: 8];
            o1 = oct1[a][8*l +: 8];
            o2 = phy_data[a][8*l +: 8];
            vec[SAMPLE_W*(a*2*LANES + 2*l)     +: SAMPLE_W] <= SAMPLE_W'({o0, o1[7:4]});
            vec[SAMPLE_W*(a*2*LANES + 2*l + 1) +: SAMPLE_W] <= SAMPLE_W'({o1[3:0], o2});
          end
      end
    end
  end

  // ---------------- gearbox VEC_W -> 512 --------------------------------
  logic [BUF_W-1:0] buf_q;
  logic [FW-1:0]    fill;
  logic             grp_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      fill        <= '0;
      m_valid     <= 1'b0;
      m_group     <= 1'b0;
      grp_pending <= 1'b0;
    end else begin
      logic             emit;
      logic [BUF_W-1:0] b;
      logic [FW-1:0]    f;
      emit = (fill >= FW'(512));
      b    = emit ? (buf_q >> 512) : buf_q;
      f    = emit ? fill - FW'(512) : fill;
      m_valid <= emit;
      if (emit) begin
        m_data  <= buf_q[511:0];
        m_group <= grp_pending;
        grp_pending <= 1'b0;
      end
      if (vec_valid) begin
        b = (b & ~({BUF_W{1'b1}} << f)) | (BUF_W'(vec) << f);
        if (f == '0) grp_pending <= 1'b1;
        f = f + FW'(VEC_W);
      end
      buf_q <= b;
      fill  <= f;
    end
  end

  // the three PHYs are frame aligned
  a_aligned: assert property (@(posedge clk) disable iff (rst)
                              phy_valid[0] |-> (phy_valid == '1) && (phy_sof == {N_AFE{phy_sof[0]}}));

endmodule
