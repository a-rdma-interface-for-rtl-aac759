// packetizer: cuts the continuous AFE sample stream into shots.
//
// The ADC data stream never stops. While idle, the packetizer consumes and
// discards it. A trigger arms it: it keeps discarding until the next word that
// begins a sample-period group (s_group), then forwards exactly one shot of
// N_s sample periods, N_s * 144 bytes for 96 channels of 12 bits, as one
// AXI-Stream packet: tkeep marks the valid bytes of the last word and tlast
// ends the shot. A trigger that arrives while a shot is armed or in progress
// is ignored and counted in missed_triggers. Shot assembly from the AFE FIFO
// and missed triggers while a shot is still being sent follow the published
// design; the alignment rule and the counters are this implementation's
// choices.
//
// Interface: s_* from the AFE FIFO (valid/ready), m_* towards the RoCEv2
// transmitter; trigger is a one-cycle pulse on clk; n_samples is sampled at the
// trigger and must be at least 1.
module packetizer #(
  parameter int unsigned NS_W       = 16,
  parameter int unsigned SHOT_BYTES_PER_SAMPLE = 144
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            trigger,
  input  logic [NS_W-1:0] n_samples,
  input  logic [511:0]    s_data,
  input  logic            s_group,
  input  logic            s_valid,
  output logic            s_ready,
  output logic [511:0]    m_tdata,
  output logic [63:0]     m_tkeep,
  output logic            m_tlast,
  output logic            m_tvalid,
  input  logic            m_tready,
  output logic            busy,
  output logic [31:0]     shots,
  output logic [31:0]     missed_triggers
);
  localparam int unsigned BW = NS_W + $clog2(SHOT_BYTES_PER_SAMPLE) + 1;

  typedef enum logic [1:0] {IDLE, ARM, SHOT} state_t;
  state_t state;

  logic [BW-1:0] words_left;    // words still to send, including the current one
  logic [6:0]    last_bytes;    // valid bytes in the last word, 1..64

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= IDLE;
      shots           <= '0;
      missed_triggers <= '0;
      words_left      <= '0;
      last_bytes      <= '0;
    end else begin
      if (trigger && state != IDLE) missed_triggers <= missed_triggers + 1'b1;
      unique case (state)
        IDLE: if (trigger && n_samples != '0) begin
          logic [BW-1:0] bytes;
          bytes      = BW'(n_samples) * BW'(SHOT_BYTES_PER_SAMPLE);
          words_left <= (bytes + BW'(63)) >> 6;
          last_bytes <= 7'(bytes - (((bytes + BW'(63)) >> 6) - 1'b1) * BW'(64));
          state      <= ARM;
        end
        ARM: if (s_valid && s_group) state <= SHOT;
        SHOT: if (s_valid && m_tready) begin
          words_left <= words_left - 1'b1;
          if (words_left == BW'(1)) begin
            state <= IDLE;
            shots <= shots + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    m_tdata  = s_data;
    m_tlast  = (words_left == BW'(1));
    m_tkeep  = '1;
    if (m_tlast)
      for (int j = 0; j < 64; j++) m_tkeep[j] = (j < int'(last_bytes));
    m_tvalid = (state == SHOT) && s_valid;
    unique case (state)
      IDLE:    s_ready = 1'b1;
      ARM:     s_ready = !s_group;
      SHOT:    s_ready = m_tready;
      default: s_ready = 1'b1;
    endcase
  end

  assign busy = (state != IDLE);

endmodule
