// synth_data_gen: synthetic data source for bandwidth tests of the streaming
// path, in place of the AFE stream.
//
// It offers a word on every clock. Word n holds sixteen 32-bit little-endian
// integers 16n .. 16n+15, so the bytes of any shot form one run of consecutive
// integers that a receiver can verify without knowing where the shot started.
// Like the merged AFE stream, every ninth word carries the group flag (nine
// 64-byte words are four sample periods of 96 12-bit channels), so the
// packetizer cuts shots from it exactly as from real data; a shot then starts
// with an integer that is a multiple of 144.
//
// That an on-chip generator feeds the network path for a full-bandwidth test
// follows the published design; the data pattern and the group spacing are
// this implementation's choices.
//
// Interface: valid/ready stream; the pattern advances only on a handshake, so
// a stalled sink loses nothing. Synchronous active-high reset restarts the
// pattern at 0.
module synth_data_gen
  import roce_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  output logic [DATA_W-1:0] m_data,
  output logic              m_group,
  output logic              m_valid,
  input  logic              m_ready
);

  localparam int unsigned GROUP_WORDS = 9;

  logic [27:0] word_cnt;     // n; the integers wrap at 2^32
  logic [3:0]  phase;        // n mod 9

  always_ff @(posedge clk) begin
    if (rst) begin
      word_cnt <= '0;
      phase    <= '0;
    end else if (m_valid && m_ready) begin
      word_cnt <= word_cnt + 1'b1;
      phase    <= (phase == 4'(GROUP_WORDS - 1)) ? '0 : phase + 1'b1;
    end
  end

  always_comb begin
    for (int j = 0; j < WORD_BYTES / 4; j++)
      m_data[32*j +: 32] = {word_cnt, 4'(j)};
  end

  assign m_group = (phase == '0);
  assign m_valid = !rst;

endmodule
