// icrc_calc: 16-stage pipelined RoCEv2 ICRC calculator for a 64-byte data path.
//
// Each frame word is reduced to a 32-bit partial CRC and shifted to its place
// in the frame; the partial CRCs of a frame are XOR-accumulated.
//   input  : the first word of a frame (s_sof) is the header word; its variant
//            fields are forced to ones and the Ethernet header is replaced by
//            the ICRC placeholder (see roce_pkg::ICRC_ZERO/ICRC_ONES). Bytes
//            after the last covered byte (the ICRC field and beyond) are zeroed.
//            The last covered word is rotated so that its valid bytes end at
//            byte 63; leading zero bytes do not change a zero-start CRC.
//   stage 1: CRC of each of the 64 bytes, in parallel.
//   stage 2: byte i multiplied by H_i = Z^(63-i) (its distance to the word end).
//   stage 3: XOR of the 64 results = CRC of the whole word.
//   stages 4-15: the word CRC is multiplied by Z^amt, amt being the number of
//            covered frame bytes after this word (13 bits). Stage 4 applies
//            amount bits 1:0, stages 5..15 bits 2..12, each either skipping or
//            applying Z^(2^b).
//   stage 16: accumulator, restarted by the first word of each frame.
// The frame structure, the per-byte CRC / H_i / XOR split, the conditional
// H_(2^b) stages, the 13-bit amount and the accumulator follow the published
// architecture; merging amount bits 0 and 1 into stage 4, the last-word
// rotation and the header-zeroing trick are this implementation's choices.
//
// Interface: a word is taken when s_valid && en; every stage advances when en
// is high, so the block stalls as a whole. s_len is the frame length in bytes
// including the 4-byte ICRC field, held for all words of the frame. After the
// last covered word of a frame has passed stage 16, icrc holds the ICRC of that
// frame (inverted CRC, byte 0 on the wire = icrc[7:0]) until the next frame's
// first word reaches stage 16. o_valid marks a word in stage 16. Latency: 16
// enabled cycles.
module icrc_calc
  import roce_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              s_valid,
  input  logic              s_sof,
  input  logic [LEN_W-1:0]  s_len,
  input  logic [DATA_W-1:0] s_data,
  output logic              o_valid,
  output logic [31:0]       icrc
);
  localparam int unsigned NB = WORD_BYTES;

  // ---------------- stage 0: position of the word in its frame ----------
  logic [LEN_W-1:0] idx_q;          // word index of the next word of a frame
  logic [LEN_W-1:0] idx;
  logic [LEN_W-1:0] n_cov;          // covered bytes (frame minus ICRC)
  logic [LEN_W-1:0] lc;             // index of the last covered word
  logic [6:0]       k;              // covered bytes in the last covered word, 1..64
  logic [LEN_W-1:0] amt;
  logic [7:0]       mb [NB];        // masked bytes
  logic [DATA_W-1:0] mbp, rbp;      // masked bytes, rotated bytes

  always_comb begin
    idx   = s_sof ? '0 : idx_q;
    n_cov = s_len - LEN_W'(ICRC_BYTES);
    lc    = (n_cov - 1'b1) >> 6;
    k     = 7'(n_cov - (lc << 6));
    amt   = (idx < lc) ? LEN_W'(n_cov - ((idx + 1'b1) << 6)) : '0;
    for (int i = 0; i < NB; i++) begin
      logic [7:0] b;
      b = s_data[8*i +: 8];
      if (s_sof && ICRC_ZERO[i]) b = 8'h00;
      if (s_sof && ICRC_ONES[i]) b = 8'hFF;
      if (idx > lc || (idx == lc && i >= int'(k))) b = 8'h00;
      mb[i] = b;
    end
    // last covered word: out byte j takes in byte j - (64 - k)
    for (int j = 0; j < NB; j++) mbp[8*j +: 8] = mb[j];
    rbp = (idx == lc) ? (mbp << (8 * (7'(NB) - k))) : mbp;
  end

  always_ff @(posedge clk) begin
    if (rst)                  idx_q <= '0;
    else if (en && s_valid)   idx_q <= idx + 1'b1;
  end

  // ---------------- stages 1..3: CRC of one AXIS word --------------------
  crc_t             c1 [NB];
  crc_t             c2 [NB];
  crc_t             w3;
  logic [LEN_W-1:0] amt1, amt2, amt3;
  logic [15:0]      v;              // v[s-1]: stage s holds a valid word
  logic [14:0]      sof;

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < NB; i++) c1[i] <= crc_byte('0, rbp[8*i +: 8]);
      amt1 <= amt;
      amt2 <= amt1;
      amt3 <= amt2;
    end
  end

  for (genvar i = 0; i < NB; i++) begin : g_h
    localparam crc_mat_t H = mat_zero_n(NB - 1 - i);
    always_ff @(posedge clk) if (en) c2[i] <= mat_apply(H, c1[i]);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      crc_t x;
      x = '0;
      for (int i = 0; i < NB; i++) x ^= c2[i];
      w3 <= x;
    end
  end

  // ---------------- stages 4..15: shift by the bytes that follow ---------
  localparam crc_mat_t Z1 = mat_zero_n(1);
  localparam crc_mat_t Z2 = mat_zero_n(2);
  localparam crc_mat_t Z3 = mat_zero_n(3);

  crc_t             ws  [4:15];
  logic [LEN_W-1:0] amts[4:15];

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (amt3[1:0])
        2'd0: ws[4] <= w3;
        2'd1: ws[4] <= mat_apply(Z1, w3);
        2'd2: ws[4] <= mat_apply(Z2, w3);
        2'd3: ws[4] <= mat_apply(Z3, w3);
      endcase
      amts[4] <= amt3;
    end
  end

  for (genvar s = 5; s <= 15; s++) begin : g_shift
    localparam int B = s - 3;              // amount bit handled here: 2..12
    localparam crc_mat_t ZB = mat_zero_pow2(B);
    always_ff @(posedge clk) begin
      if (en) begin
        ws[s]   <= amts[s-1][B] ? mat_apply(ZB, ws[s-1]) : ws[s-1];
        amts[s] <= amts[s-1];
      end
    end
  end

  // ---------------- stage 16: accumulate per frame -----------------------
  crc_t acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      v   <= '0;
      sof <= '0;
      acc <= '0;
    end else if (en) begin
      v   <= {v[14:0], s_valid};
      sof <= {sof[13:0], s_valid & s_sof};
      if (v[14]) acc <= sof[14] ? ws[15] : (acc ^ ws[15]);
    end
  end

  assign o_valid = v[15];
  assign icrc    = ~acc;

endmodule
