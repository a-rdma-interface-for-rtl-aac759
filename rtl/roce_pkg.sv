// roce_pkg: types and constants shared by the ultrasound RoCEv2 streaming path.
//
// The data path is an AXI-Stream bus with 64-byte words (byte 0 of a frame in
// tdata[7:0], i.e. little-endian lane order, as on the Xilinx CMAC AXIS port).
// This package holds:
//   * the run-time header configuration written by the control processor,
//   * the RoCEv2 header layout used by the frame generator and the ICRC mask,
//   * the CRC-32 arithmetic (reflected Ethernet polynomial) as 32x32 GF(2)
//     matrices, used by the parallel ICRC calculator.
//
// CRC notation: L(M) is the CRC register after clocking message M into a
// register that starts at zero, LSB first (reflected CRC-32, 0xEDB88320).
// L is linear, and appending n zero bytes multiplies L by Z^n, where Z is the
// "advance by one zero byte" matrix. Hence L(A || B) = Z^|B| L(A) ^ L(B), and
// leading zero bytes do not change L. These identities are what let the ICRC be
// computed one word at a time and combined per frame.
package roce_pkg;

  localparam int unsigned WORD_BYTES = 64;
  localparam int unsigned DATA_W     = 8 * WORD_BYTES;
  localparam int unsigned LEN_W      = 13;   // frame length in bytes, max 8191
  localparam int unsigned HDR_BYTES  = 62;   // Eth 14 + IPv4 20 + UDP 8 + BTH 12 + DETH 8
  localparam int unsigned ICRC_BYTES = 4;
  localparam int unsigned OVERHEAD   = HDR_BYTES + ICRC_BYTES;  // 66

  localparam logic [15:0] ROCEV2_UDP_PORT = 16'd4791;
  localparam logic [7:0]  BTH_OPC_UD_SEND_ONLY = 8'h64;

  // Header fields set by the control processor.
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] udp_src_port;
    logic [15:0] p_key;
    logic [23:0] dest_qp;
    logic [31:0] q_key;
    logic [23:0] src_qp;
  } hdr_cfg_t;

  typedef logic [31:0]       crc_t;
  typedef logic [31:0][31:0] crc_mat_t;   // row r: out[r] = ^(row & in)

  localparam crc_t CRC_POLY_REFL = 32'hEDB8_8320;

  // One byte clocked into a CRC register, bit-serial reference definition.
  function automatic crc_t crc_byte(crc_t c, logic [7:0] b);
    crc_t r = c;
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = r[0] ^ b[i];
      r  = r >> 1;
      if (fb) r = r ^ CRC_POLY_REFL;
    end
    return r;
  endfunction

  function automatic crc_t mat_apply(crc_mat_t m, crc_t v);
    crc_t o;
    for (int r = 0; r < 32; r++) o[r] = ^(m[r] & v);
    return o;
  endfunction

  // a * b (apply b first, then a)
  function automatic crc_mat_t mat_mul(crc_mat_t a, crc_mat_t b);
    crc_mat_t o;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        logic acc;
        acc = 1'b0;
        for (int k = 0; k < 32; k++) acc ^= a[r][k] & b[k][c];
        o[r][c] = acc;
      end
    return o;
  endfunction

  function automatic crc_mat_t mat_identity();
    crc_mat_t o;
    for (int r = 0; r < 32; r++) o[r] = 32'(1) << r;
    return o;
  endfunction

  // Z: advance the register by one zero byte.
  function automatic crc_mat_t mat_zero_byte();
    crc_mat_t o;
    for (int c = 0; c < 32; c++) begin
      crc_t col;
      col = crc_byte(32'(1) << c, 8'h00);
      for (int r = 0; r < 32; r++) o[r][c] = col[r];
    end
    return o;
  endfunction

  // Z^(2^k), by repeated squaring.
  function automatic crc_mat_t mat_zero_pow2(int k);
    crc_mat_t m = mat_zero_byte();
    for (int i = 0; i < k; i++) m = mat_mul(m, m);
    return m;
  endfunction

  // Z^n for small n (used for the byte-position matrices H_i).
  function automatic crc_mat_t mat_zero_n(int n);
    crc_mat_t o;
    for (int c = 0; c < 32; c++) begin
      crc_t col;
      col = 32'(1) << c;
      for (int i = 0; i < n; i++) col = crc_byte(col, 8'h00);
      for (int r = 0; r < 32; r++) o[r][c] = col[r];
    end
    return o;
  endfunction

  // RoCEv2 ICRC mask over the first (header) word. Bytes whose bit is set in
  // ICRC_ZERO are forced to 0, bytes in ICRC_ONES to 0xFF, before the CRC.
  //   bytes 0-9  : zero  (Ethernet header, not covered; leading zeros are free)
  //   bytes 10-13: ones  (with the zero-start register this equals CRC-32 with
  //                      initial value 0xFFFFFFFF over 8 bytes of 0xFF, the
  //                      placeholder for the InfiniBand local route header)
  //   byte 15 IPv4 ToS, 22 TTL, 24-25 header checksum,
  //   40-41 UDP checksum, 46 BTH Resv8a: variant fields, forced to ones.
  localparam logic [WORD_BYTES-1:0] ICRC_ZERO = 64'h0000_0000_0000_03FF;
  localparam logic [WORD_BYTES-1:0] ICRC_ONES =
      (64'hF << 10) | (64'h1 << 15) | (64'h1 << 22) | (64'h3 << 24) | (64'h3 << 40) | (64'h1 << 46);

endpackage
