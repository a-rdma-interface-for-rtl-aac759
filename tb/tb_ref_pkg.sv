// tb_ref_pkg: reference models used by the testbenches.
//
// icrc_ref computes the RoCEv2 invariant CRC of a frame the slow, obvious way:
// a bit-serial CRC-32 (reflected 0xEDB88320, start 0xFFFFFFFF, result
// inverted) over eight 0xFF bytes followed by the frame from the IPv4 header up
// to, not including, the four ICRC bytes, with the variant fields (IPv4 ToS,
// TTL and checksum, UDP checksum, BTH Resv8a) replaced by ones.
package tb_ref_pkg;

  function automatic logic [31:0] crc32_serial(logic [31:0] crc, logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      if (crc[0] ^ b[i]) crc = (crc >> 1) ^ 32'hEDB88320;
      else               crc = crc >> 1;
    end
    return crc;
  endfunction

  // fr: whole frame, Ethernet header first, ICRC last
  function automatic logic [31:0] icrc_ref(logic [7:0] fr[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < 8; i++) c = crc32_serial(c, 8'hFF);
    for (int i = 14; i < fr.size() - 4; i++) begin
      logic [7:0] b = fr[i];
      if (i == 15 || i == 22 || i == 24 || i == 25 || i == 40 || i == 41 || i == 46) b = 8'hFF;
      c = crc32_serial(c, b);
    end
    return ~c;
  endfunction

  function automatic int unsigned be16(logic [7:0] fr[$], int i);
    return 32'({fr[i], fr[i+1]});
  endfunction

  function automatic int unsigned be24(logic [7:0] fr[$], int i);
    return 32'({fr[i], fr[i+1], fr[i+2]});
  endfunction

  // IPv4 header checksum check: ones' complement sum of the header is 0xFFFF
  function automatic bit ip_csum_ok(logic [7:0] fr[$]);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2) s += 32'({fr[i], fr[i+1]});
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return s == 32'hFFFF;
  endfunction

endpackage
