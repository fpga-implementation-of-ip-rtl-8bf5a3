// Testbench helpers: build IPv4 packets and the cells the segmentation
// block must make of them, independently of the RTL.
package tb_pkt_pkg;

  typedef byte unsigned bytes_t[$];

  // ones'-complement checksum over the first hlen bytes
  function automatic logic [15:0] ip_checksum(bytes_t p, int hlen);
    int unsigned s = 0;
    for (int i = 0; i < hlen; i += 2) s += {p[i], p[i+1]};
    while (s >> 16) s = (s & 32'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  // IPv4 packet of len bytes (len >= 4*ihl) with a correct header checksum.
  // Bytes 4..5 (identification) carry id so packets can be told apart.
  function automatic bytes_t make_packet(int len, byte unsigned tos,
                                         logic [31:0] dst, logic [15:0] id,
                                         int ihl = 5);
    bytes_t p;
    logic [15:0] c;
    for (int i = 0; i < len; i++) p.push_back(byte'($urandom));
    p[0] = {4'd4, 4'(ihl)};
    p[1] = tos;
    p[2] = len[15:8]; p[3] = len[7:0];
    p[4] = id[15:8];  p[5] = id[7:0];
    p[10] = 0; p[11] = 0;
    p[16] = dst[31:24]; p[17] = dst[23:16]; p[18] = dst[15:8]; p[19] = dst[7:0];
    c = ip_checksum(p, 4 * ihl);
    p[10] = c[15:8]; p[11] = c[7:0];
    return p;
  endfunction

endpackage
