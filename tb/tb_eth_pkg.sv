// tb_eth_pkg: reference models shared by the testbenches.
//
// Builds Ethernet II, ARP, IPv4 and UDP frames as byte queues and computes
// their checksums independently of the RTL: the Ethernet FCS with the
// bit-reflected CRC-32 (polynomial 0xEDB88320, byte by byte), the Internet
// checksum by summing 16-bit words. Also packs laser points.
package tb_eth_pkg;
  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] crc32_ieee(bytes_t d);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[i]) begin
      c ^= 32'(d[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  // Frame with its FCS appended, least significant byte first.
  function automatic bytes_t with_fcs(bytes_t d);
    bytes_t r = d;
    logic [31:0] c = crc32_ieee(d);
    for (int i = 0; i < 4; i++) r.push_back(c[8*i +: 8]);
    return r;
  endfunction

  function automatic logic [15:0] inet_sum(bytes_t d);
    logic [31:0] s = 0;
    for (int i = 0; i < d.size(); i += 2)
      s += {d[i], (i + 1 < d.size()) ? d[i+1] : 8'h00};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  function automatic void put16(ref bytes_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bytes_t q, input logic [31:0] v);
    for (int i = 3; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction
  function automatic void put48(ref bytes_t q, input logic [47:0] v);
    for (int i = 5; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic bytes_t eth_hdr(logic [47:0] dst, logic [47:0] src, logic [15:0] et);
    bytes_t q;
    put48(q, dst); put48(q, src); put16(q, et);
    return q;
  endfunction

  function automatic bytes_t arp_frame(logic [15:0] oper, logic [47:0] sha, logic [31:0] spa,
                                       logic [47:0] tha, logic [31:0] tpa, logic [47:0] dst);
    bytes_t q = eth_hdr(dst, sha, 16'h0806);
    put16(q, 16'd1); put16(q, 16'h0800); q.push_back(8'd6); q.push_back(8'd4);
    put16(q, oper); put48(q, sha); put32(q, spa); put48(q, tha); put32(q, tpa);
    return q;
  endfunction

  // Ethernet + IPv4 + UDP frame. cks_mode: 0 = no UDP checksum, 1 = correct,
  // 2 = corrupted UDP checksum, 3 = corrupted IPv4 header checksum.
  function automatic bytes_t udp_frame(logic [47:0] dst_mac, logic [47:0] src_mac,
                                       logic [31:0] src_ip, logic [31:0] dst_ip,
                                       logic [15:0] sport, logic [15:0] dport,
                                       bytes_t payload, int cks_mode);
    bytes_t q = eth_hdr(dst_mac, src_mac, 16'h0800);
    bytes_t ip, udp, ph;
    logic [15:0] ulen = 16'(8 + payload.size());
    logic [15:0] c;
    ip.push_back(8'h45); ip.push_back(8'h00); put16(ip, 16'(20) + ulen);
    put16(ip, 16'h1234); put16(ip, 16'h4000); ip.push_back(8'd64); ip.push_back(8'd17);
    put16(ip, 16'h0000); put32(ip, src_ip); put32(ip, dst_ip);
    c = inet_sum(ip);
    if (cks_mode == 3) c ^= 16'h0100;
    ip[10] = c[15:8]; ip[11] = c[7:0];
    put16(udp, sport); put16(udp, dport); put16(udp, ulen); put16(udp, 16'h0000);
    foreach (payload[i]) udp.push_back(payload[i]);
    if (cks_mode == 1 || cks_mode == 2) begin
      put32(ph, src_ip); put32(ph, dst_ip); ph.push_back(8'h00); ph.push_back(8'd17);
      put16(ph, ulen);
      foreach (udp[i]) ph.push_back(udp[i]);
      c = inet_sum(ph);
      if (c == 16'h0) c = 16'hFFFF;
      if (cks_mode == 2) c ^= 16'h0040;
      udp[6] = c[15:8]; udp[7] = c[7:0];
    end
    foreach (ip[i]) q.push_back(ip[i]);
    foreach (udp[i]) q.push_back(udp[i]);
    return q;
  endfunction

  function automatic logic [63:0] point(logic [7:0] cmd, logic [15:0] x, logic [15:0] y,
                                        logic [7:0] r, logic [7:0] g, logic [7:0] b);
    return {cmd, x, y, r, g, b};
  endfunction

  function automatic void put_point(ref bytes_t q, input logic [63:0] p);
    for (int i = 7; i >= 0; i--) q.push_back(p[8*i +: 8]);
  endfunction
endpackage
