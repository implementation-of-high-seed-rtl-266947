// tb_net_pkg - reference functions for the testbenches: they build the bytes
// of Ethernet, ARP, IPv4, ICMP and UDP packets the way the standards define
// them (RFC 826, 791, 792, 768; IEEE 802.3 CRC-32), independently of the
// design, so that frames can be driven into it and frames it sends can be
// checked.
package tb_net_pkg;

  typedef logic [7:0] bytes_t[$];

  // IEEE 802.3 CRC-32 over a byte string (reflected, init and final xor 1s)
  function automatic logic [31:0] crc32(input bytes_t b);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c = c ^ {24'd0, b[i]};
      for (int k = 0; k < 8; k++) c = (c >> 1) ^ (32'hEDB8_8320 & {32{c[0]}});
    end
    return ~c;
  endfunction

  // Internet checksum (RFC 1071) over a byte string
  function automatic logic [15:0] inet_csum(input bytes_t b);
    logic [31:0] s = 0;
    for (int i = 0; i < b.size(); i += 2)
      s += {b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  function automatic void put16(ref bytes_t b, input logic [15:0] v);
    b.push_back(v[15:8]);
    b.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bytes_t b, input logic [31:0] v);
    put16(b, v[31:16]);
    put16(b, v[15:0]);
  endfunction
  function automatic void put48(ref bytes_t b, input logic [47:0] v);
    put16(b, v[47:32]);
    put32(b, v[31:0]);
  endfunction

  // destination, source, type, payload, zero padding to 60 bytes, FCS
  function automatic bytes_t eth_frame(input logic [47:0] dst, input logic [47:0] src,
                                       input logic [15:0] etype, input bytes_t pl);
    bytes_t f;
    logic [31:0] c;
    put48(f, dst);
    put48(f, src);
    put16(f, etype);
    foreach (pl[i]) f.push_back(pl[i]);
    while (f.size() < 60) f.push_back(8'h00);
    c = crc32(f);
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    return f;
  endfunction

  function automatic bytes_t arp_pkt(input logic [15:0] oper, input logic [47:0] sha,
                                     input logic [31:0] spa, input logic [47:0] tha,
                                     input logic [31:0] tpa);
    bytes_t p;
    put16(p, 16'd1);
    put16(p, 16'h0800);
    p.push_back(8'd6);
    p.push_back(8'd4);
    put16(p, oper);
    put48(p, sha);
    put32(p, spa);
    put48(p, tha);
    put32(p, tpa);
    return p;
  endfunction

  // IPv4 header (IHL 5, TTL 64) plus payload; fragw = flags and offset word
  function automatic bytes_t ip_pkt(input logic [31:0] src, input logic [31:0] dst,
                                    input logic [7:0] proto, input bytes_t pl,
                                    input logic [15:0] ident, input logic [15:0] fragw);
    bytes_t h;
    logic [15:0] c;
    h.push_back(8'h45);
    h.push_back(8'h00);
    put16(h, 16'(20 + pl.size()));
    put16(h, ident);
    put16(h, fragw);
    h.push_back(8'd64);
    h.push_back(proto);
    put16(h, 16'h0000);
    put32(h, src);
    put32(h, dst);
    c = inet_csum(h);
    h[10] = c[15:8];
    h[11] = c[7:0];
    foreach (pl[i]) h.push_back(pl[i]);
    return h;
  endfunction

  function automatic bytes_t icmp_echo(input logic [7:0] typ, input logic [15:0] id,
                                       input logic [15:0] seq, input bytes_t data);
    bytes_t m;
    logic [15:0] c;
    m.push_back(typ);
    m.push_back(8'h00);
    put16(m, 16'h0000);
    put16(m, id);
    put16(m, seq);
    foreach (data[i]) m.push_back(data[i]);
    c = inet_csum(m);
    m[2] = c[15:8];
    m[3] = c[7:0];
    return m;
  endfunction

  // UDP with checksum 0 (not used)
  function automatic bytes_t udp_pkt(input logic [15:0] sport, input logic [15:0] dport,
                                     input bytes_t data);
    bytes_t u;
    put16(u, sport);
    put16(u, dport);
    put16(u, 16'(8 + data.size()));
    put16(u, 16'h0000);
    foreach (data[i]) u.push_back(data[i]);
    return u;
  endfunction

  function automatic bytes_t pattern(input int n, input int seed);
    bytes_t d;
    for (int i = 0; i < n; i++) d.push_back(8'((i * 7 + seed) ^ (i >> 3)));
    return d;
  endfunction

  function automatic logic [15:0] get16(input bytes_t b, input int i);
    return {b[i], b[i+1]};
  endfunction
  function automatic logic [31:0] get32(input bytes_t b, input int i);
    return {b[i], b[i+1], b[i+2], b[i+3]};
  endfunction
  function automatic logic [47:0] get48(input bytes_t b, input int i);
    return {b[i], b[i+1], b[i+2], b[i+3], b[i+4], b[i+5]};
  endfunction

  function automatic bytes_t slice(input bytes_t b, input int from, input int n);
    bytes_t r;
    for (int i = from; i < from + n && i < b.size(); i++) r.push_back(b[i]);
    return r;
  endfunction

endpackage
