// tb_dns_util_pkg: packet builders and reference models for the testbenches.
//
// Builds Ethernet/IPv4/UDP/DNS frames byte by byte, and the response a DNS
// cache should send for a query, straight from the DNS and IPv4 packet formats,
// without using any of the design's code. Frames are byte queues, first byte
// first; they carry no FCS.
package tb_dns_util_pkg;

  typedef logic [7:0] bytes_t[$];

  function automatic void push16(ref bytes_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void push32(ref bytes_t q, input logic [31:0] v);
    push16(q, v[31:16]); push16(q, v[15:0]);
  endfunction
  function automatic void push48(ref bytes_t q, input logic [47:0] v);
    push16(q, v[47:32]); push32(q, v[31:0]);
  endfunction

  // "ab.c" -> 02 'a' 'b' 01 'c' 00
  function automatic bytes_t encode_name(input string s);
    bytes_t q;
    int start = 0;
    for (int i = 0; i <= s.len(); i++) begin
      if (i == s.len() || s[i] == ".") begin
        if (i > start) begin
          q.push_back(8'(i - start));
          for (int j = start; j < i; j++) q.push_back(s[j]);
        end
        start = i + 1;
      end
    end
    q.push_back(8'h00);
    return q;
  endfunction

  // table key: encoded name left-aligned in nbytes bytes, zero padded
  function automatic logic [255:0] name_key(input bytes_t n, input int nbytes);
    logic [255:0] k = '0;
    for (int i = 0; i < n.size() && i < nbytes; i++)
      k[(nbytes-1-i)*8 +: 8] = n[i];
    return k;
  endfunction

  function automatic logic [15:0] ip_csum(input bytes_t f, input int off);
    int unsigned s = 0;
    for (int i = 0; i < 20; i += 2)
      if (i != 10) s += 32'({f[off+i], f[off+i+1]});
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction

  // Generic IPv4/UDP frame around a UDP payload
  function automatic bytes_t udp_frame(input logic [47:0] dmac, smac,
                                       input logic [31:0] sip, dip,
                                       input logic [15:0] sport, dport,
                                       input bytes_t payload, input logic [7:0] ttl = 8'd64);
    bytes_t f;
    logic [15:0] c;
    push48(f, dmac); push48(f, smac); push16(f, 16'h0800);
    f.push_back(8'h45); f.push_back(8'h00);
    push16(f, 16'(28 + payload.size()));
    push16(f, 16'h1234); push16(f, 16'h0000);
    f.push_back(ttl); f.push_back(8'd17); push16(f, 16'h0000);
    push32(f, sip); push32(f, dip);
    c = ip_csum(f, 14);
    f[24] = c[15:8]; f[25] = c[7:0];
    push16(f, sport); push16(f, dport); push16(f, 16'(8 + payload.size())); push16(f, 16'h0000);
    foreach (payload[i]) f.push_back(payload[i]);
    return f;
  endfunction

  function automatic bytes_t dns_query_payload(input logic [15:0] id, input bit rd,
                                               input bytes_t name,
                                               input logic [15:0] qtype = 1, qclass = 1);
    bytes_t p;
    push16(p, id); push16(p, {7'b0, rd, 8'h00});
    push16(p, 1); push16(p, 0); push16(p, 0); push16(p, 0);
    foreach (name[i]) p.push_back(name[i]);
    push16(p, qtype); push16(p, qclass);
    return p;
  endfunction

  function automatic bytes_t dns_query(input logic [47:0] dmac, smac, input logic [31:0] sip, dip,
                                       input logic [15:0] sport, id, input bit rd, input bytes_t name);
    return udp_frame(dmac, smac, sip, dip, sport, 16'd53, dns_query_payload(id, rd, name));
  endfunction

  // What an authoritative cache answers for dns_query(...): addresses and
  // ports swapped, QR and RA set, one A record pointing back at the question.
  function automatic bytes_t dns_answer(input logic [47:0] dmac, smac, input logic [31:0] sip, dip,
                                        input logic [15:0] sport, id, input bit rd, input bytes_t name,
                                        input logic [31:0] addr, ttl);
    bytes_t p, f;
    push16(p, id); push16(p, {1'b1, 4'b0, 2'b0, rd, 1'b1, 7'b0});
    push16(p, 1); push16(p, 1); push16(p, 0); push16(p, 0);
    foreach (name[i]) p.push_back(name[i]);
    push16(p, 1); push16(p, 1);
    push16(p, 16'hC00C); push16(p, 1); push16(p, 1); push32(p, ttl); push16(p, 4); push32(p, addr);
    f = udp_frame(smac, dmac, dip, sip, 16'd53, sport, p);
    return f;
  endfunction

  // A DNS response seen on the wire (from a name server, source port 53)
  function automatic bytes_t dns_server_response(input logic [47:0] dmac, smac, input logic [31:0] sip, dip,
                                                 input logic [15:0] dport, id, input bytes_t name,
                                                 input logic [31:0] addr);
    bytes_t p;
    push16(p, id); push16(p, 16'h8180);
    push16(p, 1); push16(p, 1); push16(p, 0); push16(p, 0);
    foreach (name[i]) p.push_back(name[i]);
    push16(p, 1); push16(p, 1);
    push16(p, 16'hC00C); push16(p, 1); push16(p, 1); push32(p, 300); push16(p, 4); push32(p, addr);
    return udp_frame(dmac, smac, sip, dip, 16'd53, dport, p);
  endfunction

  // A non-DNS frame of n bytes (n >= 14)
  function automatic bytes_t plain_frame(input logic [47:0] dmac, smac, input int n, input int seed);
    bytes_t f;
    push48(f, dmac); push48(f, smac); push16(f, 16'h88B5);
    for (int i = 14; i < n; i++) f.push_back(8'(seed + i));
    return f;
  endfunction

endpackage
