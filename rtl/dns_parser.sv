// dns_parser: extracts the Ethernet, IPv4, UDP and DNS headers of each packet.
//
// The parser watches the ingress stream (the beats the packet buffer accepts)
// and copies the first HDR_BYTES (65) bytes of every packet into a header
// buffer; beat b, lane l is packet byte b*DATA_BYTES+l. When the last beat has
// been seen it decodes the whole buffer at once and presents the packet header
// vector on phv with a one-cycle phv_valid pulse, in the cycle after the last
// beat. A header is marked valid only if the previous one is valid, names the
// next protocol and the packet is long enough to hold it, so short and non-DNS
// packets keep the headers they have and still get switched.
//
// Names of variable length are handled as in the original P4DNS design: the name's
// length follows from the UDP length and the fixed DNS fields
// (UDP length - 8 - 12 - 4 for one question), every supported length 1..MAX_NAME
// has its own fixed field layout, and shorter names are padded with zeroes so
// all lengths can be matched in one table. Semantic checks (query counts,
// opcode, type, class) are left to the main action. Accepting only IPv4 headers
// without options and unfragmented datagrams is this design's choice.
module dns_parser
  import dns_pkg::*;
#(
  parameter int unsigned DATA_BYTES = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // observed ingress beat (accepted handshake)
  input  logic                      beat,
  input  logic [DATA_BYTES*8-1:0]   tdata,
  input  logic [DATA_BYTES-1:0]     tkeep,     // contiguous from lane 0
  input  logic                      tlast,
  input  logic [7:0]                src_port,
  // parsed header vector
  output logic                      phv_valid,
  output phv_t                      phv
);
  localparam int unsigned NBEATS = (HDR_BYTES + DATA_BYTES - 1) / DATA_BYTES;

  logic [7:0]  hdr_q [HDR_BYTES];
  logic [7:0]  hdr_n [HDR_BYTES];
  logic [15:0] beat_idx_q;     // beats already seen in this packet
  logic [15:0] len_q;          // bytes already seen in this packet
  logic [15:0] len_n;

  function automatic int unsigned popcount(input logic [DATA_BYTES-1:0] v);
    int unsigned c = 0;
    for (int i = 0; i < DATA_BYTES; i++) c += v[i];
    return c;
  endfunction

  always_comb begin
    for (int h = 0; h < HDR_BYTES; h++) begin
      hdr_n[h] = (beat_idx_q == 0) ? 8'h00 : hdr_q[h];
      if (beat_idx_q == 16'(h / DATA_BYTES) && tkeep[h % DATA_BYTES])
        hdr_n[h] = tdata[(h % DATA_BYTES)*8 +: 8];
    end
    len_n = len_q + 16'(popcount(tkeep));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_idx_q <= '0;
      len_q      <= '0;
    end else if (beat) begin
      beat_idx_q <= tlast ? '0 : beat_idx_q + 1'b1;
      len_q      <= tlast ? '0 : len_n;
    end
  end

  always_ff @(posedge clk) begin
    if (beat) hdr_q <= hdr_n;
  end

  // --- decoding of the complete header buffer --------------------------------
  function automatic logic [15:0] be16(input logic [7:0] b [HDR_BYTES], input int unsigned o);
    return {b[o], b[o+1]};
  endfunction
  function automatic logic [31:0] be32(input logic [7:0] b [HDR_BYTES], input int unsigned o);
    return {b[o], b[o+1], b[o+2], b[o+3]};
  endfunction

  function automatic phv_t decode(input logic [7:0] b [HDR_BYTES], input logic [15:0] len,
                                  input logic [7:0] port);
    phv_t p;
    logic [15:0] nlen;
    p = '0;
    p.pkt_len  = len;
    p.src_port = port;
    p.eth_dst  = {be32(b, 0), be16(b, 4)};
    p.eth_src  = {be32(b, 6), be16(b, 10)};
    p.eth_type = be16(b, 12);
    p.eth_valid = (len >= 16'(IP_OFF));

    p.ip_ver_ihl = b[IP_OFF];
    p.ip_tos     = b[IP_OFF+1];
    p.ip_len     = be16(b, IP_OFF+2);
    p.ip_id      = be16(b, IP_OFF+4);
    p.ip_frag    = be16(b, IP_OFF+6);
    p.ip_ttl     = b[IP_OFF+8];
    p.ip_proto   = b[IP_OFF+9];
    p.ip_src     = be32(b, IP_OFF+12);
    p.ip_dst     = be32(b, IP_OFF+16);
    p.ipv4_valid = p.eth_valid && p.eth_type == ETHERTYPE_IPV4 &&
                   len >= 16'(UDP_OFF) && p.ip_ver_ihl == 8'h45;

    p.udp_sport = be16(b, UDP_OFF);
    p.udp_dport = be16(b, UDP_OFF+2);
    p.udp_len   = be16(b, UDP_OFF+4);
    p.udp_valid = p.ipv4_valid && p.ip_proto == IPPROTO_UDP &&
                  (p.ip_frag & 16'h3FFF) == 16'h0 && len >= 16'(DNS_OFF);

    p.dns_id    = be16(b, DNS_OFF);
    p.dns_flags = be16(b, DNS_OFF+2);
    p.dns_qd    = be16(b, DNS_OFF+4);
    p.dns_an    = be16(b, DNS_OFF+6);
    p.dns_ns    = be16(b, DNS_OFF+8);
    p.dns_ar    = be16(b, DNS_OFF+10);
    p.dns_valid = p.udp_valid && (p.udp_dport == DNS_PORT || p.udp_sport == DNS_PORT) &&
                  len >= 16'(QNAME_OFF);

    // Question: one fixed layout per supported name length
    nlen = p.udp_len - 16'd24;
    p.q_valid = 1'b0;
    for (int n = 1; n <= MAX_NAME; n++) begin
      if (p.dns_valid && p.udp_len >= 16'd24 && nlen == 16'(n) &&
          len >= 16'(QNAME_OFF + n + 4) && p.ip_len == p.udp_len + 16'd20 &&
          b[QNAME_OFF+n-1] == 8'h00) begin
        p.q_valid   = 1'b1;
        p.qname_len = 4'(n);
        for (int k = 0; k < MAX_NAME; k++)
          p.qname[(MAX_NAME-1-k)*8 +: 8] = (k < n) ? b[QNAME_OFF+k] : 8'h00;
        p.qtype  = be16(b, QNAME_OFF+n);
        p.qclass = be16(b, QNAME_OFF+n+2);
      end
    end
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phv_valid <= 1'b0;
      phv       <= '0;
    end else begin
      phv_valid <= beat && tlast;
      if (beat && tlast) phv <= decode(hdr_n, len_n, src_port);
    end
  end

  initial assert (NBEATS >= 1);
endmodule
