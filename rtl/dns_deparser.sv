// dns_deparser: re-emits each packet with the match-action decision applied.
//
// It pairs the packet's beats, kept in the packet buffer, with the packet's
// decision and header vector from the metadata buffer (both in arrival order).
//   * Forwarded packets leave unchanged, beat for beat, with the egress port
//     bitmask on m_tuser_dst; a packet with an empty bitmask is dropped.
//   * An answered request is replaced by a response that the deparser builds
//     from the parsed headers: Ethernet and IPv4 addresses and UDP ports are
//     swapped, the DNS header gets QR=1, RA=1, RCODE=0 and one answer, the
//     question is repeated, and a 16-byte A record is appended (name pointer
//     0xC00C to the question, type A, class IN, TTL, length 4, address). IPv4
//     total length and UDP length grow by 16 and the IPv4 header checksum is
//     recomputed; the UDP checksum is sent as zero ("not used" in IPv4). The
//     request's beats are drained from the buffer while the response goes out.
// Which headers are emitted for a response depends only on the validity bits of
// the parsed question, one fixed layout per supported name length, as in the
// parser. A 64-byte request becomes an 80-byte response.
//
// Timing: the first beat of a packet can leave in the cycle after its decision
// reaches the head of the metadata buffer; packets then follow back to back
// with no idle cycle. Output handshake: a beat moves when m_tvalid && m_tready.
// Flag values, UDP checksum zero and the IPv4 TTL copied from the request are
// this design's choices.
module dns_deparser
  import dns_pkg::*;
#(
  parameter int unsigned DATA_BYTES = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // packet buffer (head beat)
  input  logic                      pkt_valid,
  input  logic [DATA_BYTES*8-1:0]   pkt_tdata,
  input  logic [DATA_BYTES-1:0]     pkt_tkeep,
  input  logic                      pkt_tlast,
  output logic                      pkt_pop,
  // metadata buffer (head entry)
  input  logic                      meta_valid,
  input  act_t                      meta_act,
  input  phv_t                      meta_phv,
  output logic                      meta_pop,
  // egress stream
  output logic                      m_tvalid,
  input  logic                      m_tready,
  output logic [DATA_BYTES*8-1:0]   m_tdata,
  output logic [DATA_BYTES-1:0]     m_tkeep,
  output logic                      m_tlast,
  output logic [7:0]                m_tuser_dst
);
  localparam int unsigned RBEATS = (RESP_BYTES + DATA_BYTES - 1) / DATA_BYTES;

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_RESP} state_e;

  state_e       state;
  act_t         cur_act;
  logic [7:0]   resp_buf [RBEATS*DATA_BYTES];
  logic [15:0]  resp_len;
  logic [15:0]  beat_k;
  logic         resp_done, drained;

  // --- response construction -------------------------------------------------
  function automatic logic [15:0] ip_checksum(input logic [7:0] h [RBEATS*DATA_BYTES]);
    logic [19:0] sum = '0;
    for (int i = 0; i < 10; i++)
      if (i != 5) sum += {4'h0, h[IP_OFF+2*i], h[IP_OFF+2*i+1]};
    sum = {4'h0, sum[15:0]} + {16'h0, sum[19:16]};
    sum = {4'h0, sum[15:0]} + {16'h0, sum[19:16]};
    return ~sum[15:0];
  endfunction

  function automatic void put16(ref logic [7:0] h [RBEATS*DATA_BYTES], input int unsigned o,
                                input logic [15:0] v);
    h[o] = v[15:8]; h[o+1] = v[7:0];
  endfunction
  function automatic void put32(ref logic [7:0] h [RBEATS*DATA_BYTES], input int unsigned o,
                                input logic [31:0] v);
    put16(h, o, v[31:16]); put16(h, o+2, v[15:0]);
  endfunction

  logic [7:0]  build_buf [RBEATS*DATA_BYTES];
  logic [15:0] build_len;

  always_comb begin
    logic [15:0] flags;
    for (int i = 0; i < RBEATS*DATA_BYTES; i++) build_buf[i] = 8'h00;
    build_len = '0;
    // Ethernet: swap addresses
    put32(build_buf, 0, meta_phv.eth_src[47:16]);
    put16(build_buf, 4, meta_phv.eth_src[15:0]);
    put32(build_buf, 6, meta_phv.eth_dst[47:16]);
    put16(build_buf, 10, meta_phv.eth_dst[15:0]);
    put16(build_buf, 12, meta_phv.eth_type);
    // IPv4: swap addresses, grow by one answer
    build_buf[IP_OFF]   = meta_phv.ip_ver_ihl;
    build_buf[IP_OFF+1] = meta_phv.ip_tos;
    put16(build_buf, IP_OFF+2, meta_phv.ip_len + 16'(ANS_BYTES));
    put16(build_buf, IP_OFF+4, meta_phv.ip_id);
    put16(build_buf, IP_OFF+6, meta_phv.ip_frag);
    build_buf[IP_OFF+8] = meta_phv.ip_ttl;
    build_buf[IP_OFF+9] = meta_phv.ip_proto;
    put32(build_buf, IP_OFF+12, meta_phv.ip_dst);
    put32(build_buf, IP_OFF+16, meta_phv.ip_src);
    put16(build_buf, IP_OFF+10, ip_checksum(build_buf));
    // UDP: swap ports, checksum zero
    put16(build_buf, UDP_OFF,   meta_phv.udp_dport);
    put16(build_buf, UDP_OFF+2, meta_phv.udp_sport);
    put16(build_buf, UDP_OFF+4, meta_phv.udp_len + 16'(ANS_BYTES));
    // DNS header
    flags = '0;
    flags[FLAG_QR]    = 1'b1;
    flags[14:11]      = meta_phv.dns_flags[14:11];  // opcode
    flags[FLAG_RD]    = meta_phv.dns_flags[FLAG_RD];
    flags[FLAG_RA]    = 1'b1;
    put16(build_buf, DNS_OFF,    meta_phv.dns_id);
    put16(build_buf, DNS_OFF+2,  flags);
    put16(build_buf, DNS_OFF+4,  16'd1);
    put16(build_buf, DNS_OFF+6,  16'd1);
    put16(build_buf, DNS_OFF+8,  16'd0);
    put16(build_buf, DNS_OFF+10, 16'd0);
    // Question and answer: one layout per supported name length
    for (int n = 1; n <= MAX_NAME; n++) begin
      if (meta_phv.qname_len == 4'(n)) begin
        for (int k = 0; k < n; k++)
          build_buf[QNAME_OFF+k] = meta_phv.qname[(MAX_NAME-1-k)*8 +: 8];
        put16(build_buf, QNAME_OFF+n,    meta_phv.qtype);
        put16(build_buf, QNAME_OFF+n+2,  meta_phv.qclass);
        put16(build_buf, QNAME_OFF+n+4,  16'hC00C);  // pointer to the question name (DNS offset 12)
        put16(build_buf, QNAME_OFF+n+6,  QTYPE_A);
        put16(build_buf, QNAME_OFF+n+8,  QCLASS_IN);
        put32(build_buf, QNAME_OFF+n+10, meta_act.ans_ttl);
        put16(build_buf, QNAME_OFF+n+14, 16'd4);
        put32(build_buf, QNAME_OFF+n+16, meta_act.ans_addr);
        build_len = 16'(QNAME_OFF + n + 4 + ANS_BYTES);
      end
    end
  end

  // --- packet sequencing ------------------------------------------------------
  logic fin, take, out_fire, resp_last, resp_done_n, drained_n;

  assign resp_last = ((beat_k + 16'd1) * 16'(DATA_BYTES)) >= resp_len;

  always_comb begin
    m_tvalid = 1'b0;
    m_tdata  = pkt_tdata;
    m_tkeep  = pkt_tkeep;
    m_tlast  = pkt_tlast;
    pkt_pop  = 1'b0;
    fin      = 1'b0;
    resp_done_n = resp_done;
    drained_n   = drained;
    unique case (state)
      S_IDLE: fin = 1'b1;
      S_FWD: begin
        m_tvalid = pkt_valid && cur_act.dst_port != 8'h00;
        pkt_pop  = pkt_valid && (m_tready || cur_act.dst_port == 8'h00);
        fin      = pkt_pop && pkt_tlast;
      end
      S_RESP: begin
        m_tvalid = !resp_done;
        for (int l = 0; l < DATA_BYTES; l++) begin
          m_tdata[l*8 +: 8] = 8'h00;
          m_tkeep[l]        = 1'b0;
          for (int b = 0; b < RBEATS; b++)
            if (beat_k == 16'(b)) begin
              m_tdata[l*8 +: 8] = resp_buf[b*DATA_BYTES + l];
              m_tkeep[l]        = 16'(b*DATA_BYTES + l) < resp_len;
            end
        end
        m_tlast  = resp_last;
        pkt_pop  = pkt_valid && !drained;
        resp_done_n = resp_done || (m_tvalid && m_tready && resp_last);
        drained_n   = drained || (pkt_pop && pkt_tlast);
        fin      = resp_done_n && drained_n;
      end
      default: ;
    endcase
  end

  assign out_fire = m_tvalid && m_tready;
  assign take     = fin && meta_valid;
  assign meta_pop = take;
  assign m_tuser_dst = cur_act.dst_port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_act   <= '0;
      resp_len  <= '0;
      beat_k    <= '0;
      resp_done <= 1'b0;
      drained   <= 1'b0;
    end else begin
      resp_done <= resp_done_n;
      drained   <= drained_n;
      if (out_fire && state == S_RESP) beat_k <= beat_k + 1'b1;
      if (take) begin
        cur_act   <= meta_act;
        state     <= meta_act.respond ? S_RESP : S_FWD;
        resp_len  <= build_len;
        beat_k    <= '0;
        resp_done <= 1'b0;
        drained   <= 1'b0;
      end else if (fin) begin
        state <= S_IDLE;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) resp_buf <= build_buf;
  end

  // A response must come from a parsed, supported question.
  a_resp_has_question: assert property (@(posedge clk) disable iff (!rst_n)
    take && meta_act.respond |-> meta_phv.q_valid);
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready && state == S_RESP |=> m_tvalid);
endmodule
