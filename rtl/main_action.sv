// main_action: the match-action stage of the in-network DNS data plane.
//
// For every parsed header vector it decides where the packet goes, following
// the packet flow of the design:
//   * not DNS, or a DNS packet of an unsupported form  -> switched;
//   * supported DNS request whose name hits the DNS cache -> answered: the
//     deparser turns it into a response and sends it back out of its ingress
//     port;
//   * request that misses with "recursion desired" set -> sent to the control
//     plane over DMA only, for recursive resolution (not forwarded);
//   * request that misses without it -> switched towards the name server;
//   * DNS response -> switched as normal, with a copy to the control plane,
//     which updates the tables;
//   * anything the control plane itself sends (its recursive queries, the
//     answers and error responses it forwards to the wire) arrives on a DMA
//     port and is only switched, so it cannot loop back to the host.
// Switching is the learning switch: the destination MAC is looked up in the MAC
// table (hit: its port; miss: flood to the other 10GE ports), and a source MAC
// that is not in the table, or is listed on another port, is reported on the digest port so the control plane
// can learn it. A supported request is a standard query (opcode 0) with exactly
// one question, no other records, type A and class IN, over UDP port 53.
//
// Timing: phv_valid in cycle t gives act_valid with the decision and the same
// header vector in cycle t+2 (table lookup, then decision); digest_valid pulses
// in the same cycle. One packet per cycle can be accepted. Tables are written
// by the control plane through tbl_wr. What goes where follows the original P4DNS design;
// flooding on a miss, dropping runt frames, switching host packets without DNS
// handling, not learning from DMA ports and the exact support checks are this
// design's choices.
module main_action
  import dns_pkg::*;
#(
  parameter int unsigned DNS_ENTRIES = 64,
  parameter int unsigned MAC_ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        phv_valid,
  input  phv_t        phv,
  input  tbl_wr_t     tbl_wr,
  output logic        act_valid,
  output act_t        act,
  output phv_t        act_phv,
  output logic        digest_valid,
  output logic [47:0] digest_mac,
  output logic [7:0]  digest_port
);
  // --- stage 1: table lookups -------------------------------------------------
  logic                   dns_hit;
  logic [63:0]            dns_value;
  logic [1:0]             mac_hit;
  logic [1:0][7:0]        mac_value;
  logic [1:0][47:0]       mac_key;

  assign mac_key[0] = phv.eth_dst;
  assign mac_key[1] = phv.eth_src;

  exact_match_table #(.KEY_W(MAX_NAME*8), .VAL_W(64), .DEPTH(DNS_ENTRIES), .LOOKUPS(1)) u_dns_table (
    .clk, .rst_n,
    .wr_en   (tbl_wr.en && tbl_wr.sel == TBL_DNS),
    .wr_index($clog2(DNS_ENTRIES)'(tbl_wr.index)),
    .wr_valid(tbl_wr.valid),
    .wr_key  (tbl_wr.key),
    .wr_value(tbl_wr.value),
    .lk_key  (phv.qname),
    .lk_hit  (dns_hit),
    .lk_value(dns_value)
  );

  exact_match_table #(.KEY_W(48), .VAL_W(8), .DEPTH(MAC_ENTRIES), .LOOKUPS(2)) u_mac_table (
    .clk, .rst_n,
    .wr_en   (tbl_wr.en && tbl_wr.sel == TBL_MAC),
    .wr_index($clog2(MAC_ENTRIES)'(tbl_wr.index)),
    .wr_valid(tbl_wr.valid),
    .wr_key  (tbl_wr.key[47:0]),
    .wr_value(tbl_wr.value[7:0]),
    .lk_key  (mac_key),
    .lk_hit  (mac_hit),
    .lk_value(mac_value)
  );

  logic s1_valid;
  phv_t s1_phv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_phv   <= '0;
    end else begin
      s1_valid <= phv_valid;
      if (phv_valid) s1_phv <= phv;
    end
  end

  // --- stage 2: decision ------------------------------------------------------
  act_t act_d;
  logic learn_d;

  always_comb begin
    logic is_req, is_resp, supported_req, rd, from_host;
    logic [7:0] switch_port;

    is_req  = s1_phv.dns_valid && !s1_phv.dns_flags[FLAG_QR] && s1_phv.udp_dport == DNS_PORT;
    is_resp = s1_phv.dns_valid &&  s1_phv.dns_flags[FLAG_QR] && s1_phv.udp_sport == DNS_PORT &&
              s1_phv.dns_flags[14:11] == 4'd0;
    supported_req = is_req && s1_phv.q_valid && s1_phv.dns_flags[14:11] == 4'd0 &&
                    s1_phv.dns_qd == 16'd1 && s1_phv.dns_an == 16'd0 &&
                    s1_phv.dns_ns == 16'd0 && s1_phv.dns_ar == 16'd0 &&
                    s1_phv.qtype == QTYPE_A && s1_phv.qclass == QCLASS_IN;
    rd = s1_phv.dns_flags[FLAG_RD];
    from_host = (s1_phv.src_port & ~NF_PORTS) != 8'h00;

    switch_port = mac_hit[0] ? mac_value[0] : (NF_PORTS & ~s1_phv.src_port);

    act_d = '0;
    if (!s1_phv.eth_valid) begin
      act_d.path     = PATH_DROP;
      act_d.dst_port = 8'h00;
    end else if (from_host) begin
      act_d.path     = PATH_SWITCH;
      act_d.dst_port = switch_port;
    end else if (supported_req && dns_hit) begin
      act_d.path     = PATH_ANSWER;
      act_d.dst_port = s1_phv.src_port;
      act_d.respond  = 1'b1;
      act_d.ans_addr = dns_value[63:32];
      act_d.ans_ttl  = dns_value[31:0];
    end else if (supported_req && rd) begin
      act_d.path     = PATH_RESOLVE;
      act_d.dst_port = CPU_PORT;
    end else if (supported_req) begin
      act_d.path     = PATH_MISS_FWD;
      act_d.dst_port = switch_port;
    end else if (is_resp) begin
      act_d.path     = PATH_RESP_CPY;
      act_d.dst_port = switch_port | CPU_PORT;
    end else begin
      act_d.path     = PATH_SWITCH;
      act_d.dst_port = switch_port;
    end

    learn_d = s1_phv.eth_valid && (s1_phv.src_port & NF_PORTS) != 8'h00 &&
              (!mac_hit[1] || mac_value[1] != s1_phv.src_port);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_valid    <= 1'b0;
      act          <= '0;
      act_phv      <= '0;
      digest_valid <= 1'b0;
      digest_mac   <= '0;
      digest_port  <= '0;
    end else begin
      act_valid    <= s1_valid;
      digest_valid <= s1_valid && learn_d;
      if (s1_valid) begin
        act         <= act_d;
        act_phv     <= s1_phv;
        digest_mac  <= s1_phv.eth_src;
        digest_port <= s1_phv.src_port;
      end
    end
  end
endmodule
