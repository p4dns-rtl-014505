// p4dns_top: data plane of an in-network DNS cache built into a learning switch.
//
// A switch that answers DNS A-record queries itself when it holds the answer:
// every packet of the shared ingress stream (four 10GE ports and the host DMA
// queues, merged by the platform's input arbiter) is parsed, decided on by a
// match-action stage and re-emitted by a deparser:
//
//   s_* --+--> sync_fifo (packet beats) -----------------------+
//         |                                                    v
//         +--> dns_parser --phv--> main_action --act+phv--> sync_fifo --> dns_deparser --> m_*
//                                   |  DNS cache table (name -> address, TTL)
//                                   |  MAC table (MAC -> port)
//                                   +--> digest (unknown source MAC)
//
// Cached queries are answered from the ingress port; unanswerable queries with
// recursion desired go to the control plane (host) only; DNS responses are
// switched and copied to the control plane; everything else is switched. The
// control plane, which is host software, fills both tables through tbl_wr
// (one write per cycle, index chosen by the host, valid=0 deletes) and receives
// the digests and the packets sent to CPU_PORT.
//
// Interface: AXI4-Stream style. s_tuser_src is the one-hot ingress port of the
// packet (held for all its beats); m_tuser_dst is the egress bitmask for the
// platform's output queues. tkeep is contiguous from lane 0, tdata[7:0] is the
// first byte. s_tready drops while either buffer lacks room. Packets must fit
// the packet buffer (PKT_FIFO_DEPTH beats, 2048 bytes at the defaults).
//
// Timing: the decision for a packet is ready 3 cycles after its last beat is
// accepted, and its first beat can leave 2 cycles after that (5 cycles in all,
// from last beat in to first beat out when the buffers are empty). The bus
// width, buffer depths and MAC table size are this design's choices; the DNS
// table size (64) and the 65-byte parse window follow the original P4DNS design.
module p4dns_top
  import dns_pkg::*;
#(
  parameter int unsigned DATA_BYTES      = 32,
  parameter int unsigned DNS_ENTRIES     = 64,
  parameter int unsigned MAC_ENTRIES     = 64,
  parameter int unsigned PKT_FIFO_DEPTH  = 64,
  parameter int unsigned META_FIFO_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ingress stream
  input  logic                      s_tvalid,
  output logic                      s_tready,
  input  logic [DATA_BYTES*8-1:0]   s_tdata,
  input  logic [DATA_BYTES-1:0]     s_tkeep,
  input  logic                      s_tlast,
  input  logic [7:0]                s_tuser_src,
  // egress stream
  output logic                      m_tvalid,
  input  logic                      m_tready,
  output logic [DATA_BYTES*8-1:0]   m_tdata,
  output logic [DATA_BYTES-1:0]     m_tkeep,
  output logic                      m_tlast,
  output logic [7:0]                m_tuser_dst,
  // control plane
  input  tbl_wr_t                   tbl_wr,
  output logic                      digest_valid,
  output logic [47:0]               digest_mac,
  output logic [7:0]                digest_port
);
  localparam int unsigned PKT_W  = DATA_BYTES*8 + DATA_BYTES + 1;
  localparam int unsigned META_W = $bits(act_t) + $bits(phv_t);
  // decisions that can be in flight between the parser and the metadata buffer
  localparam int unsigned IN_FLIGHT = 3;

  logic beat;
  logic pkt_full, pkt_valid, pkt_pop;
  logic [PKT_W-1:0] pkt_word;
  logic [$clog2(PKT_FIFO_DEPTH):0] pkt_count;

  logic meta_full, meta_valid, meta_pop;
  logic [META_W-1:0] meta_word;
  logic [$clog2(META_FIFO_DEPTH):0] meta_count;

  logic phv_valid, act_valid;
  phv_t phv, act_phv, meta_phv;
  act_t act, meta_act;

  assign s_tready = !pkt_full &&
                    (meta_count + ($clog2(META_FIFO_DEPTH)+1)'(IN_FLIGHT)) < ($clog2(META_FIFO_DEPTH)+1)'(META_FIFO_DEPTH);
  assign beat     = s_tvalid && s_tready;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(PKT_FIFO_DEPTH)) u_pkt_fifo (
    .clk, .rst_n,
    .wr_en   (beat),
    .wr_data ({s_tdata, s_tkeep, s_tlast}),
    .full    (pkt_full),
    .rd_en   (pkt_pop),
    .rd_data (pkt_word),
    .rd_valid(pkt_valid),
    .count   (pkt_count)
  );

  dns_parser #(.DATA_BYTES(DATA_BYTES)) u_parser (
    .clk, .rst_n,
    .beat, .tdata(s_tdata), .tkeep(s_tkeep), .tlast(s_tlast), .src_port(s_tuser_src),
    .phv_valid, .phv
  );

  main_action #(.DNS_ENTRIES(DNS_ENTRIES), .MAC_ENTRIES(MAC_ENTRIES)) u_main (
    .clk, .rst_n,
    .phv_valid, .phv, .tbl_wr,
    .act_valid, .act, .act_phv,
    .digest_valid, .digest_mac, .digest_port
  );

  sync_fifo #(.WIDTH(META_W), .DEPTH(META_FIFO_DEPTH)) u_meta_fifo (
    .clk, .rst_n,
    .wr_en   (act_valid),
    .wr_data ({act, act_phv}),
    .full    (meta_full),
    .rd_en   (meta_pop),
    .rd_data (meta_word),
    .rd_valid(meta_valid),
    .count   (meta_count)
  );
  assign {meta_act, meta_phv} = meta_word;

  dns_deparser #(.DATA_BYTES(DATA_BYTES)) u_deparser (
    .clk, .rst_n,
    .pkt_valid, .pkt_tdata(pkt_word[PKT_W-1 -: DATA_BYTES*8]),
    .pkt_tkeep(pkt_word[DATA_BYTES:1]), .pkt_tlast(pkt_word[0]), .pkt_pop,
    .meta_valid, .meta_act, .meta_phv, .meta_pop,
    .m_tvalid, .m_tready, .m_tdata, .m_tkeep, .m_tlast, .m_tuser_dst
  );

  a_meta_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) act_valid |-> !meta_full);
  a_src_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_tvalid && !s_tready |=> s_tvalid);
endmodule
