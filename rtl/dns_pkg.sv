// dns_pkg: types and constants shared by the in-network DNS data plane.
//
// The data plane carries packets on a byte-lane stream whose lane 0 (tdata[7:0])
// holds the first byte of the packet. Parsed header fields travel between the
// stages in a packet header vector (phv_t); the match-action decision travels in
// act_t. Port numbers are one-hot bytes: bit 2i is 10GE port i, bit 2i+1 is the
// DMA queue i towards the host. Header offsets follow Ethernet II, IPv4 without
// options, UDP and the 12-byte DNS header; the question name starts at byte 54.
// The name field is MAX_NAME bytes wide; shorter names are padded with zeroes so
// that names of every supported length match in a single table.
package dns_pkg;

  // Longest encoded question name (length bytes, labels and the closing zero).
  // 54 bytes of headers + 7 name bytes + 4 bytes of QTYPE/QCLASS = 65 bytes.
  localparam int unsigned MAX_NAME = 7;

  localparam int unsigned IP_OFF    = 14;
  localparam int unsigned UDP_OFF   = 34;
  localparam int unsigned DNS_OFF   = 42;
  localparam int unsigned QNAME_OFF = 54;
  localparam int unsigned HDR_BYTES = QNAME_OFF + MAX_NAME + 4;  // 65
  localparam int unsigned ANS_BYTES = 16;  // pointer, type, class, TTL, rdlength, address
  localparam int unsigned RESP_BYTES = HDR_BYTES + ANS_BYTES;    // 81

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;
  localparam logic [15:0] DNS_PORT       = 16'd53;
  localparam logic [15:0] QTYPE_A        = 16'd1;
  localparam logic [15:0] QCLASS_IN      = 16'd1;

  // One-hot port encoding
  localparam logic [7:0] NF_PORTS = 8'b0101_0101;  // the four 10GE ports
  localparam logic [7:0] CPU_PORT = 8'b0000_0010;  // DMA queue 0: control plane

  typedef logic [MAX_NAME*8-1:0] name_t;

  typedef struct packed {
    // validity: a header is valid only if the packet is long enough to hold it
    logic        eth_valid;
    logic        ipv4_valid;
    logic        udp_valid;
    logic        dns_valid;
    logic        q_valid;     // a supported single question was found
    logic [15:0] pkt_len;     // bytes in the frame (no FCS)
    logic [7:0]  src_port;    // one-hot ingress port
    // Ethernet
    logic [47:0] eth_dst;
    logic [47:0] eth_src;
    logic [15:0] eth_type;
    // IPv4
    logic [7:0]  ip_ver_ihl;
    logic [7:0]  ip_tos;
    logic [15:0] ip_len;
    logic [15:0] ip_id;
    logic [15:0] ip_frag;
    logic [7:0]  ip_ttl;
    logic [7:0]  ip_proto;
    logic [31:0] ip_src;
    logic [31:0] ip_dst;
    // UDP
    logic [15:0] udp_sport;
    logic [15:0] udp_dport;
    logic [15:0] udp_len;
    // DNS header (Fig. 1 of the DNS packet layout: six 16-bit rows)
    logic [15:0] dns_id;
    logic [15:0] dns_flags;   // QR, opcode, AA, TC, RD, RA, Z, RCODE
    logic [15:0] dns_qd;
    logic [15:0] dns_an;
    logic [15:0] dns_ns;
    logic [15:0] dns_ar;
    // Question
    name_t       qname;       // first name byte in the top byte, zero padded
    logic [3:0]  qname_len;   // encoded length in bytes
    logic [15:0] qtype;
    logic [15:0] qclass;
  } phv_t;

  // DNS flag bits inside dns_flags (network bit order, bit 15 first on the wire)
  localparam int unsigned FLAG_QR = 15;
  localparam int unsigned FLAG_RD = 8;
  localparam int unsigned FLAG_RA = 7;

  // Path a packet takes through the decision flow of the main action
  typedef enum logic [2:0] {
    PATH_SWITCH   = 3'd0,  // not DNS, or not a supported DNS packet: switched
    PATH_ANSWER   = 3'd1,  // request hit the DNS cache: answered in place
    PATH_RESOLVE  = 3'd2,  // request missed, recursion desired: to control plane only
    PATH_MISS_FWD = 3'd3,  // request missed, no recursion desired: switched
    PATH_RESP_CPY = 3'd4,  // DNS response: switched, copy to control plane
    PATH_DROP     = 3'd5   // runt frame without a full Ethernet header
  } path_e;

  typedef struct packed {
    path_e       path;
    logic [7:0]  dst_port;    // egress bitmask; zero drops the packet
    logic        respond;     // replace the packet by a DNS response
    logic [31:0] ans_addr;    // A record address for the response
    logic [31:0] ans_ttl;     // TTL for the response
  } act_t;

  // Control-plane write into one of the match tables
  typedef enum logic [0:0] {TBL_MAC = 1'b0, TBL_DNS = 1'b1} tbl_sel_e;

  typedef struct packed {
    logic        en;
    tbl_sel_e    sel;
    logic [7:0]  index;
    logic        valid;       // 0 deletes the entry
    name_t       key;         // MAC keys use the low 48 bits
    logic [63:0] value;       // DNS: {address, TTL}; MAC: port in the low 8 bits
  } tbl_wr_t;

endpackage
