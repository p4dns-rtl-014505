// tb_dns_deparser: plays the packet and metadata buffers (queues whose heads
// are shown to the deparser) and checks every frame that leaves: answered
// queries must equal the response built independently by tb_dns_util_pkg (64-
// and 65-byte queries become 80- and 81-byte answers), forwarded frames must be
// unchanged and carry their port bitmask, dropped frames must vanish without
// disturbing the next one. It also checks that the first beat is offered in
// the cycle after the decision appears, that packets follow back to back
// without idle cycles, and that random output backpressure loses nothing.
module tb_dns_deparser;
  import dns_pkg::*;
  import tb_dns_util_pkg::*;
  localparam int DB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_tlast, pkt_pop, meta_valid, meta_pop;
  logic [DB*8-1:0] pkt_tdata;
  logic [DB-1:0] pkt_tkeep;
  act_t meta_act;
  phv_t meta_phv;
  logic m_tvalid, m_tready = 1, m_tlast;
  logic [DB*8-1:0] m_tdata;
  logic [DB-1:0] m_tkeep;
  logic [7:0] m_tuser_dst;
  dns_deparser #(.DATA_BYTES(DB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // buffer models
  typedef struct { logic [DB*8-1:0] d; logic [DB-1:0] k; logic l; } beat_t;
  beat_t pq[$];
  act_t  aq[$];
  phv_t  hq[$];
  assign pkt_valid  = pq.size() > 0;
  assign pkt_tdata  = pkt_valid ? pq[0].d : '0;
  assign pkt_tkeep  = pkt_valid ? pq[0].k : '0;
  assign pkt_tlast  = pkt_valid ? pq[0].l : 1'b0;
  assign meta_valid = aq.size() > 0;
  assign meta_act   = meta_valid ? aq[0] : '0;
  assign meta_phv   = meta_valid ? hq[0] : '0;
  always @(posedge clk) begin
    if (pkt_pop)  void'(pq.pop_front());
    if (meta_pop) begin void'(aq.pop_front()); void'(hq.pop_front()); end
  end

  function automatic void push_frame(input bytes_t f);
    int nb = (f.size() + DB - 1) / DB;
    for (int b = 0; b < nb; b++) begin
      beat_t x;
      x.d = '0; x.k = '0; x.l = (b == nb - 1);
      for (int l = 0; l < DB; l++) if (b*DB + l < f.size()) begin x.d[l*8 +: 8] = f[b*DB + l]; x.k[l] = 1; end
      pq.push_back(x);
    end
  endfunction

  // header vector of a query built with dns_query(), from the same arguments
  function automatic phv_t query_phv(input logic [47:0] dmac, smac, input logic [31:0] sip, dip,
                                     input logic [15:0] sport, id, input bit rd, input bytes_t name);
    phv_t p = '0;
    p.eth_valid = 1; p.ipv4_valid = 1; p.udp_valid = 1; p.dns_valid = 1; p.q_valid = 1;
    p.pkt_len = 16'(58 + name.size());
    p.eth_dst = dmac; p.eth_src = smac; p.eth_type = 16'h0800;
    p.ip_ver_ihl = 8'h45; p.ip_len = 16'(44 + name.size()); p.ip_id = 16'h1234; p.ip_ttl = 8'd64;
    p.ip_proto = 8'd17; p.ip_src = sip; p.ip_dst = dip;
    p.udp_sport = sport; p.udp_dport = 16'd53; p.udp_len = 16'(24 + name.size());
    p.dns_id = id; p.dns_flags = {7'b0, rd, 8'h00}; p.dns_qd = 1;
    p.qname = name_key(name, MAX_NAME)[MAX_NAME*8-1:0]; p.qname_len = 4'(name.size());
    p.qtype = 1; p.qclass = 1;
    return p;
  endfunction

  bytes_t exp_f[$];
  logic [7:0] exp_p[$];
  bytes_t cur;
  logic [7:0] cur_dst;
  int n_out = 0, n_beats = 0, n_bp = 0;
  bit rnd_ready = 0;
  initial forever begin
    @(negedge clk);
    m_tready = rnd_ready ? ($urandom % 2 == 0) : 1'b1;
    #1;
    if (m_tvalid && !m_tready) n_bp++;
    if (rst_n && m_tvalid && m_tready) begin
      n_beats++;
      if (cur.size() == 0) cur_dst = m_tuser_dst;
      for (int l = 0; l < DB; l++) if (m_tkeep[l]) cur.push_back(m_tdata[l*8 +: 8]);
      if (m_tlast) begin
        n_out++;
        if (exp_f.size() == 0) check(0, "unexpected frame");
        else begin
          bytes_t e; logic [7:0] p;
          e = exp_f.pop_front(); p = exp_p.pop_front();
          check(cur == e, $sformatf("frame %0d differs (%0d vs %0d bytes)", n_out, cur.size(), e.size()));
          check(cur_dst == p, $sformatf("frame %0d dst %02x want %02x", n_out, cur_dst, p));
        end
        cur = {};
      end
    end
  end

  function automatic void answer(input logic [7:0] port, input logic [15:0] id, input bytes_t name,
                                 input logic [31:0] addr, ttl);
    act_t a = '0;
    push_frame(dns_query(48'hB, 48'hA, 32'h0A000001, 32'h0A000002, 16'd4000, id, 1'b1, name));
    a.path = PATH_ANSWER; a.dst_port = port; a.respond = 1; a.ans_addr = addr; a.ans_ttl = ttl;
    aq.push_back(a);
    hq.push_back(query_phv(48'hB, 48'hA, 32'h0A000001, 32'h0A000002, 16'd4000, id, 1'b1, name));
    exp_f.push_back(dns_answer(48'hB, 48'hA, 32'h0A000001, 32'h0A000002, 16'd4000, id, 1'b1, name, addr, ttl));
    exp_p.push_back(port);
  endfunction

  function automatic void forward(input bytes_t f, input logic [7:0] port);
    act_t a = '0;
    push_frame(f);
    a.path = (port == 0) ? PATH_DROP : PATH_SWITCH; a.dst_port = port;
    aq.push_back(a); hq.push_back('0);
    if (port != 0) begin exp_f.push_back(f); exp_p.push_back(port); end
  endfunction

  initial begin
    int b0, total_beats;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: decision shown now, first beat offered at the next falling edge
    answer(8'h01, 16'h0101, encode_name("a.bc"), 32'hC0A80101, 32'd300);
    #2 check(!m_tvalid, "nothing before the decision is taken");
    @(negedge clk); #2 check(m_tvalid, "first beat one cycle after the decision");
    repeat (20) @(negedge clk);
    check(n_out == 1 && exp_f.size() == 0, "64-byte query answered");

    // back to back, no idle cycles: 81-byte answer (6 beats at 16 B), a
    // dropped frame, a forwarded 100-byte frame (7 beats), a 3-byte name
    // answered (61-byte query), a forwarded 60-byte frame (4 beats)
    b0 = n_beats;
    answer(8'h04, 16'h0202, encode_name("ab.cd"), 32'hC0A80202, 32'd1);
    forward(plain_frame(48'h1, 48'h2, 70, 1), 8'h00);
    forward(plain_frame(48'h1, 48'h2, 100, 2), 8'h54);
    answer(8'h10, 16'h0303, encode_name("a"), 32'h08080808, 32'd65535);
    forward(plain_frame(48'h1, 48'h2, 60, 3), 8'h06);
    total_beats = 6 + 7 + 5 + 4;   // "a" is a 3-byte name: 61-byte query, 77-byte answer
    // the dropped frame drains in 5 cycles with no output; answers drain their
    // query while sending, so the output is busy for at most total+5+1 cycles
    repeat (total_beats + 5 + 2) @(negedge clk);
    check(n_beats - b0 == total_beats, $sformatf("beats out %0d want %0d", n_beats - b0, total_beats));
    check(exp_f.size() == 0 && pq.size() == 0 && aq.size() == 0, "all frames out, buffers empty");

    // random backpressure over a long mix
    rnd_ready = 1;
    for (int i = 0; i < 50; i++) begin
      case ($urandom % 3)
        0: answer(8'h01, 16'(i), encode_name("a.bc"), $urandom, $urandom);
        1: forward(plain_frame(48'h1, 48'h2, 20 + $urandom % 300, i), 8'h40);
        default: forward(plain_frame(48'h1, 48'h2, 14 + $urandom % 100, i), 8'h00);
      endcase
    end
    repeat (3000) @(negedge clk);
    check(exp_f.size() == 0 && pq.size() == 0, "mix drained");
    check(n_bp > 0, "backpressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
