// tb_p4dns_top: end-to-end test of the DNS data plane at its default sizes.
//
// The testbench plays the four 10GE hosts and the control plane. It learns MAC
// addresses from the digests, fills and deletes DNS cache entries, and sends
// switched frames, queries that hit and miss (with and without recursion
// desired), name-server responses, unsupported queries and runt frames. Every
// frame leaving the data plane is compared byte for byte, with its egress
// port bitmask, against frames built independently by tb_dns_util_pkg. It then
// checks the cache-hit latency, streams back-to-back queries to measure the
// answer rate, and repeats traffic with random output backpressure. Each path
// of the packet flow, flooding, learning, input stalls, output backpressure and
// entry deletion must occur at least once.
module tb_p4dns_top;
  import dns_pkg::*;
  import tb_dns_util_pkg::*;

  localparam int DB = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic [DB*8-1:0] s_tdata = '0;
  logic [DB-1:0]   s_tkeep = '0;
  logic [7:0]      s_tuser_src = '0;
  logic m_tvalid, m_tready = 1'b1, m_tlast;
  logic [DB*8-1:0] m_tdata;
  logic [DB-1:0]   m_tkeep;
  logic [7:0]      m_tuser_dst;
  tbl_wr_t tbl_wr = '0;
  logic digest_valid;
  logic [47:0] digest_mac;
  logic [7:0] digest_port;

  p4dns_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_path[6];
  int n_flood = 0, n_digest = 0, n_in_stall = 0, n_out_bp = 0, n_delete = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && dut.act_valid) begin
    n_path[dut.act.path]++;
    if (dut.act.dst_port == (NF_PORTS & ~dut.act_phv.src_port) && dut.act.path == PATH_SWITCH) n_flood++;
  end
  always @(posedge clk) if (rst_n && s_tvalid && !s_tready) n_in_stall++;
  always @(posedge clk) if (rst_n && m_tvalid && !m_tready) n_out_bp++;

  // ---- control plane model: learn from digests ------------------------------
  int mac_next = 0;
  logic [7:0] learned [logic [47:0]];
  logic [47:0] learn_q[$];
  logic [7:0]  learn_p[$];
  always @(negedge clk) if (rst_n && digest_valid) begin
    n_digest++;
    learn_q.push_back(digest_mac);
    learn_p.push_back(digest_port);
  end

  // one table write per cycle, driven at the falling edge
  semaphore wr_lock = new(1);
  task automatic tbl_write(input tbl_sel_e sel, input int idx, input bit valid,
                           input logic [55:0] key, input logic [63:0] value);
    wr_lock.get(1);
    @(negedge clk);
    tbl_wr.en = 1'b1; tbl_wr.sel = sel; tbl_wr.index = 8'(idx); tbl_wr.valid = valid;
    tbl_wr.key = key; tbl_wr.value = value;
    @(negedge clk);
    tbl_wr = '0;
    wr_lock.put(1);
  endtask

  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      while (learn_q.size() > 0) begin
        logic [47:0] m; logic [7:0] p;
        m = learn_q.pop_front(); p = learn_p.pop_front();
        if (!learned.exists(m)) begin
          tbl_write(TBL_MAC, mac_next, 1'b1, {8'h00, m}, {56'h0, p});
          learned[m] = p;
          mac_next++;
        end
      end
    end
  end

  // ---- ingress driver --------------------------------------------------------
  longint last_in_cyc;
  bit random_gaps = 0;
  task automatic send(input bytes_t f, input logic [7:0] port, input bit hold = 0);
    int nb = (f.size() + DB - 1) / DB;
    for (int b = 0; b < nb; b++) begin
      bit acc = 0;
      while (random_gaps && ($urandom % 4 == 0)) begin
        @(negedge clk); s_tvalid = 1'b0;
      end
      while (!acc) begin
        @(negedge clk);
        s_tvalid = 1'b1; s_tuser_src = port; s_tlast = (b == nb - 1);
        for (int l = 0; l < DB; l++) begin
          s_tdata[l*8 +: 8] = (b*DB + l < f.size()) ? f[b*DB + l] : 8'h00;
          s_tkeep[l]        = (b*DB + l < f.size());
        end
        acc = s_tready;
        if (acc && s_tlast) last_in_cyc = cyc;
      end
    end
    if (!hold) begin
      @(negedge clk);
      s_tvalid = 1'b0;
    end
  endtask

  // ---- egress monitor and scoreboard -----------------------------------------
  bytes_t exp_f[$];
  logic [7:0] exp_p[$];
  int n_out = 0;
  longint first_out_cyc;
  bit random_ready = 0;
  bit hold_output = 0;
  bytes_t cur;
  logic [7:0] cur_dst;

  function automatic void expect_frame(input bytes_t f, input logic [7:0] p);
    exp_f.push_back(f); exp_p.push_back(p);
  endfunction

  initial begin
    forever begin
      @(negedge clk);
      m_tready = hold_output ? 1'b0 : random_ready ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (rst_n && m_tvalid && m_tready) begin
        if (cur.size() == 0) begin cur_dst = m_tuser_dst; first_out_cyc = cyc; end
        for (int l = 0; l < DB; l++) if (m_tkeep[l]) cur.push_back(m_tdata[l*8 +: 8]);
        if (m_tlast) begin
          bytes_t e; logic [7:0] p;
          n_out++;
          if (exp_f.size() == 0) begin
            check(0, "unexpected frame");
          end else begin
            e = exp_f.pop_front(); p = exp_p.pop_front();
            check(cur == e, $sformatf("frame %0d bytes differ (got %0d bytes, want %0d)", n_out, cur.size(), e.size()));
            check(cur_dst == p, $sformatf("frame %0d dst %02x want %02x", n_out, cur_dst, p));
          end
          cur = {};
        end
      end
    end
  end

  task automatic drain(input int max_cycles = 2000);
    int t = 0;
    while ((exp_f.size() > 0 || learn_q.size() > 0) && t < max_cycles) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
    check(exp_f.size() == 0, $sformatf("%0d expected frames never came out", exp_f.size()));
  endtask

  // ---- stimulus ----------------------------------------------------------------
  localparam logic [47:0] MAC_A = 48'h02_00_00_00_00_0A, MAC_B = 48'h02_00_00_00_00_0B;
  localparam logic [47:0] MAC_C = 48'h02_00_00_00_00_0C;
  localparam logic [31:0] IP_A = 32'h0A00_000A, IP_B = 32'h0A00_000B;
  localparam logic [7:0]  P0 = 8'h01, P1 = 8'h04, P2 = 8'h10;

  initial begin
    bytes_t n6, n7, n8, q, r;
    int nq;
    longint t0, t1;
    n6 = encode_name("a.bc");     // 6 bytes -> 64-byte query
    n7 = encode_name("ab.cd");    // 7 bytes -> 65-byte query
    n8 = encode_name("abc.de");   // 8 bytes: longer than supported

    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. switching and learning
    q = plain_frame(MAC_B, MAC_A, 80, 1);  expect_frame(q, NF_PORTS & ~P0); send(q, P0); drain();
    q = plain_frame(MAC_A, MAC_B, 100, 2); expect_frame(q, P0); send(q, P1); drain();
    q = plain_frame(MAC_B, MAC_A, 60, 3);  expect_frame(q, P1); send(q, P0); drain();
    q = plain_frame(MAC_A, MAC_C, 200, 4); expect_frame(q, P0); send(q, P2); drain();
    check(learned.size() == 3, "three MAC addresses learned");
    check(learned.exists(MAC_A) && learned[MAC_A] == P0, "host A learned on port 0");

    // 2. cache empty: recursion desired -> control plane only; else switched
    q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'd5000, 16'h1111, 1'b1, n6);
    check(q.size() == 64, "64-byte query");
    expect_frame(q, CPU_PORT); send(q, P0); drain();
    q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'd5001, 16'h1112, 1'b0, n6);
    expect_frame(q, P1); send(q, P0); drain();

    // 3. a name-server response passes through: switched plus a copy to the host
    r = dns_server_response(MAC_A, MAC_B, IP_B, IP_A, 16'd5001, 16'h1112, n6, 32'hC0A8_0101);
    expect_frame(r, P0 | CPU_PORT); send(r, P1); drain();

    // 4. the control plane caches the names; queries are answered in place
    tbl_write(TBL_DNS, 0, 1'b1, name_key(n6, 7)[55:0], {32'hC0A8_0101, 32'd300});
    tbl_write(TBL_DNS, 63, 1'b1, name_key(n7, 7)[55:0], {32'hC0A8_0202, 32'd77});
    q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'd5002, 16'h2222, 1'b1, n6);
    r = dns_answer(MAC_B, MAC_A, IP_A, IP_B, 16'd5002, 16'h2222, 1'b1, n6, 32'hC0A8_0101, 32'd300);
    check(r.size() == 80, "80-byte answer");
    expect_frame(r, P0); send(q, P0); drain();
    t0 = last_in_cyc; t1 = first_out_cyc;
    check(t1 - t0 == 5, $sformatf("hit latency %0d cycles, want 5", t1 - t0));
    q = dns_query(MAC_A, MAC_C, 32'h0A00_000C, IP_A, 16'd6000, 16'h3333, 1'b0, n7);
    check(q.size() == 65, "65-byte query");
    r = dns_answer(MAC_A, MAC_C, 32'h0A00_000C, IP_A, 16'd6000, 16'h3333, 1'b0, n7, 32'hC0A8_0202, 32'd77);
    expect_frame(r, P2); send(q, P2); drain();

    // 5. unsupported forms are switched
    q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'd5003, 16'h4444, 1'b1, n8);
    expect_frame(q, P1); send(q, P0); drain();
    q = udp_frame(MAC_B, MAC_A, IP_A, IP_B, 16'd5004, 16'd53,
                  dns_query_payload(16'h5555, 1'b1, n6, 16'd28));   // AAAA
    expect_frame(q, P1); send(q, P0); drain();
    q = udp_frame(MAC_B, MAC_A, IP_A, IP_B, 16'd5005, 16'd54, dns_query_payload(16'h5556, 1'b1, n6));
    expect_frame(q, P1); send(q, P0); drain();

    // 5b. the control plane's own query goes to the wire, not back to the host
    q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'd5007, 16'h7777, 1'b1, encode_name("x.yz"));
    expect_frame(q, P1); send(q, CPU_PORT); drain();

    // 6. runt frame is dropped
    q = plain_frame(MAC_B, MAC_A, 14, 5); q = q[0:9];
    send(q, P0); drain();

    // 7. expiry: the control plane deletes an entry; the query now misses
    tbl_write(TBL_DNS, 0, 1'b0, '0, '0); n_delete++;
    q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'd5006, 16'h6666, 1'b0, n6);
    expect_frame(q, P1); send(q, P0); drain();
    tbl_write(TBL_DNS, 0, 1'b1, name_key(n6, 7)[55:0], {32'hC0A8_0101, 32'd299});

    // 8. line-rate stream of hits: answers leave at one beat per cycle
    nq = 200;
    t0 = cyc;
    fork
      for (int i = 0; i < nq; i++) begin
        bytes_t qq;
        qq = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'(7000 + i), 16'(i), 1'b1, n6);
        send(qq, P0, i != nq - 1);
      end
      begin
        for (int i = 0; i < nq; i++)
          expect_frame(dns_answer(MAC_B, MAC_A, IP_A, IP_B, 16'(7000 + i), 16'(i), 1'b1, n6,
                                  32'hC0A8_0101, 32'd299), P0);
      end
    join
    drain(5000);
    t1 = first_out_cyc;
    $display("stream: %0d answers, last answer started %0d cycles after the first query", nq, t1 - t0);
    // each 64-byte query is 2 beats in and each 80-byte answer 3 beats out: the
    // output is the bottleneck, so the input must stall, and with one output
    // beat per cycle the last answer starts 3*(nq-1) cycles after the first,
    // plus the first query's 2 beats and the 5-cycle latency.
    check(t1 - t0 <= 3 * (nq - 1) + 2 + 5 + 2, "answer stream leaves at one output beat per cycle");

    // 8b. egress blocked while queries keep coming: both buffers fill, the
    // ingress must stall, and nothing may be lost when the egress resumes
    hold_output = 1;
    fork
      for (int i = 0; i < 40; i++) begin
        bytes_t qq;
        qq = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'(9000 + i), 16'(i), 1'b1, n6);
        expect_frame(dns_answer(MAC_B, MAC_A, IP_A, IP_B, 16'(9000 + i), 16'(i), 1'b1, n6,
                                32'hC0A8_0101, 32'd299), P0);
        send(qq, P0, i != 39);
      end
      begin
        repeat (300) @(negedge clk);
        check(dut.meta_count >= 5'd12, $sformatf("decision buffer filled (%0d)", dut.meta_count));
        hold_output = 0;
      end
    join
    drain(5000);

    // 9. mixed traffic with random gaps and output backpressure
    random_ready = 1; random_gaps = 1;
    for (int i = 0; i < 60; i++) begin
      case ($urandom % 4)
        0: begin q = plain_frame(MAC_B, MAC_A, 60 + ($urandom % 400), i); expect_frame(q, P1); end
        1: begin q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'(i), 16'(i), 1'b1, n6);
                 expect_frame(dns_answer(MAC_B, MAC_A, IP_A, IP_B, 16'(i), 16'(i), 1'b1, n6, 32'hC0A8_0101, 32'd299), P0); end
        2: begin q = dns_query(MAC_B, MAC_A, IP_A, IP_B, 16'(i), 16'(i), 1'b1, encode_name("x.yz"));
                 expect_frame(q, CPU_PORT); end
        default: begin q = dns_query(MAC_A, MAC_B, IP_B, IP_A, 16'(i), 16'(i), 1'b0, n7);
                 expect_frame(dns_answer(MAC_A, MAC_B, IP_B, IP_A, 16'(i), 16'(i), 1'b0, n7, 32'hC0A8_0202, 32'd77), P1); end
      endcase
      send(q, (q[6+5] == 8'h0A) ? P0 : P1);
    end
    drain(20000);

    // every mechanism must have happened
    check(n_path[PATH_SWITCH]   > 0, "switched path");
    check(n_path[PATH_ANSWER]   > 0, "answered path");
    check(n_path[PATH_RESOLVE]  > 0, "resolve path");
    check(n_path[PATH_MISS_FWD] > 0, "miss-forward path");
    check(n_path[PATH_RESP_CPY] > 0, "response-copy path");
    check(n_path[PATH_DROP]     > 0, "drop path");
    check(n_flood > 0, "flood");
    check(n_digest > 0, "digest");
    check(n_in_stall > 0, "input stall");
    check(n_out_bp > 0, "output backpressure");
    check(n_delete > 0, "entry deletion");
    $display("paths: switch=%0d answer=%0d resolve=%0d missfwd=%0d respcopy=%0d drop=%0d flood=%0d digest=%0d in_stall=%0d out_bp=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_path[4], n_path[5], n_flood, n_digest, n_in_stall, n_out_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
