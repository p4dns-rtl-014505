// tb_main_action: drives header vectors straight into the match-action stage
// and checks each decision against the packet-flow rules: cache hit -> answer
// on the ingress port with the cached address and TTL; miss with recursion
// desired -> host only; miss without -> switched; name-server response ->
// switched plus host copy; unsupported questions and non-DNS -> switched; runt
// -> dropped; anything from the host's DMA port -> switched. Switching uses the MAC table (hit: its port, miss: flood) and
// digests report unknown or moved source MACs. The decision must come exactly
// two cycles after the header vector, and back-to-back vectors must each get
// their own decision.
module tb_main_action;
  import dns_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic phv_valid = 0;
  phv_t phv = '0;
  tbl_wr_t tbl_wr = '0;
  logic act_valid, digest_valid;
  act_t act;
  phv_t act_phv;
  logic [47:0] digest_mac;
  logic [7:0] digest_port;
  main_action #(.DNS_ENTRIES(8), .MAC_ENTRIES(8)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input tbl_sel_e sel, input int idx, input bit valid, input logic [55:0] key, input logic [63:0] val);
    @(negedge clk);
    tbl_wr.en = 1; tbl_wr.sel = sel; tbl_wr.index = 8'(idx); tbl_wr.valid = valid; tbl_wr.key = key; tbl_wr.value = val;
    @(negedge clk);
    tbl_wr = '0;
  endtask

  localparam logic [55:0] NAME1 = 56'h01_61_02_62_63_00_00;   // a.bc, zero padded
  localparam logic [55:0] NAME2 = 56'h02_61_62_02_63_64_00;   // ab.cd

  function automatic phv_t query(input logic [47:0] dst, src, input logic [7:0] port,
                                 input logic [55:0] name, input bit rd);
    phv_t p = '0;
    p.eth_valid = 1; p.ipv4_valid = 1; p.udp_valid = 1; p.dns_valid = 1; p.q_valid = 1;
    p.eth_dst = dst; p.eth_src = src; p.eth_type = 16'h0800; p.src_port = port;
    p.udp_sport = 16'd3000; p.udp_dport = 16'd53;
    p.dns_flags = {7'b0, rd, 8'h00}; p.dns_qd = 1;
    p.qname = name; p.qname_len = 6; p.qtype = 1; p.qclass = 1;
    return p;
  endfunction

  // send one vector and check the decision two cycles later
  task automatic expect_act(input phv_t p, input path_e path, input logic [7:0] dst,
                            input logic [31:0] addr = '0, input logic [31:0] ttl = '0, input string what = "");
    longint t0;
    @(negedge clk); phv_valid = 1; phv = p; t0 = cyc;
    @(negedge clk); phv_valid = 0;
    check(!act_valid, {what, ": no early decision"});
    @(negedge clk);
    check(act_valid && cyc == t0 + 2, {what, ": decision after two cycles"});
    check(act.path == path, $sformatf("%s: path %s want %s", what, act.path.name(), path.name()));
    check(act.dst_port == dst, $sformatf("%s: dst %02x want %02x", what, act.dst_port, dst));
    check(act.respond == (path == PATH_ANSWER), {what, ": respond flag"});
    if (path == PATH_ANSWER) check(act.ans_addr == addr && act.ans_ttl == ttl, {what, ": answer data"});
    check(act_phv == p, {what, ": header vector carried along"});
  endtask

  initial begin
    phv_t p;
    int n_dig;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // learning switch: unknown destination floods, unknown source digests
    p = query(48'hB, 48'hA, 8'h01, NAME1, 0); p.udp_dport = 16'd80;
    fork
      expect_act(p, PATH_SWITCH, 8'h54, 0, 0, "flood");
      begin @(posedge digest_valid); #1 check(digest_mac == 48'hA && digest_port == 8'h01, "digest of A"); end
    join
    wr(TBL_MAC, 0, 1, 56'hA, 64'h01);
    wr(TBL_MAC, 5, 1, 56'hB, 64'h04);
    p = query(48'hA, 48'hB, 8'h04, NAME1, 0); p.q_valid = 0; p.dns_valid = 0;
    n_dig = 0;
    fork
      expect_act(p, PATH_SWITCH, 8'h01, 0, 0, "known destination");
      repeat (4) @(posedge clk) if (digest_valid) n_dig++;
    join
    check(n_dig == 0, "no digest for a known source");
    // moved station: B appears on port 2
    p = query(48'hA, 48'hB, 8'h10, NAME1, 0); p.dns_valid = 0;
    fork
      expect_act(p, PATH_SWITCH, 8'h01, 0, 0, "moved source");
      begin @(posedge digest_valid); #1 check(digest_mac == 48'hB && digest_port == 8'h10, "digest of moved B"); end
    join

    // DNS: empty cache
    expect_act(query(48'hB, 48'hA, 8'h01, NAME1, 1), PATH_RESOLVE, CPU_PORT, 0, 0, "miss with RD");
    expect_act(query(48'hB, 48'hA, 8'h01, NAME1, 0), PATH_MISS_FWD, 8'h04, 0, 0, "miss without RD");
    wr(TBL_DNS, 3, 1, NAME1, {32'hC0A80101, 32'd600});
    wr(TBL_DNS, 7, 1, NAME2, {32'hC0A80202, 32'd5});
    expect_act(query(48'hB, 48'hA, 8'h01, NAME1, 1), PATH_ANSWER, 8'h01, 32'hC0A80101, 32'd600, "hit 1");
    expect_act(query(48'hB, 48'hA, 8'h40, NAME2, 0), PATH_ANSWER, 8'h40, 32'hC0A80202, 32'd5, "hit 2 from port 3");
    // unsupported questions are switched even if the name is cached
    p = query(48'hB, 48'hA, 8'h01, NAME1, 1); p.qtype = 16'd28;
    expect_act(p, PATH_SWITCH, 8'h04, 0, 0, "AAAA");
    p = query(48'hB, 48'hA, 8'h01, NAME1, 1); p.dns_qd = 2;
    expect_act(p, PATH_SWITCH, 8'h04, 0, 0, "two questions");
    p = query(48'hB, 48'hA, 8'h01, NAME1, 1); p.dns_flags[14:11] = 4'd2;
    expect_act(p, PATH_SWITCH, 8'h04, 0, 0, "status opcode");
    p = query(48'hB, 48'hA, 8'h01, NAME1, 1); p.q_valid = 0;
    expect_act(p, PATH_SWITCH, 8'h04, 0, 0, "unsupported length");
    // name-server response: switched and copied to the host
    p = query(48'hA, 48'hB, 8'h04, NAME1, 1); p.udp_sport = 16'd53; p.udp_dport = 16'd3000;
    p.dns_flags = 16'h8180; p.dns_an = 1; p.q_valid = 0;
    expect_act(p, PATH_RESP_CPY, 8'h01 | CPU_PORT, 0, 0, "response copy");
    // packets from the control plane (DMA port) are only switched
    expect_act(query(48'hB, 48'hA, CPU_PORT, NAME2, 1), PATH_SWITCH, 8'h04, 0, 0, "query from host");
    expect_act(query(48'hB, 48'hA, CPU_PORT, NAME1, 1), PATH_SWITCH, 8'h04, 0, 0, "uncached query from host");
    p = query(48'hA, 48'hB, CPU_PORT, NAME1, 1); p.udp_sport = 16'd53; p.udp_dport = 16'd3000;
    p.dns_flags = 16'h8180; p.dns_an = 1; p.q_valid = 0;
    expect_act(p, PATH_SWITCH, 8'h01, 0, 0, "response from host");
    // runt
    p = '0; p.src_port = 8'h01;
    expect_act(p, PATH_DROP, 8'h00, 0, 0, "runt");
    // deleted entry misses again
    wr(TBL_DNS, 3, 0, '0, '0);
    expect_act(query(48'hB, 48'hA, 8'h01, NAME1, 1), PATH_RESOLVE, CPU_PORT, 0, 0, "deleted entry");

    // back to back: three vectors in consecutive cycles
    @(negedge clk); phv_valid = 1; phv = query(48'hB, 48'hA, 8'h01, NAME2, 0);
    @(negedge clk); phv = query(48'hB, 48'hA, 8'h01, NAME1, 1);
    @(negedge clk); phv = query(48'hB, 48'hA, 8'h01, NAME1, 0);
    check(act_valid && act.path == PATH_ANSWER, "b2b 1");
    @(negedge clk); phv_valid = 0;
    check(act_valid && act.path == PATH_RESOLVE, "b2b 2");
    @(negedge clk); check(act_valid && act.path == PATH_MISS_FWD, "b2b 3");
    @(negedge clk); check(!act_valid, "b2b end");

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
