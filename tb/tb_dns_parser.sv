// tb_dns_parser: feeds frames on an 8-byte bus (so the 65-byte parse window
// spans nine beats) and checks the header vector: field values, validity bits
// for truncated and non-DNS frames, the zero-padded question name for every
// supported length, rejection of longer names, and that phv_valid pulses
// exactly one cycle after the last beat.
module tb_dns_parser;
  import dns_pkg::*;
  import tb_dns_util_pkg::*;
  localparam int DB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic beat = 0, tlast = 0;
  logic [DB*8-1:0] tdata = '0;
  logic [DB-1:0] tkeep = '0;
  logic [7:0] src_port = '0;
  logic phv_valid;
  phv_t phv;
  dns_parser #(.DATA_BYTES(DB)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0, last_cyc, phv_cyc;
  int n_phv = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (phv_valid) begin n_phv++; phv_cyc = cyc; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input bytes_t f, input logic [7:0] port, input bit gaps);
    int nb = (f.size() + DB - 1) / DB;
    for (int b = 0; b < nb; b++) begin
      if (gaps) begin @(negedge clk); beat = 0; end
      @(negedge clk);
      beat = 1; tlast = (b == nb - 1); src_port = port;
      for (int l = 0; l < DB; l++) begin
        tdata[l*8 +: 8] = (b*DB + l < f.size()) ? f[b*DB + l] : 8'hEE;
        tkeep[l] = (b*DB + l < f.size());
      end
      last_cyc = cyc;
    end
    @(negedge clk); beat = 0; tlast = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    bytes_t f, n;
    int n_prev;
    string names[7] = '{"", "a", "ab", "abc", "a.b", "a.bc", "ab.cd"};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // every supported name length, 1..7 bytes
    for (int i = 0; i < 7; i++) begin
      n = encode_name(names[i]);
      f = dns_query(48'h0A0B0C0D0E0F, 48'h111213141516, 32'hC0A80001, 32'hC0A80002, 16'd4321, 16'hBEEF, i[0], n);
      n_prev = n_phv;
      send(f, 8'h04, i == 3);
      check(n_phv == n_prev + 1, "one phv per packet");
      check(phv_cyc == last_cyc + 1, $sformatf("phv one cycle after last beat (%0d vs %0d)", phv_cyc, last_cyc));
      check(phv.eth_valid && phv.ipv4_valid && phv.udp_valid && phv.dns_valid && phv.q_valid, $sformatf("all valid, name %0d bytes", n.size()));
      check(phv.qname_len == 4'(n.size()), "name length");
      check(phv.qname == name_key(n, MAX_NAME)[MAX_NAME*8-1:0], $sformatf("padded name %h", phv.qname));
      check(phv.pkt_len == 16'(f.size()), "packet length");
      check(phv.eth_dst == 48'h0A0B0C0D0E0F && phv.eth_src == 48'h111213141516 && phv.eth_type == 16'h0800, "ethernet");
      check(phv.ip_src == 32'hC0A80001 && phv.ip_dst == 32'hC0A80002 && phv.ip_ttl == 8'd64 && phv.ip_id == 16'h1234, "ipv4");
      check(phv.ip_len == 16'(f.size() - 14), "ip length");
      check(phv.udp_sport == 16'd4321 && phv.udp_dport == 16'd53 && phv.udp_len == 16'(f.size() - 34), "udp");
      check(phv.dns_id == 16'hBEEF && phv.dns_flags == {7'b0, i[0], 8'h00} && phv.dns_qd == 1 && phv.dns_an == 0, "dns header");
      check(phv.qtype == 16'd1 && phv.qclass == 16'd1, "qtype/qclass");
      check(phv.src_port == 8'h04, "source port");
    end

    // 8-byte name: DNS header valid, question not supported
    n = encode_name("abc.de");
    f = dns_query(48'h1, 48'h2, 32'h3, 32'h4, 16'd5, 16'd6, 1'b1, n);
    send(f, 8'h01, 0);
    check(phv.dns_valid && !phv.q_valid, "8-byte name is not supported");

    // a name-server response: DNS valid, no supported question
    f = dns_server_response(48'h1, 48'h2, 32'h3, 32'h4, 16'd999, 16'd7, encode_name("a.bc"), 32'h01020304);
    send(f, 8'h01, 0);
    check(phv.dns_valid && !phv.q_valid && phv.dns_flags[15] && phv.udp_sport == 16'd53 && phv.dns_an == 16'd1, "response parsed");

    // non-DNS UDP
    f = udp_frame(48'h1, 48'h2, 32'h3, 32'h4, 16'd1000, 16'd2000, encode_name("a.bc"));
    send(f, 8'h01, 0);
    check(phv.udp_valid && !phv.dns_valid, "udp, not dns");

    // non-IP frame
    f = plain_frame(48'hFFFFFFFFFFFF, 48'h2, 64, 9);
    send(f, 8'h10, 0);
    check(phv.eth_valid && !phv.ipv4_valid && phv.eth_dst == 48'hFFFFFFFFFFFF && phv.eth_type == 16'h88B5, "non-IP frame");

    // query truncated inside the UDP header: headers up to IPv4 only
    f = dns_query(48'h1, 48'h2, 32'h3, 32'h4, 16'd5, 16'd6, 1'b1, encode_name("a.bc"));
    f = f[0:37];
    send(f, 8'h01, 0);
    check(phv.ipv4_valid && !phv.udp_valid && !phv.dns_valid && phv.pkt_len == 16'd38, "truncated in UDP");

    // truncated inside the question
    f = dns_query(48'h1, 48'h2, 32'h3, 32'h4, 16'd5, 16'd6, 1'b1, encode_name("a.bc"));
    f = f[0:59];
    send(f, 8'h01, 0);
    check(phv.dns_valid && !phv.q_valid, "truncated in question");

    // runt
    f = plain_frame(48'h1, 48'h2, 14, 1); f = f[0:11];
    send(f, 8'h01, 0);
    check(!phv.eth_valid && phv.pkt_len == 16'd12, "runt");

    // long frame after a short one: window restarts at each packet
    f = plain_frame(48'h1, 48'h2, 300, 3);
    send(f, 8'h01, 0);
    check(phv.eth_valid && phv.pkt_len == 16'd300 && phv.eth_src == 48'h2, "long frame");

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
