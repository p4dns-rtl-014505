// tb_eval_latency: the latency measurement of the original evaluation: 1000
// single 64-byte queries and 1000 single 65-byte queries for cached names, each
// sent alone into an idle switch (a long gap between queries), at the default
// sizes. For every query it measures the cycles from the last query beat
// accepted to the first answer beat, and checks the answer byte for byte. The
// data plane has a fixed pipeline, so median and 99th percentile must both be
// the 5-cycle latency, for both sizes.
module tb_eval_latency;
  import dns_pkg::*;
  import tb_dns_util_pkg::*;
  localparam int DB = 32;
  localparam int NPKT = 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [DB*8-1:0] s_tdata = '0;
  logic [DB-1:0] s_tkeep = '0;
  logic [7:0] s_tuser_src = 8'h04;
  logic m_tvalid, m_tready = 1, m_tlast;
  logic [DB*8-1:0] m_tdata;
  logic [DB-1:0] m_tkeep;
  logic [7:0] m_tuser_dst;
  tbl_wr_t tbl_wr = '0;
  logic digest_valid;
  logic [47:0] digest_mac;
  logic [7:0] digest_port;
  p4dns_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic write(input tbl_sel_e sel, input int idx, input logic [55:0] key, input logic [63:0] val);
    @(negedge clk);
    tbl_wr.en = 1; tbl_wr.sel = sel; tbl_wr.index = 8'(idx); tbl_wr.valid = 1; tbl_wr.key = key; tbl_wr.value = val;
    @(negedge clk);
    tbl_wr = '0;
  endtask

  // send one frame and collect the one frame that comes back; returns latency
  task automatic one(input bytes_t q, input bytes_t a, output longint lat);
    int nb = (q.size() + DB - 1) / DB;
    longint t_in = 0, t_out = -1;
    bytes_t got;
    for (int b = 0; b < nb; b++) begin
      bit acc = 0;
      while (!acc) begin
        @(negedge clk);
        s_tvalid = 1; s_tlast = (b == nb - 1);
        for (int l = 0; l < DB; l++) begin
          s_tdata[l*8 +: 8] = (b*DB + l < q.size()) ? q[b*DB + l] : 8'h00;
          s_tkeep[l] = (b*DB + l < q.size());
        end
        acc = s_tready;
        if (acc) t_in = cyc;
      end
    end
    @(negedge clk); s_tvalid = 0;
    for (int i = 0; i < 100; i++) begin
      #1;
      if (m_tvalid && m_tready) begin
        if (t_out < 0) t_out = cyc;
        for (int l = 0; l < DB; l++) if (m_tkeep[l]) got.push_back(m_tdata[l*8 +: 8]);
        if (m_tlast) break;
      end
      @(negedge clk);
    end
    checks++;
    if (got != a || m_tuser_dst != 8'h04) begin failures++; $display("answer differs"); end
    lat = t_out - t_in;
  endtask

  initial begin
    bytes_t n[2];
    longint lat[NPKT];
    int sz[2] = '{64, 65};
    n[0] = encode_name("a.bc");
    n[1] = encode_name("ab.cd");
    repeat (3) @(negedge clk);
    rst_n = 1;
    write(TBL_DNS, 10, name_key(n[0], MAX_NAME)[55:0], {32'h0A0A0A0A, 32'd60});
    write(TBL_DNS, 11, name_key(n[1], MAX_NAME)[55:0], {32'h0B0B0B0B, 32'd61});
    write(TBL_MAC, 0, 56'h0200000000AA, 64'h04);
    for (int s = 0; s < 2; s++) begin
      longint med, p99;
      for (int i = 0; i < NPKT; i++) begin
        bytes_t q, a;
        q = dns_query(48'h0200000000BB, 48'h0200000000AA, 32'h0A000001, 32'h0A000002, 16'(1024 + i), 16'(i), 1'b1, n[s]);
        a = dns_answer(48'h0200000000BB, 48'h0200000000AA, 32'h0A000001, 32'h0A000002, 16'(1024 + i), 16'(i), 1'b1, n[s],
                       s == 0 ? 32'h0A0A0A0A : 32'h0B0B0B0B, s == 0 ? 32'd60 : 32'd61);
        if (i == 0) begin checks++; if (q.size() != sz[s]) failures++; end
        one(q, a, lat[i]);
        repeat (20) @(negedge clk);   // idle gap
      end
      lat.sort();
      med = lat[NPKT/2];
      p99 = lat[(NPKT*99)/100];
      $display("%0d-byte queries: median %0d cycles, 99th percentile %0d cycles", sz[s], med, p99);
      checks++; if (med != 5 || p99 != 5) failures++;
    end
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
