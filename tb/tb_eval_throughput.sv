// tb_eval_throughput: the throughput measurement of the original evaluation:
// NQ back-to-back 64-byte DNS queries for a cached name, all answered with
// 80-byte responses, at the default sizes. The ingress is offered a beat every
// cycle; the egress is always ready. Every answer is checked beat for beat
// against a template built by tb_dns_util_pkg with the query's DNS ID patched
// in (IDs count up, so order is checked too). The run must sustain one answer
// per 3 cycles (3 output beats of 32 bytes), which at a 200 MHz clock is well
// above the 14.88 M frames/s of 64-byte traffic on a 10GE port.
module tb_eval_throughput;
  import dns_pkg::*;
  import tb_dns_util_pkg::*;
  localparam int DB = 32;
  localparam int NQ = 10_000_000;
  localparam real CLK_MHZ = 200.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [DB*8-1:0] s_tdata = '0;
  logic [DB-1:0] s_tkeep = '0;
  logic [7:0] s_tuser_src = 8'h01;
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
  logic [DB*8-1:0] qb [2];
  logic [DB-1:0]   qk [2];
  logic [DB*8-1:0] ab [3];
  logic [DB-1:0]   ak [3];
  int sent = 0, in_beat = 0, got = 0, out_beat = 0;
  longint cyc = 0, t_first_in = -1, t_last_out = 0;
  bit running = 0;


  always @(posedge clk) cyc <= cyc + 1;

  // ingress: query i carries DNS ID i[15:0] (bytes 42..43 = beat 1, lanes 10..11)
  always @(posedge clk) if (running) begin
    if (!s_tvalid || s_tready) begin
      if (s_tvalid && s_tlast) sent <= sent + 1;
      if ((s_tvalid && s_tlast ? sent + 1 : sent) < NQ) begin
        int nb, id;
        nb = (s_tvalid && !s_tlast) ? 1 : 0;
        id = (s_tvalid && s_tlast) ? sent + 1 : sent;
        s_tvalid <= 1;
        s_tlast  <= (nb == 1);
        s_tkeep  <= qk[nb];
        s_tdata  <= nb == 0 ? qb[0] : {qb[1][DB*8-1:12*8], 8'(id), 8'(id >> 8), qb[1][10*8-1:0]};
        if (t_first_in < 0) t_first_in <= cyc;
      end else begin
        s_tvalid <= 0;
        s_tlast  <= 0;
      end
    end
  end

  // egress: answer i must equal the template with ID i
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    logic [DB*8-1:0] e;
    e = ab[out_beat];
    if (out_beat == 1) e[10*8 +: 16] = {8'(got), 8'(got >> 8)};
    checks++;
    if (m_tdata != e || m_tkeep != ak[out_beat] || m_tlast != (out_beat == 2) || m_tuser_dst != 8'h01) begin
      failures++;
      if (failures < 5) $display("answer %0d beat %0d differs", got, out_beat);
    end
    if (out_beat == 2) begin out_beat <= 0; got <= got + 1; t_last_out <= cyc; end
    else out_beat <= out_beat + 1;
  end

  initial begin
    bytes_t n, q, a;
    longint cycles;
    real per_answer, rate;
    n = encode_name("a.bc");
    q = dns_query(48'h020000000002, 48'h020000000001, 32'h0A000001, 32'h0A000002, 16'd5353, 16'h0000, 1'b1, n);
    a = dns_answer(48'h020000000002, 48'h020000000001, 32'h0A000001, 32'h0A000002, 16'd5353, 16'h0000, 1'b1, n,
                   32'hC0A80101, 32'd3600);
    for (int b = 0; b < 2; b++) for (int l = 0; l < DB; l++) begin
      qb[b][l*8 +: 8] = (b*DB + l < q.size()) ? q[b*DB + l] : 8'h00; qk[b][l] = (b*DB + l < q.size());
    end
    for (int b = 0; b < 3; b++) for (int l = 0; l < DB; l++) begin
      ab[b][l*8 +: 8] = (b*DB + l < a.size()) ? a[b*DB + l] : 8'h00; ak[b][l] = (b*DB + l < a.size());
    end
    checks++; if (q.size() != 64 || a.size() != 80) failures++;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the host caches the name and learns the requester's port
    @(negedge clk);
    tbl_wr.en = 1; tbl_wr.sel = TBL_DNS; tbl_wr.index = 0; tbl_wr.valid = 1;
    tbl_wr.key = name_key(n, MAX_NAME)[MAX_NAME*8-1:0]; tbl_wr.value = {32'hC0A80101, 32'd3600};
    @(negedge clk);
    tbl_wr.sel = TBL_MAC; tbl_wr.index = 0; tbl_wr.key = 56'h020000000001; tbl_wr.value = 64'h01;
    @(negedge clk);
    tbl_wr = '0;
    running = 1;
    wait (got == NQ);
    repeat (10) @(negedge clk);
    checks++; if (got != NQ || sent != NQ) failures++;
    cycles = t_last_out - t_first_in + 1;
    per_answer = real'(cycles) / real'(NQ);
    rate = CLK_MHZ / per_answer;
    $display("%0d answers in %0d cycles: %f cycles per answer, %f M answers/s at %0.0f MHz",
             NQ, cycles, per_answer, rate, CLK_MHZ);
    // output-bound: 3 beats per answer, plus the pipeline fill
    checks++; if (cycles > 3 * longint'(NQ) + 20) begin failures++; $display("too slow"); end
    checks++; if (rate < 14.88) begin failures++; $display("below 10GE line rate for 64-byte frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (rst_n);
    repeat (3 * NQ + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
