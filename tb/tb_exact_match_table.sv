// tb_exact_match_table: random writes, deletes and two-port lookups against an
// array model of the entries. Checks hit and value one cycle after the key,
// lowest-index priority when two entries hold the same key, and that a write
// is seen by the lookup presented in the next cycle.
module tb_exact_match_table;
  localparam int KW = 12, VW = 10, D = 16, L = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_valid = 0;
  logic [$clog2(D)-1:0] wr_index = '0;
  logic [KW-1:0] wr_key = '0;
  logic [VW-1:0] wr_value = '0;
  logic [L-1:0][KW-1:0] lk_key = '0;
  logic [L-1:0] lk_hit;
  logic [L-1:0][VW-1:0] lk_value;
  exact_match_table #(.KEY_W(KW), .VAL_W(VW), .DEPTH(D), .LOOKUPS(L)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_dup = 0;
  bit            m_valid[D];
  logic [KW-1:0] m_key[D];
  logic [VW-1:0] m_val[D];

  initial begin
    bit exp_hit[L]; logic [VW-1:0] exp_val[L];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // keys drawn from a small space so hits, misses and duplicates all occur
      wr_en    = ($urandom % 2 == 0);
      wr_index = $clog2(D)'($urandom);
      wr_valid = ($urandom % 5 != 0);
      wr_key   = KW'($urandom % 24);
      wr_value = VW'($urandom);
      for (int p = 0; p < L; p++) lk_key[p] = KW'($urandom % 24);
      // model: the lookup sees the table as it is before this cycle's write
      for (int p = 0; p < L; p++) begin
        int cnt;
        cnt = 0;
        exp_hit[p] = 0; exp_val[p] = '0;
        for (int e = D-1; e >= 0; e--)
          if (m_valid[e] && m_key[e] == lk_key[p]) begin exp_hit[p] = 1; exp_val[p] = m_val[e]; cnt++; end
        if (cnt > 1) n_dup++;
      end
      if (wr_en) begin m_valid[wr_index] = wr_valid; m_key[wr_index] = wr_key; m_val[wr_index] = wr_value; end
      @(posedge clk); #1;
      for (int p = 0; p < L; p++) begin
        checks++;
        if (lk_hit[p] != exp_hit[p] || (exp_hit[p] && lk_value[p] != exp_val[p])) begin
          failures++;
          $display("port %0d key %h: hit %b/%b value %h/%h", p, lk_key[p], lk_hit[p], exp_hit[p], lk_value[p], exp_val[p]);
        end
        if (exp_hit[p]) n_hit++; else n_miss++;
      end
    end
    checks++; if (n_hit == 0 || n_miss == 0 || n_dup == 0) failures++;
    $display("hits=%0d misses=%0d duplicate-key lookups=%0d", n_hit, n_miss, n_dup);
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
