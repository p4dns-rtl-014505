// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// data, full/valid flags and the count; the FIFO must fill up at least once.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, rd_valid;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] model[$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++; if (count != ($clog2(D)+1)'(model.size())) begin failures++; $display("count %0d want %0d", count, model.size()); end
      checks++; if (full != (model.size() == D)) failures++;
      checks++; if (rd_valid != (model.size() != 0)) failures++;
      if (model.size() != 0) begin checks++; if (rd_data != model[0]) begin failures++; $display("data %h want %h", rd_data, model[0]); end end
      if (full) n_full++;
      wr_en   = !full && ((i < 1500) ? ($urandom % 3 != 0) : ($urandom % 3 == 0));
      wr_data = W'($urandom);
      rd_en   = rd_valid && ((i < 1500) ? ($urandom % 3 == 0) : ($urandom % 3 != 0));
      #1;
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && !full;
        do_rd = rd_en && rd_valid;
        @(posedge clk); #1;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    checks++; if (n_full == 0) failures++;
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
