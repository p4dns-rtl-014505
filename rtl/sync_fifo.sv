// sync_fifo: single-clock first-in first-out buffer.
//
// The data plane keeps each packet's beats here while its headers are parsed and
// the match-action decision is made, and keeps the decisions in a second one, so
// the deparser can pair them up again. Storage is an array of DEPTH words with
// read and write pointers one bit wider than the address. The head word is
// shown on rd_data whenever rd_valid is high (first-word fall-through); a word
// is removed in the cycle rd_en is high and written in the cycle wr_en is high.
// wr_en while full and rd_en while empty are ignored (and flagged by assertions).
// count gives the number of stored words so a producer can reserve space.
// Sizes and the fall-through style are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_valid,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic do_wr, do_rd;

  assign count    = wptr - rptr;
  assign full     = (count == (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && rd_valid;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && !rd_valid));
endmodule
