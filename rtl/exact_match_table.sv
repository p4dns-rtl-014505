// exact_match_table: the match-action pipeline's exact-match table.
//
// One instance is the DNS cache (key: zero-padded question name, value: IPv4
// address and TTL, 64 entries as in the prototype); another is the learning
// switch's MAC table (key: MAC address, value: port). The entries are written
// only by the control plane through the write port, which also chooses the
// entry index, so eviction policy (FIFO in the prototype) and TTL expiry live
// in the control plane, as the architecture prescribes. A lookup compares the
// key against every valid entry in parallel (a CAM built from registers); the
// lowest matching index wins. LOOKUPS independent lookup ports share the
// entries. Results are registered: lk_hit/lk_value belong to the key presented
// one cycle earlier. A write takes effect for lookups presented after the write
// cycle. The register-CAM structure and the one-cycle latency are this design's
// choice; the original design specifies only the table's role and size.
module exact_match_table #(
  parameter int unsigned KEY_W   = 56,
  parameter int unsigned VAL_W   = 64,
  parameter int unsigned DEPTH   = 64,
  parameter int unsigned LOOKUPS = 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // control-plane write port
  input  logic                                wr_en,
  input  logic [$clog2(DEPTH)-1:0]            wr_index,
  input  logic                                wr_valid,   // 0 deletes the entry
  input  logic [KEY_W-1:0]                    wr_key,
  input  logic [VAL_W-1:0]                    wr_value,
  // lookup ports
  input  logic [LOOKUPS-1:0][KEY_W-1:0]       lk_key,
  output logic [LOOKUPS-1:0]                  lk_hit,
  output logic [LOOKUPS-1:0][VAL_W-1:0]       lk_value
);
  logic [DEPTH-1:0]             ent_valid;
  logic [KEY_W-1:0]             ent_key   [DEPTH];
  logic [VAL_W-1:0]             ent_value [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ent_valid <= '0;
    else if (wr_en) ent_valid[wr_index] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      ent_key[wr_index]   <= wr_key;
      ent_value[wr_index] <= wr_value;
    end
  end

  logic [LOOKUPS-1:0]            hit_d;
  logic [LOOKUPS-1:0][VAL_W-1:0] value_d;

  always_comb begin
    hit_d   = '0;
    value_d = '0;
    for (int p = 0; p < LOOKUPS; p++) begin
      for (int i = DEPTH-1; i >= 0; i--) begin
        if (ent_valid[i] && ent_key[i] == lk_key[p]) begin
          hit_d[p]   = 1'b1;
          value_d[p] = ent_value[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_hit   <= '0;
      lk_value <= '0;
    end else begin
      lk_hit   <= hit_d;
      lk_value <= value_d;
    end
  end
endmodule
