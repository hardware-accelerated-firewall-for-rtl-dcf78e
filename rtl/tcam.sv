// tcam: ternary content-addressable memory holding the firewall rules.
//
// Each of the DEPTH entries stores a value, a care mask (1 = bit must match,
// 0 = wildcard) and a valid bit.  A lookup compares the key with all entries
// in parallel: entry i matches when it is valid and
// ((key ^ value_i) & mask_i) == 0.  When several entries match, the one with
// the lowest index wins, so the index is the rule priority.  That a TCAM
// holds the rules follows the design; the priority rule, the one-cycle
// registered lookup and the single write port are this design's choices.
//
// Interface and timing:
//   write:  wr_en for one cycle writes {wr_valid, wr_value & wr_mask, wr_mask}
//           into slot wr_idx.  wr_valid = 0 removes the rule.  The entry takes
//           part in lookups from the next cycle on.
//   lookup: lk_valid with lk_key in cycle t gives res_valid, res_hit and
//           res_idx in cycle t+1.  One lookup per cycle.
// Reset clears all valid bits (an empty rule table).
module tcam #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned KEY_W = fw_pkg::KEY_W,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // rule write port
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_valid,
  input  logic [KEY_W-1:0] wr_value,
  input  logic [KEY_W-1:0] wr_mask,
  // lookup
  input  logic             lk_valid,
  input  logic [KEY_W-1:0] lk_key,
  output logic             res_valid,
  output logic             res_hit,
  output logic [IDX_W-1:0] res_idx
);

  // entries are registers (all are read in every cycle), not a RAM
  logic [DEPTH-1:0][KEY_W-1:0] value_q;
  logic [DEPTH-1:0][KEY_W-1:0] mask_q;
  logic [DEPTH-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value_q[wr_idx] <= wr_value & wr_mask;
      mask_q[wr_idx]  <= wr_mask;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_valid;
  end

  logic [DEPTH-1:0] match;
  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++)
      match[i] = valid_q[i] && (((lk_key ^ value_q[i]) & mask_q[i]) == '0);
  end

  // lowest matching index
  logic             hit_c;
  logic [IDX_W-1:0] idx_c;
  always_comb begin
    hit_c = 1'b0;
    idx_c = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit_c = 1'b1;
        idx_c = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_idx   <= '0;
    end else begin
      res_valid <= lk_valid;
      if (lk_valid) begin
        res_hit <= hit_c;
        res_idx <= idx_c;
      end
    end
  end

endmodule
