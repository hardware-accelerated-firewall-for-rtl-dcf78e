// match_action: match/action stage of the 5G firewall.
//
// Takes one parser result per packet.  A packet with the expected GTP
// structure is looked up in the rule TCAM with its inner 5-tuple + TEID key;
// a hit applies the DROP action, a miss lets the packet through
// (allow-by-default).  A packet without the expected structure skips the
// table and is forwarded (`dec_bypass`).  DROP as the only rule action and
// the allow-by-default policy follow the design; forwarding packets the
// parser does not recognise is this design's reading of "if the packet has
// the structure expected by the parser, it enters the match/action pipeline".
//
// Timing: in_valid in cycle t gives dec_valid in cycle t+1, one decision per
// packet, in order, never stalled.  The rule write port is passed to the TCAM
// (see tcam for its timing).
module match_action
  import fw_pkg::*;
#(
  parameter int unsigned N_RULES = 512,
  localparam int unsigned IDX_W  = (N_RULES > 1) ? $clog2(N_RULES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the parser
  input  logic             in_valid,
  input  logic             in_ok,
  input  fw_key_t          in_key,
  // decision
  output logic             dec_valid,
  output logic             dec_drop,
  output logic             dec_bypass,
  output logic             dec_hit,
  output logic [IDX_W-1:0] dec_idx,
  // rule write port
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_valid,
  input  fw_key_t          wr_value,
  input  fw_key_t          wr_mask
);

  logic             t_valid, t_hit;
  logic [IDX_W-1:0] t_idx;
  logic             ok_q;

  tcam #(.DEPTH(N_RULES), .KEY_W(KEY_W)) u_tcam (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_valid,
    .wr_value (wr_value),
    .wr_mask  (wr_mask),
    .lk_valid (in_valid),
    .lk_key   (in_key),
    .res_valid(t_valid),
    .res_hit  (t_hit),
    .res_idx  (t_idx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        ok_q <= 1'b0;
    else if (in_valid) ok_q <= in_ok;
  end

  assign dec_valid  = t_valid;
  assign dec_hit    = t_valid && ok_q && t_hit;
  assign dec_drop   = dec_hit;            // the rule action is DROP
  assign dec_bypass = t_valid && !ok_q;
  assign dec_idx    = t_idx;

endmodule
