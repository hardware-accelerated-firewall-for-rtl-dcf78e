// fw5g_top: hardware 5G firewall for the edge-to-core segment.
//
// Packets arrive on an AXI4-Stream port (from the edge side) and leave on
// another (towards the core).  The design is the three-stage
// parser -> match/action -> deparser pipeline:
//   * every accepted beat is written into the packet buffer (sync_fifo) and,
//     in parallel, watched by gtp_parser, which extracts the 5G user's inner
//     IPv4 addresses, ports, protocol and the GTP TEID;
//   * match_action looks the key up in the rule TCAM and decides DROP (rule
//     hit) or forward (miss, allow-by-default; or packet not GTP-shaped);
//   * the decision enters a small decision queue, and the deparser forwards
//     the buffered packet unchanged or discards it.
// Rules are written from the host through rule_ctrl (AXI4-Lite), also while
// traffic flows.
//
// Flow control: s_tready is low when the packet buffer is full or the
// decision queue is nearly full (room is kept for the decisions already in
// the three-cycle parser/TCAM pipeline).  A decision is known three cycles
// after the packet's header window (HDR_BYTES) has arrived, so a packet longer
// than the buffer still passes (cut-through after the header window).
// Latency for a short packet with no back-pressure: its first beat leaves
// four cycles after its last beat was accepted.
//
// Event outputs pulse once per packet: ev_pass / ev_drop when the deparser
// starts moving it, ev_bypass when a packet without the expected GTP
// structure got its (forward) decision, ev_hit with ev_hit_idx on a rule hit.
module fw5g_top
  import fw_pkg::*;
#(
  parameter int unsigned DATA_W    = fw_pkg::AXIS_W,
  parameter int unsigned N_RULES   = 512,
  parameter int unsigned HDR_BYTES = 128,
  parameter int unsigned PKT_DEPTH = 256,
  parameter int unsigned DEC_DEPTH = 32,
  localparam int unsigned KEEP_W   = DATA_W / 8,
  localparam int unsigned IDX_W    = (N_RULES > 1) ? $clog2(N_RULES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // packet input (edge side)
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic [DATA_W-1:0] s_tdata,
  input  logic [KEEP_W-1:0] s_tkeep,
  input  logic              s_tlast,
  // packet output (core side)
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic [DATA_W-1:0] m_tdata,
  output logic [KEEP_W-1:0] m_tkeep,
  output logic              m_tlast,
  // rule management, AXI4-Lite
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [7:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // per-packet events
  output logic              ev_pass,
  output logic              ev_drop,
  output logic              ev_bypass,
  output logic              ev_hit,
  output logic [IDX_W-1:0]  ev_hit_idx
);

  localparam int unsigned BUF_W  = DATA_W + KEEP_W + 1;
  localparam int unsigned DEC_AW = (DEC_DEPTH > 1) ? $clog2(DEC_DEPTH) : 1;
  localparam int unsigned PKT_AW = (PKT_DEPTH > 1) ? $clog2(PKT_DEPTH) : 1;

  // ---------------- input and packet buffer ----------------
  logic              buf_full, buf_empty, buf_pop;
  logic [BUF_W-1:0]  buf_rd;
  logic [PKT_AW:0]   buf_count;
  logic              dec_full, dec_empty, dec_pop, dec_afull;
  logic [DEC_AW:0]   dec_count;
  logic              dec_rd_drop;

  assign dec_afull = (dec_count > (DEC_AW+1)'(DEC_DEPTH - 4));
  assign s_tready  = !buf_full && !dec_afull;

  wire in_fire = s_tvalid && s_tready;

  sync_fifo #(.WIDTH(BUF_W), .DEPTH(PKT_DEPTH)) u_pkt_buf (
    .clk, .rst_n,
    .wr_en  (in_fire),
    .wr_data({s_tlast, s_tkeep, s_tdata}),
    .full   (buf_full),
    .rd_en  (buf_pop),
    .rd_data(buf_rd),
    .empty  (buf_empty),
    .count  (buf_count)
  );

  // ---------------- parser ----------------
  logic    p_valid, p_ok;
  fw_key_t p_key;

  gtp_parser #(.DATA_W(DATA_W), .HDR_BYTES(HDR_BYTES)) u_parser (
    .clk, .rst_n,
    .s_valid  (s_tvalid),
    .s_ready  (s_tready),
    .s_data   (s_tdata),
    .s_keep   (s_tkeep),
    .s_last   (s_tlast),
    .res_valid(p_valid),
    .res_ok   (p_ok),
    .res_key  (p_key)
  );

  // ---------------- rule management ----------------
  logic             r_wr_en, r_wr_valid;
  logic [IDX_W-1:0] r_wr_idx;
  fw_key_t          r_wr_value, r_wr_mask;

  rule_ctrl #(.N_RULES(N_RULES)) u_rule_ctrl (
    .clk, .rst_n,
    .s_awaddr (s_axil_awaddr),  .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata  (s_axil_wdata),   .s_wstrb  (s_axil_wstrb),   .s_wvalid (s_axil_wvalid),
    .s_wready (s_axil_wready),  .s_bresp  (s_axil_bresp),   .s_bvalid (s_axil_bvalid),
    .s_bready (s_axil_bready),  .s_araddr (s_axil_araddr),  .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata  (s_axil_rdata),   .s_rresp  (s_axil_rresp),
    .s_rvalid (s_axil_rvalid),  .s_rready (s_axil_rready),
    .wr_en    (r_wr_en),
    .wr_idx   (r_wr_idx),
    .wr_valid (r_wr_valid),
    .wr_value (r_wr_value),
    .wr_mask  (r_wr_mask)
  );

  // ---------------- match/action ----------------
  logic             d_valid, d_drop, d_bypass, d_hit;
  logic [IDX_W-1:0] d_idx;

  match_action #(.N_RULES(N_RULES)) u_match (
    .clk, .rst_n,
    .in_valid  (p_valid),
    .in_ok     (p_ok),
    .in_key    (p_key),
    .dec_valid (d_valid),
    .dec_drop  (d_drop),
    .dec_bypass(d_bypass),
    .dec_hit   (d_hit),
    .dec_idx   (d_idx),
    .wr_en     (r_wr_en),
    .wr_idx    (r_wr_idx),
    .wr_valid  (r_wr_valid),
    .wr_value  (r_wr_value),
    .wr_mask   (r_wr_mask)
  );

  sync_fifo #(.WIDTH(1), .DEPTH(DEC_DEPTH)) u_dec_q (
    .clk, .rst_n,
    .wr_en  (d_valid),
    .wr_data(d_drop),
    .full   (dec_full),
    .rd_en  (dec_pop),
    .rd_data(dec_rd_drop),
    .empty  (dec_empty),
    .count  (dec_count)
  );

  // ---------------- deparser ----------------
  deparser #(.DATA_W(DATA_W)) u_deparser (
    .clk, .rst_n,
    .dec_empty(dec_empty),
    .dec_drop (dec_rd_drop),
    .dec_pop  (dec_pop),
    .buf_empty(buf_empty),
    .buf_data (buf_rd[DATA_W-1:0]),
    .buf_keep (buf_rd[DATA_W +: KEEP_W]),
    .buf_last (buf_rd[BUF_W-1]),
    .buf_pop  (buf_pop),
    .m_valid  (m_tvalid),
    .m_ready  (m_tready),
    .m_data   (m_tdata),
    .m_keep   (m_tkeep),
    .m_last   (m_tlast),
    .pkt_pass (ev_pass),
    .pkt_drop (ev_drop)
  );

  assign ev_bypass  = d_bypass;
  assign ev_hit     = d_hit;
  assign ev_hit_idx = d_idx;

  a_dec_room: assert property (@(posedge clk) disable iff (!rst_n) !(d_valid && dec_full && !dec_pop));

endmodule
