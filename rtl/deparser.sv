// deparser: output stage of the 5G firewall.
//
// For each packet it takes the next decision from the decision queue and
// then moves the packet out of the packet buffer: a packet that was not
// dropped is sent on the output AXI4-Stream unchanged (the firewall rewrites
// no header, so rebuilding the packet is re-emitting its bytes); a dropped
// packet is read out of the buffer and discarded at one beat per cycle.
// That non-dropped packets are rebuilt and sent on follows the design; the
// buffer-and-decision structure is this design's choice.
//
// Timing: the decision is popped in the cycle the first beat leaves the
// buffer, so back-to-back packets flow without a bubble.  m_valid follows the
// buffer; the buffer is popped on m_valid && m_ready.  `pkt_pass` / `pkt_drop`
// pulse once per packet, on its first beat.
module deparser #(
  parameter int unsigned DATA_W = fw_pkg::AXIS_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // decision queue (first-word-fall-through)
  input  logic                dec_empty,
  input  logic                dec_drop,
  output logic                dec_pop,
  // packet buffer (first-word-fall-through)
  input  logic                buf_empty,
  input  logic [DATA_W-1:0]   buf_data,
  input  logic [DATA_W/8-1:0] buf_keep,
  input  logic                buf_last,
  output logic                buf_pop,
  // output stream
  output logic                m_valid,
  input  logic                m_ready,
  output logic [DATA_W-1:0]   m_data,
  output logic [DATA_W/8-1:0] m_keep,
  output logic                m_last,
  // per-packet events
  output logic                pkt_pass,
  output logic                pkt_drop
);

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_DROP} state_t;

  state_t state_q;
  logic   drop_cur;     // drop flag of the current packet
  logic   first;        // current beat is the first of its packet

  assign first    = (state_q == S_IDLE);
  assign drop_cur = first ? dec_drop : (state_q == S_DROP);

  // a first beat may only move once its decision is known
  wire can_move = !buf_empty && (!first || !dec_empty);

  assign m_valid = can_move && !drop_cur;
  assign m_data  = buf_data;
  assign m_keep  = buf_keep;
  assign m_last  = buf_last;

  assign buf_pop  = can_move && (drop_cur || m_ready);
  assign dec_pop  = buf_pop && first;
  assign pkt_pass = dec_pop && !dec_drop;
  assign pkt_drop = dec_pop && dec_drop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
    end else if (buf_pop) begin
      if (buf_last)   state_q <= S_IDLE;
      else if (first) state_q <= dec_drop ? S_DROP : S_PASS;
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last));

endmodule
