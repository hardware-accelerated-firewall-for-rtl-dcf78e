// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used twice in the firewall: as the packet buffer that holds each packet
// while its drop decision is made, and as the queue of decisions.  Storage is
// a memory array of DEPTH words (DEPTH a power of two) with read and write
// pointers one bit wider than the address.  rd_data shows the oldest word
// whenever `empty` is low; rd_en pops it.  A write when full and a read when
// empty are ignored (and flagged by assertions).  `count` is the fill level.
// Simultaneous read and write are allowed, also when full.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp_q, rp_q;

  wire do_rd = rd_en && !empty;
  wire do_wr = wr_en && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (do_wr) wp_q <= wp_q + 1'b1;
      if (do_rd) rp_q <= rp_q + 1'b1;
    end
  end

  assign count   = wp_q - rp_q;
  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rp_q[AW-1:0]];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !do_rd));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
