// tb_deparser: the output stage.
//
// A behavioural packet buffer and decision queue (first-word-fall-through,
// filled at random moments, decisions sometimes late) feed the deparser.
// Passed packets must come out beat for beat and in order, dropped ones must
// vanish, and the per-packet events must match.  A final phase with
// everything ready checks one beat per cycle with no bubble between packets.
module tb_deparser;
  localparam int unsigned DW = 64;
  localparam int unsigned KW = DW / 8;
  typedef struct packed { logic last; logic [KW-1:0] keep; logic [DW-1:0] data; } beat_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dec_empty, dec_drop, dec_pop;
  logic buf_empty, buf_last, buf_pop;
  logic [DW-1:0] buf_data;
  logic [KW-1:0] buf_keep;
  logic m_valid, m_ready = 0, m_last;
  logic [DW-1:0] m_data;
  logic [KW-1:0] m_keep;
  logic pkt_pass, pkt_drop;

  deparser #(.DATA_W(DW)) dut (.*);

  beat_t buf_q[$];
  bit    dec_q[$];
  beat_t exp_q[$];
  int checks = 0, failures = 0, n_pass = 0, n_drop = 0, ev_pass = 0, ev_drop = 0, n_out = 0;
  int avail_beats = 0;   // beats of buf_q visible to the deparser
  int avail_dec = 0;

  assign buf_empty = (avail_beats == 0);
  assign {buf_last, buf_keep, buf_data} = buf_empty ? '0 : buf_q[0];
  assign dec_empty = (avail_dec == 0);
  assign dec_drop  = dec_empty ? 1'b0 : dec_q[0];

  always @(posedge clk) if (rst_n) begin
    if (m_valid && m_ready) begin
      beat_t b;
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra beat"); end
      else begin
        b = exp_q.pop_front();
        if ({m_last, m_keep, m_data} != b) begin failures++; $display("FAIL beat mismatch"); end
      end
    end
    if (pkt_pass) ev_pass++;
    if (pkt_drop) ev_drop++;
    if (buf_pop) begin void'(buf_q.pop_front()); avail_beats--; end
    if (dec_pop) begin void'(dec_q.pop_front()); avail_dec--; end
  end

  // make queued entries visible gradually
  bit fast = 0;
  always @(posedge clk) if (rst_n) begin
    if (avail_beats < buf_q.size() - (buf_pop ? 1 : 0) && (fast || $urandom_range(0, 2) != 0))
      avail_beats++;
    if (avail_dec < dec_q.size() - (dec_pop ? 1 : 0) && (fast || $urandom_range(0, 3) == 0))
      avail_dec++;
  end

  task automatic add_packet(input int nbeats, input bit drop);
    for (int i = 0; i < nbeats; i++) begin
      beat_t b;
      b.data = {$urandom, $urandom};
      b.keep = (i == nbeats - 1) ? KW'((1 << $urandom_range(1, KW)) - 1) : '1;
      b.last = (i == nbeats - 1);
      buf_q.push_back(b);
      if (!drop) exp_q.push_back(b);
    end
    dec_q.push_back(drop);
    if (drop) n_drop++; else n_pass++;
  endtask

  initial begin
    longint t0, beats;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      forever begin @(negedge clk); if (!fast) m_ready = ($urandom_range(0, 3) != 0); end
    join_none
    for (int n = 0; n < 300; n++) begin
      add_packet($urandom_range(1, 6), $urandom_range(0, 2) == 0);
      repeat ($urandom_range(0, 6)) @(posedge clk);
    end
    wait (exp_q.size() == 0 && buf_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (ev_pass != n_pass || ev_drop != n_drop || n_drop < 50) begin
      failures++; $display("FAIL events pass %0d/%0d drop %0d/%0d", ev_pass, n_pass, ev_drop, n_drop);
    end
    // throughput: 40 passed packets of 3 beats, all queued, m_ready high
    @(negedge clk);
    fast = 1; m_ready = 1;
    for (int n = 0; n < 40; n++) add_packet(3, 0);
    beats = n_out;
    wait (avail_beats == buf_q.size() && avail_dec == dec_q.size());
    t0 = $time;
    wait (exp_q.size() == 0);
    checks++;
    if (($time - t0) / 10 > 120 + 2) begin
      failures++; $display("FAIL throughput %0d cycles for 120 beats", ($time - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
