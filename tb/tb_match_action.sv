// tb_match_action: the match/action stage.
//
// Installs a few rules, then feeds parser results: recognised packets that
// hit a rule must be dropped, recognised packets that miss must pass
// (allow-by-default), and unrecognised packets must pass as a bypass even if
// their key would hit.  Rules are inserted and removed between lookups.  The
// decision must come one cycle after the parser result.
module tb_match_action;
  import fw_pkg::*;
  import fw_tb_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ok = 0;
  fw_key_t in_key = '0;
  logic dec_valid, dec_drop, dec_bypass, dec_hit;
  logic [IW-1:0] dec_idx;
  logic wr_en = 0, wr_valid = 0;
  logic [IW-1:0] wr_idx = '0;
  fw_key_t wr_value = '0, wr_mask = '0;

  match_action #(.N_RULES(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_drop = 0, n_allow = 0, n_bypass = 0;
  fw_key_t val[] = new[N], msk[] = new[N];
  bit vld[] = new[N];

  task automatic write_rule(input int i, input bit v, input fw_key_t value, input fw_key_t mask);
    @(negedge clk);
    wr_en = 1; wr_idx = IW'(i); wr_valid = v; wr_value = value; wr_mask = mask;
    @(negedge clk);
    wr_en = 0;
    vld[i] = v; val[i] = value; msk[i] = mask;
  endtask

  task automatic packet(input fw_key_t k, input bit ok);
    int exp;
    bit e_drop;
    @(negedge clk);
    in_valid = 1; in_ok = ok; in_key = k;
    @(negedge clk);
    in_valid = 0; in_ok = 0;
    exp = rule_hit(k, val, msk, vld);
    e_drop = ok && exp >= 0;
    checks++;
    if (!dec_valid || dec_drop != e_drop || dec_bypass != !ok || dec_hit != e_drop ||
        (e_drop && dec_idx != IW'(exp))) begin
      failures++;
      $display("FAIL ok %0d exp %0d: valid %0d drop %0d bypass %0d idx %0d",
               ok, exp, dec_valid, dec_drop, dec_bypass, dec_idx);
    end
    if (!ok) n_bypass++; else if (e_drop) n_drop++; else n_allow++;
    @(negedge clk);
    checks++;
    if (dec_valid) begin failures++; $display("FAIL extra decision"); end
  endtask

  initial begin
    fw_key_t mask_flow;
    for (int i = 0; i < int'(N); i++) vld[i] = 0;
    mask_flow = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < int'(N); i++) write_rule(i, 1, random_key(), mask_flow);
    for (int n = 0; n < 600; n++) begin
      int r;
      fw_key_t k;
      r = $urandom_range(0, N - 1);
      k = ($urandom_range(0, 1)) ? val[r] : random_key();
      packet(k, $urandom_range(0, 5) != 0);
      if ($urandom_range(0, 30) == 0) write_rule(r, $urandom_range(0, 1), random_key(), mask_flow);
    end
    checks++;
    if (n_drop < 50 || n_allow < 50 || n_bypass < 20) begin
      failures++; $display("coverage drop %0d allow %0d bypass %0d", n_drop, n_allow, n_bypass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
