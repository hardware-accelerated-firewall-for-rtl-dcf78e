// tb_tcam: the rule TCAM against a reference ternary match.
//
// Fills a reduced-size TCAM with random rules, many with wildcarded fields
// and some overlapping, so priority matters; looks up keys built to hit a
// chosen rule and random keys that mostly miss; removes and rewrites rules
// between lookups.  Each result must come exactly one cycle after its lookup.
module tb_tcam;
  import fw_pkg::*;
  import fw_tb_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_valid = 0, lk_valid = 0;
  logic [IW-1:0] wr_idx = '0;
  logic [KEY_W-1:0] wr_value = '0, wr_mask = '0, lk_key = '0;
  logic res_valid, res_hit;
  logic [IW-1:0] res_idx;

  tcam #(.DEPTH(DEPTH), .KEY_W(KEY_W)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_prio = 0;
  fw_key_t val[] = new[DEPTH], msk[] = new[DEPTH];
  bit vld[] = new[DEPTH];

  task automatic write_rule(input int i, input bit v, input fw_key_t value, input fw_key_t mask);
    @(negedge clk);
    wr_en = 1; wr_idx = IW'(i); wr_valid = v; wr_value = value; wr_mask = mask;
    @(negedge clk);
    wr_en = 0;
    vld[i] = v; val[i] = value; msk[i] = mask;
  endtask

  function automatic fw_key_t random_mask();
    fw_key_t m = '1;
    if ($urandom_range(0, 1)) m.src_ip   = '0;
    if ($urandom_range(0, 1)) m.dst_ip   = '0;
    if ($urandom_range(0, 1)) m.src_port = '0;
    if ($urandom_range(0, 1)) m.dst_port = '0;
    if ($urandom_range(0, 2) == 0) m.proto = '0;
    if ($urandom_range(0, 2) == 0) m.teid  = '0;
    if ($urandom_range(0, 3) == 0) m.dst_ip[7:0] = '0;   // a /24 prefix
    return m;
  endfunction

  task automatic lookup(input fw_key_t k);
    int exp;
    @(negedge clk);
    lk_valid = 1; lk_key = k;
    @(negedge clk);
    lk_valid = 0;
    exp = rule_hit(k, val, msk, vld);
    checks++;
    if (!res_valid || res_hit != (exp >= 0) || (exp >= 0 && res_idx != IW'(exp))) begin
      failures++;
      $display("FAIL key %h: valid %0d hit %0d idx %0d, expected %0d", k, res_valid, res_hit, res_idx, exp);
    end
    if (exp >= 0) n_hit++; else n_miss++;
    // priority: count hits where a later rule also matched
    if (exp >= 0)
      for (int j = exp + 1; j < int'(DEPTH); j++)
        if (vld[j] && ((k & msk[j]) == (val[j] & msk[j]))) begin n_prio++; break; end
  endtask

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) vld[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // empty table misses
    lookup(random_key());
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (i >= int'(DEPTH) / 2 && $urandom_range(0, 1)) begin
        // a broader copy of an earlier rule: overlaps it, lower priority
        int j;
        j = $urandom_range(0, i - 1);
        write_rule(i, 1, val[j], msk[j] & random_mask());
      end else
        write_rule(i, $urandom_range(0, 5) != 0, random_key(), random_mask());
    end
    for (int n = 0; n < 3000; n++) begin
      fw_key_t k;
      int r;
      r = $urandom_range(0, int'(DEPTH) - 1);
      if ($urandom_range(0, 2) != 0) k = (val[r] & msk[r]) | (random_key() & ~msk[r]);
      else k = random_key();
      lookup(k);
      if ($urandom_range(0, 20) == 0)
        write_rule($urandom_range(0, DEPTH - 1), $urandom_range(0, 3) != 0, random_key(), random_mask());
    end
    checks++;
    if (n_hit < 200 || n_miss < 100 || n_prio < 20) begin
      failures++; $display("coverage hit %0d miss %0d prio %0d", n_hit, n_miss, n_prio);
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
