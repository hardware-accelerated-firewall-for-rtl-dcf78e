// tb_fw5g_top: end-to-end test of the 5G firewall at reduced sizes.
//
// 24 simulated 5G users each own two flows (distinct inner 5-tuple and GTP
// TEID); a rule drops the second flow of a user.  One extra wildcard rule
// drops any flow to inner destination port 23.  The test runs in phases:
//   1. rules for users 0..15 installed, traffic of users 0..15 while the
//      rules for users 16..23 are inserted over the register bus;
//   2. traffic of users 4..23 while the rules of users 0..3 are removed;
//   3. traffic of users 0..3, whose second flows must now pass.
// Packets have random GTP shapes (option word, extension headers, IPv4
// options, ICMP/TCP/UDP inner), some are not GTP at all (forwarded without
// lookup) and some are longer than the packet buffer (cut-through).  The
// output is random-stalled, so the input is back-pressured.  Every output
// beat is compared with a model; each mechanism must be seen at least once.
module tb_fw5g_top;
  import fw_pkg::*;
  import fw_tb_pkg::*;

  localparam int unsigned DW = 256, KW = DW / 8;
  localparam int unsigned N_RULES = 32, IW = $clog2(N_RULES);
  localparam int unsigned PKT_DEPTH = 16, DEC_DEPTH = 8, HDR = 128;
  localparam int unsigned USERS = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [DW-1:0] s_tdata = '0;
  logic [KW-1:0] s_tkeep = '0;
  logic m_tvalid, m_tready = 0, m_tlast;
  logic [DW-1:0] m_tdata;
  logic [KW-1:0] m_tkeep;
  logic [7:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_rready = 0;
  logic [31:0] s_axil_wdata = '0;
  logic [3:0] s_axil_wstrb = '1;
  logic s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata;
  logic ev_pass, ev_drop, ev_bypass, ev_hit;
  logic [IW-1:0] ev_hit_idx;

  fw5g_top #(.N_RULES(N_RULES), .PKT_DEPTH(PKT_DEPTH), .DEC_DEPTH(DEC_DEPTH), .HDR_BYTES(HDR)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int c_drop = 0, c_allow = 0, c_bypass = 0, c_in_stall = 0, c_out_stall = 0;
  int c_ins_live = 0, c_rm_live = 0, c_ext = 0, c_long = 0, c_wild = 0;
  bit traffic_on = 0;

  // model
  fw_key_t flow_key[USERS][2];
  fw_key_t r_val[] = new[N_RULES], r_msk[] = new[N_RULES];
  bit      r_vld[] = new[N_RULES];
  logic [DW+KW:0] exp_q[$];
  int exp_pass = 0, exp_drop = 0, got_pass = 0, got_drop = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- AXI4-Lite ----------------
  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awvalid = 1; s_axil_awaddr = a;
    s_axil_wvalid = 1; s_axil_wdata = d; s_axil_bready = 1;
    fork
      begin do @(posedge clk); while (!s_axil_awready); #1 s_axil_awvalid = 0; end
      begin do @(posedge clk); while (!s_axil_wready);  #1 s_axil_wvalid = 0; end
    join
    while (!s_axil_bvalid) @(posedge clk);
    @(posedge clk);
    #1 s_axil_bready = 0;
  endtask

  task automatic set_rule(input int idx, input bit ins, input fw_key_t v, input fw_key_t m);
    logic [159:0] kb = 160'(v), mb = 160'(m);
    if (ins)
      for (int w = 0; w < int'(KEY_WORDS); w++) begin
        axil_write(REG_KEY0 + 8'(4 * w), kb[32*w +: 32]);
        axil_write(REG_MASK0 + 8'(4 * w), mb[32*w +: 32]);
      end
    axil_write(REG_INDEX, 32'(idx));
    axil_write(REG_CMD, ins ? 32'h1 : 32'h2);
    repeat (2) @(posedge clk);
    if (traffic_on) begin if (ins) c_ins_live++; else c_rm_live++; end
  endtask

  // ---------------- packets ----------------
  task automatic send_bytes(input bytes_t p);
    int nb = (p.size() + KW - 1) / KW;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      s_tdata = '0; s_tkeep = '0;
      for (int i = 0; i < int'(KW); i++)
        if (b * KW + i < p.size()) begin
          s_tdata[8*i +: 8] = p[b * KW + i];
          s_tkeep[i] = 1'b1;
        end
      s_tlast = (b == nb - 1);
      s_tvalid = 1;
      @(posedge clk);
      while (!s_tready) begin c_in_stall++; @(posedge clk); end
      #1 s_tvalid = 0;
    end
  endtask

  task automatic send_packet(input int u, input int f);
    fw_key_t k = flow_key[u][f];
    shape_t  s;
    bytes_t  p;
    bit      ok, drop;
    int      hit;
    s = random_shape();
    if ($urandom_range(0, 20) == 0) begin s.payload = 600 + $urandom_range(0, 200); c_long++; end
    build_pkt(k, s, HDR, p, ok);
    hit  = rule_hit(k, r_val, r_msk, r_vld);
    drop = ok && hit >= 0;
    if (ok && s.n_ext > 0) c_ext++;
    if (drop && hit == int'(N_RULES) - 1) c_wild++;
    if (!ok) c_bypass++; else if (drop) c_drop++; else c_allow++;
    if (drop) exp_drop++;
    else begin
      exp_pass++;
      for (int b = 0; b < (p.size() + KW - 1) / KW; b++) begin
        logic [DW-1:0] d = '0;
        logic [KW-1:0] kp = '0;
        for (int i = 0; i < int'(KW); i++)
          if (b * KW + i < p.size()) begin d[8*i +: 8] = p[b * KW + i]; kp[i] = 1; end
        exp_q.push_back({(b == (p.size() + KW - 1) / KW - 1), kp, d});
      end
    end
    send_bytes(p);
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic traffic(input int u_lo, input int u_hi, input int n);
    for (int i = 0; i < n; i++) send_packet($urandom_range(u_lo, u_hi), $urandom_range(0, 1));
  endtask

  // ---------------- output ----------------
  always @(negedge clk) m_tready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && !m_tready) c_out_stall++;
    if (ev_pass) got_pass++;
    if (ev_drop) got_drop++;
    if (m_tvalid && m_tready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected beat"); end
      else if (exp_q.pop_front() != {m_tlast, m_tkeep, m_tdata}) begin
        failures++; $display("FAIL beat mismatch at %0t", $time);
      end
    end
  end

  function automatic fw_key_t exact_mask();
    return '1;
  endfunction

  initial begin
    fw_key_t wk, wm;
    for (int i = 0; i < int'(N_RULES); i++) r_vld[i] = 0;
    for (int u = 0; u < int'(USERS); u++)
      for (int f = 0; f < 2; f++) begin
        flow_key[u][f] = random_key();
        if (flow_key[u][f].dst_port == 16'd23) flow_key[u][f].dst_port = 16'd24;
      end
    // user 5's first flow goes to port 23 (hit only by the wildcard rule)
    flow_key[5][0].proto = IP_PROTO_TCP;
    flow_key[5][0].dst_port = 16'd23;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // wildcard rule in the last slot: any packet to destination port 23
    wk = '0; wk.dst_port = 16'd23;
    wm = '0; wm.dst_port = '1;
    set_rule(N_RULES - 1, 1, wk, wm);
    r_val[N_RULES - 1] = wk; r_msk[N_RULES - 1] = wm; r_vld[N_RULES - 1] = 1;
    for (int u = 0; u < 16; u++) begin
      set_rule(u, 1, flow_key[u][1], exact_mask());
      r_val[u] = flow_key[u][1]; r_msk[u] = exact_mask(); r_vld[u] = 1;
    end
    // phase 1
    traffic_on = 1;
    fork
      traffic(0, 15, 150);
      for (int u = 16; u < int'(USERS); u++) set_rule(u, 1, flow_key[u][1], exact_mask());
    join
    for (int u = 16; u < int'(USERS); u++) begin
      r_val[u] = flow_key[u][1]; r_msk[u] = exact_mask(); r_vld[u] = 1;
    end
    // phase 2
    fork
      traffic(4, USERS - 1, 150);
      for (int u = 0; u < 4; u++) set_rule(u, 0, '0, '0);
    join
    for (int u = 0; u < 4; u++) r_vld[u] = 0;
    // phase 3
    traffic(0, 3, 40);
    traffic_on = 0;
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    check(got_pass == exp_pass && got_drop == exp_drop, "pass/drop event counts");
    $display("drop %0d allow %0d bypass %0d in_stall %0d out_stall %0d ins_live %0d rm_live %0d ext %0d long %0d wild %0d",
             c_drop, c_allow, c_bypass, c_in_stall, c_out_stall, c_ins_live, c_rm_live, c_ext, c_long, c_wild);
    check(c_drop > 0,      "rule hit / DROP seen");
    check(c_allow > 0,     "allow-by-default seen");
    check(c_bypass > 0,    "non-GTP bypass seen");
    check(c_in_stall > 0,  "input back-pressure seen");
    check(c_out_stall > 0, "output stall seen");
    check(c_ins_live > 0,  "rule insert during traffic seen");
    check(c_rm_live > 0,   "rule removal during traffic seen");
    check(c_ext > 0,       "GTP extension header seen");
    check(c_long > 0,      "packet longer than the buffer seen");
    check(c_wild > 0,      "wildcard rule hit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
