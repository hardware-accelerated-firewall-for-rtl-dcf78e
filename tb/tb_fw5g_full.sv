// tb_fw5g_full: the firewall at its default sizes on the evaluation scenario.
//
// 512 simulated 5G users each own two flows (1024 flows).  Over the register
// bus, 512 exact-match rules are installed, one per user, dropping the
// user's second flow and filling every rule slot.  Then ten captures are
// replayed one after the other, the k-th with the first 512*k/10 users, every
// flow sending one packet in random order: GTP-U G-PDUs with the PDU-session
// extension header and payloads of 20 to 1400 bytes.  In every capture the
// first flow of each user must reach the output intact and in order and the
// second flow must be blocked.
module tb_fw5g_full;
  import fw_pkg::*;
  import fw_tb_pkg::*;

  localparam int unsigned DW = fw_pkg::AXIS_W, KW = DW / 8;
  localparam int unsigned USERS = 512;
  localparam int unsigned N_RULES = 512, IW = $clog2(N_RULES);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [DW-1:0] s_tdata = '0;
  logic [KW-1:0] s_tkeep = '0;
  logic m_tvalid, m_tready = 1, m_tlast;
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

  fw5g_top dut (.*);

  int checks = 0, failures = 0;
  fw_key_t flow_key[USERS][2];
  logic [DW+KW:0] exp_q[$];
  int exp_pass = 0, exp_drop = 0, got_pass = 0, got_drop = 0, got_hit_ok = 0;

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

  task automatic insert_rule(input int idx, input fw_key_t v);
    logic [159:0] kb = 160'(v), mb = '1;
    for (int w = 0; w < int'(KEY_WORDS); w++) begin
      axil_write(REG_KEY0 + 8'(4 * w), kb[32*w +: 32]);
      axil_write(REG_MASK0 + 8'(4 * w), mb[32*w +: 32]);
    end
    axil_write(REG_INDEX, 32'(idx));
    axil_write(REG_CMD, 32'h1);
  endtask

  task automatic send_packet(input int u, input int f);
    shape_t s = plain_shape($urandom_range(20, 1400));
    bytes_t p;
    bit     ok;
    int     nb;
    s.gtp_opt = 1; s.n_ext = 1; s.ext_len = 1;
    build_pkt(flow_key[u][f], s, 128, p, ok);
    nb = (p.size() + KW - 1) / KW;
    checks++;
    if (!ok) begin failures++; $display("FAIL builder"); end
    if (f == 1) exp_drop++;
    else exp_pass++;
    for (int b = 0; b < nb; b++) begin
      logic [DW-1:0] d = '0;
      logic [KW-1:0] kp = '0;
      for (int i = 0; i < int'(KW); i++)
        if (b * KW + i < p.size()) begin d[8*i +: 8] = p[b * KW + i]; kp[i] = 1; end
      if (f == 0) exp_q.push_back({(b == nb - 1), kp, d});
      @(negedge clk);
      s_tdata = d; s_tkeep = kp; s_tlast = (b == nb - 1); s_tvalid = 1;
      @(posedge clk);
      while (!s_tready) @(posedge clk);
      #1 s_tvalid = 0;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ev_pass) got_pass++;
    if (ev_drop) got_drop++;
    if (ev_hit) got_hit_ok++;
    if (m_tvalid && m_tready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected beat"); end
      else if (exp_q.pop_front() != {m_tlast, m_tkeep, m_tdata}) begin
        failures++; $display("FAIL beat mismatch at %0t", $time);
      end
    end
  end

  initial begin
    int order[$];
    for (int u = 0; u < int'(USERS); u++) begin
      flow_key[u][0] = random_key();
      flow_key[u][1] = flow_key[u][0];
      flow_key[u][0].proto = IP_PROTO_UDP;
      flow_key[u][1].proto = IP_PROTO_TCP;           // same user, same tunnel, second flow
      flow_key[u][0].teid = 32'h1000_0000 + u;
      flow_key[u][1].teid = 32'h1000_0000 + u;
      flow_key[u][0].src_ip = 32'h0a2d_0000 + u;     // user address 10.45.x.y
      flow_key[u][1].src_ip = 32'h0a2d_0000 + u;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int u = 0; u < int'(USERS); u++) insert_rule(u, flow_key[u][1]);
    // ten captures of growing size, the last with all 512 users (1024 flows);
    // every flow of the capture sends one packet, in random order
    for (int cap = 0; cap < 10; cap++) begin
      int n_users, p0, d0;
      n_users = (int'(USERS) * (cap + 1)) / 10;
      p0 = got_pass; d0 = got_drop;
      order = {};
      for (int i = 0; i < 2 * n_users; i++) order.push_back(i);
      order.shuffle();
      foreach (order[i]) send_packet(order[i] / 2, order[i] % 2);
      wait (exp_q.size() == 0);
      repeat (20) @(posedge clk);
      checks++;
      if (got_pass - p0 != n_users || got_drop - d0 != n_users) begin
        failures++;
        $display("FAIL capture %0d: %0d users, passed %0d dropped %0d", cap, n_users, got_pass - p0, got_drop - d0);
      end
    end
    checks++;
    if (got_pass != exp_pass || got_drop != exp_drop || got_hit_ok != exp_drop) begin
      failures++;
      $display("FAIL pass %0d/%0d drop %0d/%0d hits %0d", got_pass, exp_pass, got_drop, exp_drop, got_hit_ok);
    end
    $display("flows %0d, packets passed %0d, dropped %0d", 2 * USERS, got_pass, got_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
