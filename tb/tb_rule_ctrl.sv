// tb_rule_ctrl: the rule-management register slave.
//
// Writes random keys and masks over AXI4-Lite (address and data sent in
// either order, with random B-channel stalls), reads the staging registers
// back, and checks that each insert or remove command produces exactly one
// TCAM write with the staged key, mask, slot and valid flag.
module tb_rule_ctrl;
  import fw_pkg::*;
  import fw_tb_pkg::*;

  localparam int unsigned N = 512;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0;
  logic [3:0] s_wstrb = '1;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic wr_en, wr_valid;
  logic [IW-1:0] wr_idx;
  fw_key_t wr_value, wr_mask;

  rule_ctrl #(.N_RULES(N)) dut (.*);

  int checks = 0, failures = 0, n_wr = 0;
  // expected TCAM writes
  logic [IW-1:0] e_idx[$];
  bit            e_vld[$];
  fw_key_t       e_val[$], e_msk[$];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    int aw_dly = $urandom_range(0, 2), w_dly = $urandom_range(0, 2);
    @(negedge clk);
    s_bready = 0;
    fork
      begin
        repeat (aw_dly) @(negedge clk);
        s_awvalid = 1; s_awaddr = a;
        do @(posedge clk); while (!s_awready);
        #1 s_awvalid = 0;
      end
      begin
        repeat (w_dly) @(negedge clk);
        s_wvalid = 1; s_wdata = d;
        do @(posedge clk); while (!s_wready);
        #1 s_wvalid = 0;
      end
    join
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_bready = 1;
    while (!s_bvalid) @(posedge clk);
    @(posedge clk);
    #1 s_bready = 0;
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a; s_rready = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    @(posedge clk); #1 s_rready = 0;
  endtask

  // every TCAM write must be one that a command asked for
  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      n_wr++;
      checks++;
      if (e_idx.size() == 0) begin
        failures++; $display("FAIL unexpected TCAM write");
      end else begin
        logic [IW-1:0] i;
        bit v;
        fw_key_t kv, km;
        i = e_idx.pop_front(); v = e_vld.pop_front();
        kv = e_val.pop_front(); km = e_msk.pop_front();
        if (wr_idx != i || wr_valid != v || (v && (wr_value != kv || wr_mask != km))) begin
          failures++;
          $display("FAIL TCAM write idx %0d/%0d valid %0d/%0d", wr_idx, i, wr_valid, v);
        end
      end
    end
  end

  initial begin
    logic [31:0] rd;
    logic [159:0] kb, mb;
    int cmds = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    axil_read(REG_INFO, rd);
    check(rd == N, "INFO");
    for (int n = 0; n < 60; n++) begin
      fw_key_t k, m;
      logic [IW-1:0] idx;
      bit ins;
      k = random_key();
      m = random_key() | random_key();
      idx = IW'($urandom);
      ins = $urandom_range(0, 3) != 0;
      kb = 160'(k);
      mb = 160'(m);
      for (int w = 0; w < int'(KEY_WORDS); w++) begin
        axil_write(REG_KEY0 + 8'(4 * w), kb[32*w +: 32]);
        axil_write(REG_MASK0 + 8'(4 * w), mb[32*w +: 32]);
      end
      axil_write(REG_INDEX, 32'(idx));
      for (int w = 0; w < int'(KEY_WORDS); w++) begin
        axil_read(REG_KEY0 + 8'(4 * w), rd);
        check(rd == kb[32*w +: 32], "KEY readback");
        axil_read(REG_MASK0 + 8'(4 * w), rd);
        check(rd == mb[32*w +: 32], "MASK readback");
      end
      axil_read(REG_INDEX, rd);
      check(rd == 32'(idx), "INDEX readback");
      e_idx.push_back(idx); e_vld.push_back(ins); e_val.push_back(k); e_msk.push_back(m);
      axil_write(REG_CMD, ins ? 32'h1 : 32'h2);
      cmds++;
      // writing CMD with neither bit set does nothing
      if (n % 7 == 0) axil_write(REG_CMD, 32'h0);
    end
    repeat (4) @(posedge clk);
    check(n_wr == cmds && e_idx.size() == 0, "one TCAM write per command");
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
