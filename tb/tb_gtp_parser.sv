// tb_gtp_parser: self-checking test of the GTP header parser.
//
// Random GTP packets (varied IPv4 header lengths, GTP optional word, zero to
// three extension headers, ICMP/TCP/UDP inner protocol, malformed outer
// headers, short and long payloads) are streamed with random gaps.  Each
// result is compared with the key and verdict the packet builder worked out,
// and must appear exactly two cycles after the beat that completed the
// header window.
module tb_gtp_parser;
  import fw_pkg::*;
  import fw_tb_pkg::*;

  localparam int unsigned DW = 256;
  localparam int unsigned KW = DW / 8;
  localparam int unsigned HB = 128;
  localparam int unsigned NPKT = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid = 0, s_ready = 0, s_last = 0;
  logic [DW-1:0] s_data = '0;
  logic [KW-1:0] s_keep = '0;
  logic res_valid, res_ok;
  fw_key_t res_key;

  gtp_parser #(.DATA_W(DW), .HDR_BYTES(HB)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit      exp_ok_q[$];
  fw_key_t exp_key_q[$];
  longint  exp_cyc_q[$];
  int      n_ok = 0, n_bad = 0;

  task automatic send(input bytes_t p);
    int nb = (p.size() + KW - 1) / KW;
    for (int b = 0; b < nb; b++) begin
      s_data = '0;
      s_keep = '0;
      for (int i = 0; i < int'(KW); i++)
        if (b * KW + i < p.size()) begin
          s_data[8*i +: 8] = p[b * KW + i];
          s_keep[i] = 1'b1;
        end
      s_last  = (b == nb - 1);
      s_valid = 1'b1;
      s_ready = ($urandom_range(0, 3) != 0);
      while (!s_ready) begin
        @(posedge clk); #1;
        s_ready = ($urandom_range(0, 3) != 0);
      end
      // this beat is accepted at the next edge; window completes on it?
      if (b == nb - 1 || b == int'(HB / KW) - 1) begin
        if (b < int'(HB / KW)) exp_cyc_q.push_back(cyc + 2);
      end
      @(posedge clk); #1;
      s_valid = 1'b0;
      s_ready = 1'b0;
      if ($urandom_range(0, 4) == 0) begin @(posedge clk); #1; end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      bit e_ok; fw_key_t e_key; longint e_c;
      checks++;
      if (exp_ok_q.size() == 0) begin
        failures++; $display("unexpected result");
      end else begin
        e_ok = exp_ok_q.pop_front(); e_key = exp_key_q.pop_front(); e_c = exp_cyc_q.pop_front();
        if (res_ok !== e_ok || (e_ok && res_key !== e_key) || cyc != e_c) begin
          failures++;
          $display("mismatch ok=%0d/%0d key=%h/%h cyc=%0d/%0d", res_ok, e_ok, res_key, e_key, cyc, e_c);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < int'(NPKT); n++) begin
      fw_key_t k;
      shape_t  s;
      bytes_t  p;
      bit      ok;
      k = random_key();
      s = random_shape();
      if (n % 37 == 5) begin s = plain_shape(0); s.outer_ihl = 15; s.inner_ihl = 15; end // too long for window
      if (n % 41 == 7) s.payload = 0;
      build_pkt(k, s, HB, p, ok);
      if (n % 43 == 3) begin p = p[0:40]; ok = 0; end                              // truncated
      exp_ok_q.push_back(ok);
      exp_key_q.push_back(k);
      if (ok) n_ok++; else n_bad++;
      send(p);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_ok_q.size() != 0 || n_ok < 100 || n_bad < 20) begin
      failures++; $display("missing results %0d, ok %0d bad %0d", exp_ok_q.size(), n_ok, n_bad);
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
