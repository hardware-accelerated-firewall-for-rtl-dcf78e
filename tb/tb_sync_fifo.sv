// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, count, full and empty, and that a push on a full FIFO is only
// accepted together with a pop.
module tb_sync_fifo;
  localparam int unsigned W = 16, D = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_empty = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 500) % 2;  // alternate fill-biased and drain-biased
      #1;
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(rd_data == model[0], "data");
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en   = phase == 0 ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en   = !empty && (phase == 0 ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0));
      if (full && wr_en) begin if ($urandom_range(0, 1)) rd_en = 1; else wr_en = 0; end
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && (model.size() < D)) model.push_back(wr_data);
      #1 wr_en = 0; rd_en = 0;
    end
    check(n_full > 10 && n_empty > 10, "full and empty both reached");
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
