// tb_sync_fifo: self-checking test of sync_fifo.
// Random pushes and pops against a queue model; checks data order, the full
// and empty flags and the count every cycle, and that a word pushed at one
// edge is readable in the next cycle. Depth 5 (not a power of two).
module tb_sync_fifo;
  localparam int W = 16, D = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && int'(count) == 0, "empty after reset");
    // Fill to full, then one more push must be refused.
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = W'(i + 100);
      @(posedge clk); #1 model.push_back(W'(i + 100));
      wr_en = 0;
      check(!empty && rd_data == model[0], "shown-ahead after push");
    end
    check(full && int'(count) == D, "full at depth");
    // Random traffic.
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), "count");
      if (!empty) check(rd_data == model[0], "read data");
      wr_en   = ($urandom_range(0, 99) < 55) && !full;
      rd_en   = ($urandom_range(0, 99) < 50) && !empty;
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      #1 wr_en = 0; rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
