// tb_bisync_fifo: self-checking test of bisync_fifo.
// Writer and reader run from unrelated clocks (period 10 and 17 time units,
// then the reverse ratio). Random writes and reads are compared in order with
// a queue model; the test also checks that full is reached after exactly
// 2**ADDR_W writes into an idle FIFO and that a word written into an empty FIFO
// shows on the read side within SYNC_STAGES+1 read clocks.
// A second instance runs both sides from one clock to test synchronous mode:
// with sync_mode high a word is readable right after its write edge, full
// rises right after the DEPTH-th write and falls right after a read; then
// random traffic runs while sync_mode is switched on and off at random, and the
// data must still arrive complete and in order.
module tb_bisync_fifo;
  localparam int W = 12, AW = 3, DEPTH = 1 << AW;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic winc = 0, rinc = 0, wfull, rempty, sync_mode = 0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  localparam int WPER_A = 5, RPER_A = 8, WPER_B = 9, RPER_B = 4;
  bit ratio_b = 0;
  logic [W-1:0] model[$];

  bisync_fifo #(.WIDTH(W), .ADDR_W(AW)) dut (.*);

  // one-clock instance for synchronous mode
  logic cclk = 0, c_rst_n = 0, c_winc = 0, c_rinc = 0, c_wfull, c_rempty, c_sync = 1;
  logic [W-1:0] c_wdata = '0, c_rdata;
  logic [W-1:0] c_model[$];
  bisync_fifo #(.WIDTH(W), .ADDR_W(AW)) dut_c (
    .wclk(cclk), .wrst_n(c_rst_n), .winc(c_winc), .wdata(c_wdata), .wfull(c_wfull),
    .rclk(cclk), .rrst_n(c_rst_n), .rinc(c_rinc), .rdata(c_rdata), .rempty(c_rempty),
    .sync_mode(c_sync)
  );
  always #5 cclk = ~cclk;

  always begin #(WPER_A); if (ratio_b) #(WPER_B - WPER_A); wclk = ~wclk; end
  always begin if (ratio_b) #(RPER_B); else #(RPER_A); rclk = ~rclk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nwritten, nread;
  bit done_w;

  task automatic run_random(input int n);
    int target;
    target = n + model.size();
    nwritten = 0; nread = 0; done_w = 0;
    fork
      begin : writer
        while (nwritten < n) begin
          @(negedge wclk);
          winc = !wfull && ($urandom_range(0, 99) < 60);
          wdata = W'($urandom);
          @(posedge wclk);
          if (winc) begin model.push_back(wdata); nwritten++; end
          #1 winc = 0;
        end
        done_w = 1;
      end
      begin : reader
        while (nread < target) begin
          @(negedge rclk);
          rinc = !rempty && ($urandom_range(0, 99) < 60);
          if (rinc) begin
            check(model.size() > 0 && rdata == model[0], "read data order");
          end
          @(posedge rclk);
          if (rinc) begin void'(model.pop_front()); nread++; end
          #1 rinc = 0;
        end
      end
    join
  endtask

  task automatic run_one_clock();
    int sent, got, n_sync_cycles;
    @(negedge cclk); c_rst_n = 1;
    repeat (2) @(negedge cclk);
    check(c_rempty && !c_wfull, "one clock: flags after reset");
    // visible right after the write edge
    c_winc = 1; c_wdata = 12'h3c3;
    @(posedge cclk); #1 c_winc = 0;
    check(!c_rempty && c_rdata == 12'h3c3, "sync mode: word readable after one edge");
    @(negedge cclk); c_rinc = 1; @(posedge cclk); #1 c_rinc = 0;
    check(c_rempty, "sync mode: empty right after the read");
    // full right after the DEPTH-th write, free right after a read
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge cclk);
      check(!c_wfull, "sync mode: not full before depth");
      c_winc = 1; c_wdata = W'(i);
    end
    @(posedge cclk); #1 c_winc = 0;
    check(c_wfull, "sync mode: full right after depth writes");
    @(negedge cclk); c_rinc = 1; @(posedge cclk); #1 c_rinc = 0;
    check(!c_wfull, "sync mode: slot free right after a read");
    for (int i = 1; i < DEPTH; i++) c_model.push_back(W'(i));
    // random traffic with sync_mode switched at random
    sent = 0; got = 0; n_sync_cycles = 0;
    while (got < 3000 + DEPTH - 1) begin
      @(negedge cclk);
      if ($urandom_range(0, 19) == 0) c_sync = !c_sync;
      if (c_sync) n_sync_cycles++;
      #1;  // let the flags follow the mode
      c_winc = !c_wfull && sent < 3000 && ($urandom_range(0, 99) < 60);
      c_wdata = W'($urandom);
      c_rinc = !c_rempty && ($urandom_range(0, 99) < 60);
      if (c_rinc) check(c_model.size() > 0 && c_rdata == c_model[0], $sformatf("one clock: read order %h %h n=%0d sync=%0d", c_rdata, c_model[0], c_model.size(), c_sync));
      @(posedge cclk);
      if (c_winc) begin c_model.push_back(c_wdata); sent++; end
      if (c_rinc) begin void'(c_model.pop_front()); got++; end
      #1 c_winc = 0; c_rinc = 0;
    end
    check(c_model.size() == 0, "one clock: all words delivered");
    check(n_sync_cycles > 100, "one clock: both modes used");
  endtask

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge rclk);
    check(rempty && !wfull, "flags after reset");
    // Latency of the empty flag.
    @(negedge wclk); winc = 1; wdata = 12'h5a5;
    @(posedge wclk); model.push_back(wdata); #1 winc = 0;
    begin
      int n;
      n = 0;
      while (rempty && n < 10) begin @(posedge rclk); #1 n++; end
      check(n <= 3 && n >= 1, "empty clears within SYNC_STAGES+1 read clocks");
      check(rdata == 12'h5a5, "first word");
    end
    @(negedge rclk); rinc = 1; @(posedge rclk); void'(model.pop_front()); #1 rinc = 0;
    repeat (6) @(posedge wclk);
    // Fill: exactly DEPTH writes accepted.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      check(!wfull, "not full before depth");
      winc = 1; wdata = W'(i);
      @(posedge wclk); model.push_back(wdata); #1 winc = 0;
    end
    @(negedge wclk);
    check(wfull, "full after depth writes");
    // Drain and random traffic, one clock ratio then the other.
    run_random(1500);
    check(model.size() == 0, "all words delivered");
    ratio_b = 1;
    run_random(1500);
    check(model.size() == 0, "all words delivered, reversed ratio");
    run_one_clock();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
