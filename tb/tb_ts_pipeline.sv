// tb_ts_pipeline: self-checking test of one transfer-stage pipeline.
// A sender with three credits drives random datagrams (random destination
// layer) into a pipeline of layer 2; a random consumer grants ejection or
// forwarding. Checks: heads come out in arrival order, a datagram asks for
// ejection exactly when addressed to layer 2 and for forwarding otherwise,
// one credit returns per pop one cycle later, and with an always-ready
// consumer the segment carries one datagram per cycle.
module tb_ts_pipeline;
  import nis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, credit_out;
  datagram_t in_dg = '0, head_dg;
  logic eject_req, eject_gnt = 0, fwd_req, fwd_gnt = 0;
  int checks = 0, failures = 0;
  datagram_t model[$];
  int credits = PIPE_DEPTH;
  int pops_prev = 0;
  int sent_window;

  ts_pipeline #(.LAYER_ID(2)) dut (.*);

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

  task automatic step(input int p_send, input int p_take);
    logic popped;
    @(negedge clk);
    // credit returned for the pop of the previous cycle
    check(credit_out == (pops_prev != 0), "credit one cycle after pop");
    if (credit_out) credits++;
    in_valid = (credits > 0) && ($urandom_range(0, 99) < p_send);
    in_dg.layer = LAYER_W'($urandom_range(0, 3));
    in_dg.core  = CORE_W'($urandom);
    in_dg.data  = $urandom;
    eject_gnt = $urandom_range(0, 99) < p_take;
    fwd_gnt   = $urandom_range(0, 99) < p_take;
    #1;
    popped = 0;
    if (model.size() > 0) begin
      check(head_dg == model[0], "head in order");
      check(eject_req == (model[0].layer == 2), "eject request by layer");
      check(fwd_req   == (model[0].layer != 2), "forward request by layer");
      popped = (eject_req && eject_gnt) || (fwd_req && fwd_gnt);
    end else begin
      check(!eject_req && !fwd_req, "no request when empty");
    end
    @(posedge clk);
    if (popped) void'(model.pop_front());
    if (in_valid) begin model.push_back(in_dg); credits--; sent_window++; end
    pops_prev = int'(popped);
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) step(70, 40);
    // Throughput: consumer always ready, sender always willing.
    for (int i = 0; i < 20; i++) step(100, 100);
    sent_window = 0;
    for (int i = 0; i < 100; i++) step(100, 100);
    check(sent_window == 100, "one datagram per cycle at full load");
    $display("sent %0d in 100 cycles", sent_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
