// tb_transfer_stage: self-checking test of a transfer stage (layer 1 of 4).
// Models surround the stage: a lower and an upper neighbour that send with
// credits and absorb at random while returning credits, a host injection queue
// and an ejection queue that is full at random. Each datagram carries its
// source (core field) and a per-source sequence number (data field), and every
// output is checked against per-source, per-output expected queues: the
// datagram must leave on the right side (eject when addressed to layer 1, up
// when above, down when below) and in order. Directed checks: a datagram
// written into a pipeline leaves on the far segment in the next cycle, and an
// idle injection reaches its segment one cycle after it is taken. Both pipelines asking for ejection at once, and output ports
// merging forwarded with injected traffic, must each happen.
module tb_transfer_stage;
  import nis_pkg::*;
  localparam int ME = 1;
  logic clk = 0, rst_n = 0;
  logic lo_rx_valid = 0, lo_rx_credit, lo_tx_valid, lo_tx_credit = 0;
  logic hi_rx_valid = 0, hi_rx_credit, hi_tx_valid, hi_tx_credit = 0;
  datagram_t lo_rx_dg = '0, lo_tx_dg, hi_rx_dg = '0, hi_tx_dg;
  logic inj_empty, inj_pop, ej_push, ej_full = 0;
  datagram_t inj_dg, ej_dg;
  int checks = 0, failures = 0;

  transfer_stage #(.LAYER_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sources: 0 = lower neighbour, 1 = upper neighbour, 2 = host.
  // Outputs: 0 = down segment, 1 = up segment, 2 = ejection.
  datagram_t expq [3][3][$];
  int seq [3];
  datagram_t hostq[$];
  int lo_cred = PIPE_DEPTH, hi_cred = PIPE_DEPTH;
  int lo_fill = 0, hi_fill = 0;   // receivers' buffers of the neighbours
  int p_send = 0, p_inj = 0, p_absorb = 100, p_ejfull = 0;
  int n_ej_conflict = 0, n_merge = 0, n_stall = 0, received = 0;

  assign inj_empty = (hostq.size() == 0);
  assign inj_dg    = inj_empty ? '0 : hostq[0];

  function automatic int out_of(input datagram_t d);
    return (int'(d.layer) == ME) ? 2 : (int'(d.layer) > ME) ? 1 : 0;
  endfunction

  function automatic datagram_t make(input int src, input int layer);
    datagram_t d;
    d.layer = LAYER_W'(layer);
    d.core  = CORE_W'(src);
    d.data  = 32'(seq[src]);
    seq[src]++;
    return d;
  endfunction

  task automatic take(input int out, input datagram_t d);
    int src = int'(d.core);
    received++;
    check(src < 3 && expq[src][out].size() > 0, "unexpected datagram on output");
    if (src < 3 && expq[src][out].size() > 0) begin
      check(d == expq[src][out][0], "order per source and output");
      void'(expq[src][out].pop_front());
    end
  endtask

  // Drive at the falling edge, observe at the rising edge.
  always @(negedge clk) if (rst_n && p_send > 0) begin
    lo_rx_valid = (lo_cred > 0) && ($urandom_range(0, 99) < p_send);
    if (lo_rx_valid) lo_rx_dg = make(0, $urandom_range(1, 3));
    hi_rx_valid = (hi_cred > 0) && ($urandom_range(0, 99) < p_send);
    if (hi_rx_valid) hi_rx_dg = make(1, $urandom_range(0, 1));
    if ($urandom_range(0, 99) < p_inj && hostq.size() < 4) begin
      int l;
      l = $urandom_range(0, 2);
      hostq.push_back(make(2, l == 1 ? 3 : l));
    end
    ej_full = $urandom_range(0, 99) < p_ejfull;
  end

  always @(posedge clk) if (rst_n) begin
    bit lo_abs, hi_abs;
    if (lo_rx_valid) begin lo_cred--; expq[0][out_of(lo_rx_dg)].push_back(lo_rx_dg); end
    if (hi_rx_valid) begin hi_cred--; expq[1][out_of(hi_rx_dg)].push_back(hi_rx_dg); end
    if (lo_rx_credit) lo_cred++;
    if (hi_rx_credit) hi_cred++;
    if (inj_pop) begin
      expq[2][out_of(hostq[0])].push_back(hostq[0]);
      void'(hostq.pop_front());
    end
    if (lo_tx_valid) take(0, lo_tx_dg);
    if (hi_tx_valid) take(1, hi_tx_dg);
    if (ej_push) begin check(!ej_full, "no push into full ejection queue"); take(2, ej_dg); end
    // neighbours absorb and return credits
    lo_abs = (lo_fill + int'(lo_tx_valid) > 0) && ($urandom_range(0, 99) < p_absorb);
    hi_abs = (hi_fill + int'(hi_tx_valid) > 0) && ($urandom_range(0, 99) < p_absorb);
    lo_fill = lo_fill + int'(lo_tx_valid) - int'(lo_abs);
    hi_fill = hi_fill + int'(hi_tx_valid) - int'(hi_abs);
    check(lo_fill <= PIPE_DEPTH && hi_fill <= PIPE_DEPTH, "neighbour buffers not overrun");
    lo_tx_credit <= lo_abs;
    hi_tx_credit <= hi_abs;
    if (dut.up_ej_req && dut.dn_ej_req) n_ej_conflict++;
    if ((dut.up_fwd_req && !dut.iu_empty) || (dut.dn_fwd_req && !dut.id_empty)) n_merge++;
    if (dut.hi_stall || dut.lo_stall) n_stall++;
  end

  time t0;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Directed: a datagram written into the up pipeline at one edge is on the
    // upper segment in the very next cycle.
    @(negedge clk); lo_rx_valid = 1; lo_rx_dg = make(0, 3);
    check(!hi_tx_valid, "upper segment idle before");
    @(posedge clk); #1 lo_rx_valid = 0;
    check(hi_tx_valid && hi_tx_dg.data == 32'(seq[0] - 1), "one-cycle pass-through");
    // Directed: an injected datagram moves into its direction FIFO at one edge
    // and is on the lower segment in the next cycle.
    @(negedge clk); hostq.push_back(make(2, 0));
    check(!lo_tx_valid, "lower segment idle before");
    @(posedge clk); #1;
    check(lo_tx_valid && lo_tx_dg.core == 4'd2, "one-cycle injection");
    repeat (4) @(posedge clk);
    // Random traffic with back-pressure.
    p_send = 60; p_inj = 50; p_absorb = 50; p_ejfull = 30;
    repeat (4000) @(posedge clk);
    // Saturation: everything flows, neighbours slow.
    p_send = 100; p_inj = 100; p_absorb = 30; p_ejfull = 60;
    repeat (2000) @(posedge clk);
    p_send = 0; p_inj = 0; p_absorb = 100; p_ejfull = 0;
    @(negedge clk); lo_rx_valid = 0; hi_rx_valid = 0; ej_full = 0;
    repeat (100) @(posedge clk);
    for (int s = 0; s < 3; s++)
      for (int o = 0; o < 3; o++)
        check(expq[s][o].size() == 0, "every datagram delivered");
    check(n_ej_conflict > 0, "both pipelines asked to eject at once");
    check(n_merge > 0, "forwarded and injected traffic competed");
    check(n_stall > 0, "an output waited for a credit");
    $display("received %0d ej_conflict %0d merge %0d stall %0d", received, n_ej_conflict, n_merge, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
