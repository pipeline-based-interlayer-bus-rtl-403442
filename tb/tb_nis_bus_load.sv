// tb_nis_bus_load: load sweep of the four-layer bus, synchronous build.
//
// Runs the two traffic patterns the bus is meant for, uniform (every other
// layer equally likely) and local (70% to an adjacent layer, 30% to the
// others), at offered loads of 0.1 to 0.4 datagrams per layer per cycle
// (0.4 being near the saturation point of the whole network). Each layer
// generates datagrams by a Bernoulli process into an unbounded source queue
// and offers the head to the bus; receivers are always ready. Latency is
// counted from generation to delivery, so it includes waiting at the source.
// Checks: everything generated is delivered to the right layer in order;
// below saturation the bus accepts the whole offered load; the average
// latency at the lowest load stays close to the idle-bus value. On an idle bus
// a datagram takes 1 cycle per hop + 2, plus one cycle from generation to
// hand-over and one to count the delivery; uniform traffic over four layers
// averages 20/12 hops, so about 5.7 cycles, and local traffic a little over
// 5. Average latencies are printed for each point.
module tb_nis_bus_load;
  import nis_pkg::*;
  localparam int L = 4;
  localparam int CYCLES = 3000;
  logic         clk = 0, rst_n = 0;
  logic [L-1:0] inj_valid, inj_ready, ej_valid;
  datagram_t    inj_dg [L];
  datagram_t    ej_dg  [L];
  int checks = 0, failures = 0;
  int cyc = 0;

  nis_bus #(.ASYNC(1'b0)) dut (
    .bus_clk(clk), .bus_rst_n(rst_n), .layer_clk({L{clk}}), .layer_rst_n({L{rst_n}}),
    .layer_sync('0),
    .inj_valid, .inj_ready, .inj_dg, .ej_valid, .ej_ready('1), .ej_dg
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // Payload: [31:30] source layer, [29:0] generation cycle.
  datagram_t srcq [L][$];
  int nxt [L][L];
  int rate_pm = 0;     // offered load, per mille
  bit local_mode = 0;
  bit gen_on = 0;
  int generated = 0, delivered = 0;
  longint lat_sum = 0;
  int order_bad = 0;

  for (genvar i = 0; i < L; i++) begin : g_src
    assign inj_valid[i] = srcq[i].size() > 0;
    assign inj_dg[i]    = srcq[i].size() > 0 ? srcq[i][0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < L; i++) begin
      if (inj_valid[i] && inj_ready[i]) void'(srcq[i].pop_front());
      if (ej_valid[i]) begin
        int s, g;
        s = int'(ej_dg[i].data[31:30]);
        g = int'(ej_dg[i].data[29:0]);
        if (ej_dg[i].layer != LAYER_W'(i) || g < nxt[s][i]) order_bad++;
        nxt[s][i] = g;
        lat_sum += longint'(cyc) - longint'(g);
        delivered++;
      end
      if (gen_on && $urandom_range(0, 999) < rate_pm) begin
        int d;
        if (local_mode && $urandom_range(0, 99) < 70)
          d = (i == 0) ? 1 : (i == L - 1) ? L - 2 : (($urandom_range(0, 1) != 0) ? i + 1 : i - 1);
        else
          do d = $urandom_range(0, L - 1); while (d == i);
        srcq[i].push_back('{layer: LAYER_W'(d), core: CORE_W'(i), data: {2'(i), 30'(cyc)}});
        generated++;
      end
    end
  end

  task automatic run_point(input bit lm, input int r, output real avg);
    int left;
    generated = 0; delivered = 0; lat_sum = 0;
    local_mode = lm; rate_pm = r; gen_on = 1;
    repeat (CYCLES) @(posedge clk);
    gen_on = 0;
    left = 0;
    for (int i = 0; i < L; i++) left += srcq[i].size();
    check(left < 40, "bus keeps up with the offered load");
    repeat (500) @(posedge clk);
    check(delivered == generated && generated > 0, "all generated datagrams delivered");
    avg = real'(lat_sum) / real'(delivered);
    $display("%s load %0.2f: %0d datagrams, average latency %0.2f cycles",
             lm ? "local  " : "uniform", r / 1000.0, delivered, avg);
  endtask

  initial begin
    real avg;
    for (int s = 0; s < L; s++) for (int d = 0; d < L; d++) nxt[s][d] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    for (int m = 0; m < 2; m++)
      for (int r = 100; r <= 400; r += 100) begin
        run_point(m[0], r, avg);
        if (r == 100) check(avg < (m == 0 ? 6.3 : 5.8), "low-load latency near idle value");
        check(avg < 20.0, "latency bounded below saturation");
      end
    check(order_bad == 0, "delivery order and destination");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
