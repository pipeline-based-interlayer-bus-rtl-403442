// tb_nis_bus_sync: timing test of the four-layer bus built with synchronous
// interfaces (all layers on the bus clock), where delays are exact.
// Checks, on an idle bus, that a datagram from layer s to layer d appears at
// the destination |d-s| + 2 cycles after it is handed over, for all twelve
// pairs; that one stream 0 -> 3 sustains one datagram per cycle; and that
// four streams at once (0->1, 1->0, 2->3, 3->2) each sustain one datagram per
// cycle, i.e. all segments carry traffic in both directions concurrently.
// A second bus, built with bi-synchronous interfaces but with every layer on
// the bus clock and in synchronous mode (layer_sync high), gets the same
// inputs; its outputs must match the first bus in every cycle.
module tb_nis_bus_sync;
  import nis_pkg::*;
  localparam int L = 4;
  logic         clk = 0, rst_n = 0;
  logic [L-1:0] inj_valid = '0, inj_ready, ej_valid, ej_ready = '1;
  datagram_t    inj_dg [L];
  datagram_t    ej_dg  [L];
  int checks = 0, failures = 0;
  int cyc = 0;
  int rx_count [L];
  int rx_seq [L][L];

  nis_bus #(.ASYNC(1'b0)) dut (
    .bus_clk(clk), .bus_rst_n(rst_n), .layer_clk({L{clk}}), .layer_rst_n({L{rst_n}}),
    .layer_sync('0),
    .inj_valid, .inj_ready, .inj_dg, .ej_valid, .ej_ready, .ej_dg
  );

  logic [L-1:0] m_inj_ready, m_ej_valid;
  datagram_t    m_ej_dg [L];
  nis_bus #(.ASYNC(1'b1)) dut_m (
    .bus_clk(clk), .bus_rst_n(rst_n), .layer_clk({L{clk}}), .layer_rst_n({L{rst_n}}),
    .layer_sync('1), .inj_valid, .inj_ready(m_inj_ready), .inj_dg,
    .ej_valid(m_ej_valid), .ej_ready, .ej_dg(m_ej_dg)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  // The bi-synchronous build in synchronous mode matches cycle for cycle.
  always @(posedge clk) if (rst_n) begin
    check(m_inj_ready == inj_ready && m_ej_valid == ej_valid, "synchronous mode: same handshakes");
    for (int i = 0; i < L; i++)
      if (ej_valid[i]) check(m_ej_dg[i] == ej_dg[i], "synchronous mode: same data");
  end

  // Receivers always ready: count and check per-source order.
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < L; i++)
      if (ej_valid[i]) begin
        int s;
        s = int'(ej_dg[i].data[31:24]);
        check(ej_dg[i].layer == LAYER_W'(i), "right layer");
        check(int'(ej_dg[i].data[23:0]) == rx_seq[s][i], "in order");
        rx_seq[s][i]++;
        rx_count[i]++;
      end

  int seq [L][L];
  function automatic datagram_t mk(input int s, input int d);
    datagram_t g;
    g.layer = LAYER_W'(d);
    g.core  = CORE_W'(s);
    g.data  = {8'(s), 24'(seq[s][d])};
    seq[s][d]++;
    return g;
  endfunction

  int t0, n;
  initial begin
    for (int s = 0; s < L; s++) begin
      rx_count[s] = 0;
      inj_dg[s] = '0;
      for (int d = 0; d < L; d++) begin seq[s][d] = 0; rx_seq[s][d] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    // Idle latency for every pair.
    for (int s = 0; s < L; s++)
      for (int d = 0; d < L; d++) if (s != d) begin
        @(negedge clk);
        inj_dg[s] = mk(s, d); inj_valid[s] = 1;
        @(posedge clk); #1 t0 = cyc; inj_valid[s] = 0;
        while (!ej_valid[d]) @(posedge clk) #1;
        n = cyc - t0;
        check(n == (d > s ? d - s : s - d) + 2, "idle latency hops+2");
        if (n != (d > s ? d - s : s - d) + 2) $display("latency %0d->%0d = %0d", s, d, n);
        repeat (3) @(posedge clk);
      end
    // One stream 0 -> 3 at full rate.
    for (int i = 0; i < L; i++) rx_count[i] = 0;
    @(negedge clk); inj_valid[0] = 1; inj_dg[0] = mk(0, 3);
    t0 = cyc;
    repeat (200) begin
      @(posedge clk); #1;
      if (inj_ready[0]) inj_dg[0] = mk(0, 3);
    end
    inj_valid[0] = 0;
    repeat (20) @(posedge clk);
    check(rx_count[3] == 200, "single stream: one datagram per cycle");
    $display("single stream delivered %0d in 200 cycles", rx_count[3]);
    // Four concurrent streams.
    for (int i = 0; i < L; i++) rx_count[i] = 0;
    @(negedge clk);
    inj_valid = '1;
    inj_dg[0] = mk(0, 1); inj_dg[1] = mk(1, 0); inj_dg[2] = mk(2, 3); inj_dg[3] = mk(3, 2);
    repeat (200) begin
      @(posedge clk); #1;
      if (inj_ready[0]) inj_dg[0] = mk(0, 1);
      if (inj_ready[1]) inj_dg[1] = mk(1, 0);
      if (inj_ready[2]) inj_dg[2] = mk(2, 3);
      if (inj_ready[3]) inj_dg[3] = mk(3, 2);
    end
    inj_valid = '0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < L; i++) check(rx_count[i] == 200, "concurrent streams at full rate");
    $display("concurrent: %0d %0d %0d %0d", rx_count[0], rx_count[1], rx_count[2], rx_count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
