// tb_nis_bus: end-to-end test of the four-layer pipelined interlayer bus at its
// default parameters (bi-synchronous interfaces). Layers 1 to 3 each run on
// their own clock; layer 0 runs on the bus clock, so its interface may be
// switched between asynchronous and synchronous operation (layer_sync[0]).
//
// Every layer has a traffic source and a sink. Sources send datagrams to other
// layers in four phases: uniform random destinations, "local" traffic (70% to
// an adjacent layer, 30% uniform to the rest), a hot spot (every layer sending
// to layer 0, as a processor writing to a memory stack), and saturation. Sinks
// accept at random, so ejection queues fill and back-pressure runs down the
// bus. Each datagram carries its source and a per-pair sequence number; every
// delivery is checked against a per (source, destination) queue for the right
// layer, the right content and the right order, and at the end every datagram
// must have arrived. An idle-bus probe checks that the delay from layer 0 to
// layer 3 stays within the pipeline delay plus the clock-crossing allowance;
// a second probe in synchronous mode must be at least one bus cycle faster.
// During traffic layer_sync[0] is switched on and off at random.
//
// The test counts how often each mechanism of the bus happened and fails for
// any that never did: forwarding through a stage, ejection, injection split to
// each direction, both pipelines of a stage asking to eject in the same cycle,
// forwarded and injected traffic competing for a segment, a sender waiting for
// a credit, a full ejection queue, a full injection queue, several segments
// busy in the same cycle, one segment busy in both directions at once, a switch
// of the interface mode, and traffic through an interface in synchronous mode.
module tb_nis_bus;
  import nis_pkg::*;
  localparam int L = 4;
  localparam int BUS_HALF = 5;
  localparam int LAYER_HALF [L] = '{5, 6, 4, 7};

  logic            bus_clk = 0, bus_rst_n = 0;
  logic [L-1:0]    lclk_free = '0, layer_rst_n = '0, layer_sync = '0;
  wire  [L-1:0]    layer_clk = {lclk_free[L-1:1], bus_clk};
  logic [L-1:0]    inj_valid = '0, inj_ready, ej_valid, ej_ready = '0;
  datagram_t       inj_dg [L];
  datagram_t       ej_dg  [L];

  nis_bus dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #(BUS_HALF) bus_clk = ~bus_clk;

  initial begin
    #3000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traffic ----------------
  typedef enum int {IDLE, UNIFORM, LOCAL, HOTSPOT, SATURATE} phase_e;
  phase_e phase = IDLE;
  bit probe = 0;
  int p_inj = 0, p_ej = 100;
  datagram_t expq [L][L][$];     // [src][dst]
  int seqn [L][L];
  int sent = 0, got = 0;

  function automatic int pick_dst(input int src);
    int d;
    case (phase)
      HOTSPOT: if (src != 0) return 0;
      LOCAL: if ($urandom_range(0, 99) < 70) begin
               if (src == 0)          return 1;
               else if (src == L - 1) return L - 2;
               else                   return ($urandom_range(0, 1) != 0) ? src + 1 : src - 1;
             end
      default: ;
    endcase
    do d = $urandom_range(0, L - 1); while (d == src);
    return d;
  endfunction

  for (genvar i = 0; i < L; i++) begin : g_env
    if (i > 0) begin : g_clk
      always #(LAYER_HALF[i]) lclk_free[i] = ~lclk_free[i];
    end

    // source
    always @(negedge layer_clk[i]) begin
      if (!probe && !(inj_valid[i] && !inj_ready[i])) begin   // hold an offer until taken
        inj_valid[i] = (phase != IDLE) && ($urandom_range(0, 99) < p_inj);
        if (inj_valid[i]) begin
          int d;
          d = pick_dst(i);
          inj_dg[i].layer = LAYER_W'(d);
          inj_dg[i].core  = CORE_W'($urandom_range(0, 8));
          inj_dg[i].data  = {8'(i), 24'(seqn[i][d])};
        end
      end
      ej_ready[i] = $urandom_range(0, 99) < p_ej;
    end
    always @(posedge layer_clk[i]) begin
      if (inj_valid[i] && inj_ready[i]) begin
        int d;
        d = int'(inj_dg[i].layer);
        expq[i][d].push_back(inj_dg[i]);
        seqn[i][d]++;
        sent++;
      end
      if (layer_rst_n[i] && ej_valid[i] && ej_ready[i]) begin
        int s;
        s = int'(ej_dg[i].data[31:24]);
        got++;
        check(ej_dg[i].layer == LAYER_W'(i), "delivered to its destination layer");
        check(s < L && expq[s][i].size() > 0, "delivery was expected");
        if (s < L && expq[s][i].size() > 0) begin
          check(ej_dg[i] == expq[s][i][0], "content and order per source");
          void'(expq[s][i].pop_front());
        end
      end
    end
  end

  // ---------------- mechanism counters (bus clock) ----------------
  int n_fwd = 0, n_eject = 0, n_inj_up = 0, n_inj_dn = 0, n_ej_conflict = 0;
  int n_merge = 0, n_credit_stall = 0, n_ej_full = 0, n_inj_full = 0;
  int n_parallel = 0, n_bidir = 0, n_mode_sw = 0, n_sync_xfer = 0;
  logic [L-1:0] c_fwd, c_ej, c_iu, c_id, c_conf, c_merge, c_stall, c_ejf, c_up, c_dn;

  for (genvar i = 0; i < L; i++) begin : g_probe
    assign c_fwd[i]   = (dut.g_layer[i].u_ts.up_fwd_req && dut.g_layer[i].u_ts.up_fwd_gnt && i > 0) ||
                        (dut.g_layer[i].u_ts.dn_fwd_req && dut.g_layer[i].u_ts.dn_fwd_gnt && i < L - 1);
    assign c_ej[i]    = dut.g_layer[i].u_ts.ej_push;
    assign c_iu[i]    = dut.g_layer[i].u_ts.iu_push;
    assign c_id[i]    = dut.g_layer[i].u_ts.id_push;
    assign c_conf[i]  = dut.g_layer[i].u_ts.up_ej_req && dut.g_layer[i].u_ts.dn_ej_req;
    assign c_merge[i] = (dut.g_layer[i].u_ts.up_fwd_req && !dut.g_layer[i].u_ts.iu_empty) ||
                        (dut.g_layer[i].u_ts.dn_fwd_req && !dut.g_layer[i].u_ts.id_empty);
    assign c_stall[i] = dut.g_layer[i].u_ts.hi_stall || dut.g_layer[i].u_ts.lo_stall;
    assign c_ejf[i]   = dut.g_layer[i].u_ts.ej_full &&
                        (dut.g_layer[i].u_ts.up_ej_req || dut.g_layer[i].u_ts.dn_ej_req);
    assign c_up[i]    = dut.up_valid[i];
    assign c_dn[i]    = dut.dn_valid[i];
  end

  always @(posedge bus_clk) if (bus_rst_n) begin
    int busy;
    n_fwd          += $countones(c_fwd);
    n_eject        += $countones(c_ej);
    n_inj_up       += $countones(c_iu);
    n_inj_dn       += $countones(c_id);
    n_ej_conflict  += $countones(c_conf);
    n_merge        += $countones(c_merge);
    n_credit_stall += $countones(c_stall);
    n_ej_full      += $countones(c_ejf);
    busy = $countones(c_up[L-2:0]) + $countones(c_dn[L-1:1]);
    if (busy >= 2) n_parallel++;
    for (int k = 0; k < L - 1; k++) if (c_up[k] && c_dn[k+1]) n_bidir++;
  end
  // Mode switches of layer 0, a little after the clock edge.
  always @(posedge bus_clk) if (phase != IDLE && $urandom_range(0, 149) == 0) begin
    #2 layer_sync[0] = !layer_sync[0];
    n_mode_sw++;
  end
  always @(posedge bus_clk)
    if (layer_sync[0] && ((inj_valid[0] && inj_ready[0]) || (ej_valid[0] && ej_ready[0])))
      n_sync_xfer++;
  for (genvar i = 0; i < L; i++) begin : g_injfull
    always @(posedge layer_clk[i]) if (inj_valid[i] && !inj_ready[i]) n_inj_full++;
  end

  // ---------------- sequence ----------------
  task automatic run_phase(input phase_e p, input int pi, input int pe, input int cycles);
    phase = p; p_inj = pi; p_ej = pe;
    repeat (cycles) @(posedge bus_clk);
  endtask

  time t0, t_async;
  int lat;
  initial begin
    for (int s = 0; s < L; s++) for (int d = 0; d < L; d++) seqn[s][d] = 0;
    for (int i = 0; i < L; i++) inj_dg[i] = '0;
    repeat (4) @(posedge bus_clk);
    bus_rst_n = 1; layer_rst_n = '1;
    repeat (10) @(posedge bus_clk);
    // Idle probe: layer 0 to layer 3 (three hops).
    probe = 1;
    @(negedge layer_clk[0]);
    inj_dg[0] = '{layer: 2'd3, core: 4'd4, data: {8'd0, 24'(seqn[0][3])}};
    inj_valid[0] = 1;
    @(posedge layer_clk[0]); t0 = $time;
    #1 inj_valid[0] = 0;
    for (int k = 0; k < 200 && !ej_valid[3]; k++) @(posedge bus_clk);
    lat = int'(($time - t0) / (2 * BUS_HALF));
    // 1 bus cycle per hop plus 2, plus up to three cycles of the reading
    // clock per clock crossing (slowest layer clock: 14 time units).
    check(lat >= 3 + 2 && ($time - t0) <= (3 + 2) * 2 * BUS_HALF + 2 * 3 * 14,
          "idle latency layer 0 to 3");
    $display("idle latency 0->3: %0d bus cycles", lat);
    t_async = $time - t0;
    repeat (20) @(posedge bus_clk);
    // The same in synchronous mode: layer 0 on the bus clock skips the
    // injection synchronizers (three bus cycles).
    @(negedge bus_clk); layer_sync[0] = 1;
    repeat (2) @(negedge bus_clk);
    inj_dg[0] = '{layer: 2'd3, core: 4'd4, data: {8'd0, 24'(seqn[0][3])}};
    inj_valid[0] = 1;
    @(posedge bus_clk); t0 = $time;
    #1 inj_valid[0] = 0;
    for (int k = 0; k < 200 && !(ej_valid[3] && ej_dg[3].data[23:0] == 24'(seqn[0][3] - 1)); k++)
      @(posedge bus_clk);
    $display("idle latency 0->3, synchronous mode at layer 0: %0d bus cycles",
             int'(($time - t0) / (2 * BUS_HALF)));
    check(($time - t0) >= (3 + 2) * 2 * BUS_HALF && ($time - t0) + 2 * BUS_HALF <= t_async,
          "synchronous mode is faster by at least one bus cycle");
    repeat (20) @(posedge bus_clk);
    layer_sync[0] = 0;
    probe = 0;
    run_phase(UNIFORM,  40, 80, 3000);
    run_phase(LOCAL,    40, 80, 3000);
    run_phase(HOTSPOT,  60, 60, 3000);
    run_phase(SATURATE, 100, 30, 3000);
    phase = IDLE; p_ej = 100;
    repeat (400) @(posedge bus_clk);
    for (int s = 0; s < L; s++)
      for (int d = 0; d < L; d++)
        check(expq[s][d].size() == 0, "every datagram delivered");
    check(sent == got && sent > 1000, "sent equals received");
    check(n_fwd > 0,          "forwarding through a stage happened");
    check(n_eject > 0,        "ejection happened");
    check(n_inj_up > 0,       "upward injection happened");
    check(n_inj_dn > 0,       "downward injection happened");
    check(n_ej_conflict > 0,  "both pipelines asked to eject at once");
    check(n_merge > 0,        "forwarded and injected traffic competed");
    check(n_credit_stall > 0, "a sender waited for a credit");
    check(n_ej_full > 0,      "an ejection queue was full");
    check(n_inj_full > 0,     "an injection queue was full");
    check(n_parallel > 0,     "several segments busy in one cycle");
    check(n_bidir > 0,        "a segment busy in both directions");
    check(n_mode_sw > 0,      "the interface mode was switched");
    check(n_sync_xfer > 0,    "traffic passed an interface in synchronous mode");
    $display("sent %0d got %0d fwd %0d eject %0d inj_up %0d inj_dn %0d ej_conflict %0d merge %0d credit_stall %0d ej_full %0d inj_full %0d parallel %0d bidir %0d mode_sw %0d sync_xfer %0d",
             sent, got, n_fwd, n_eject, n_inj_up, n_inj_dn, n_ej_conflict, n_merge,
             n_credit_stall, n_ej_full, n_inj_full, n_parallel, n_bidir, n_mode_sw, n_sync_xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
