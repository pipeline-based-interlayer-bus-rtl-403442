// nis_interface_env: test environment for one nis_interface instance, used by
// tb_nis_interface for both the bi-synchronous and the synchronous build.
// The layer side pushes numbered datagrams and drains at random, the bus side
// does the same; both directions are compared in order with queue models, and
// the delay from an injection on an idle interface to the bus seeing it is
// measured against the expected value (1 bus cycle synchronous, at most
// SYNC_STAGES+1 = 3 bus cycles bi-synchronous). With ONE_CLOCK set, the
// bi-synchronous build runs both sides from the bus clock: the latency probe is
// made in synchronous mode (sync_mode high, visible next cycle), and the
// random traffic then switches sync_mode on and off at random. 'done' rises
// when finished.
module nis_interface_env
  import nis_pkg::*;
#(
  parameter bit ASYNC = 1'b1,
  parameter bit ONE_CLOCK = 1'b0,
  parameter int LPER  = 7,
  parameter int BPER  = 5
) (
  output int checks,
  output int failures,
  output bit done
);
  logic lclk_free = 0, bus_clk = 0, layer_rst_n = 0, bus_rst_n = 0;
  logic inj_valid = 0, inj_ready, ej_valid, ej_ready = 0;
  datagram_t inj_dg = '0, ej_dg, bus_inj_dg, bus_ej_dg = '0;
  logic bus_inj_empty, bus_inj_pop = 0, bus_ej_push = 0, bus_ej_full;
  logic sync_mode = ONE_CLOCK;
  int   n_mode_changes = 0;

  // The layer side runs on its own clock only in the bi-synchronous build
  // without ONE_CLOCK; otherwise on the bus clock.
  wire lclk = (ASYNC && !ONE_CLOCK) ? lclk_free : bus_clk;

  nis_interface #(.ASYNC(ASYNC)) dut (.layer_clk(lclk), .*);

  always #(BPER) bus_clk = ~bus_clk;
  if (ASYNC && !ONE_CLOCK) begin : g_lclk
    always #(LPER) lclk_free = ~lclk_free;
  end

  // One clock: switch the mode now and then, half a cycle before the flags
  // are sampled.
  if (ONE_CLOCK) begin : g_mode
    always @(posedge bus_clk) if (run && $urandom_range(0, 29) == 0) begin
      #2 sync_mode = !sync_mode;
      n_mode_changes++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL[ASYNC=%0d] %s at %0t", ASYNC, what, $time); end
  endtask

  datagram_t up_q[$], dn_q[$];
  int up_sent = 0, dn_sent = 0, up_got = 0, dn_got = 0;
  bit run = 0, ended = 0;
  localparam int N = 1500;

  // layer side: inject and drain
  always @(negedge lclk) if (run) begin
    inj_valid = (up_sent < N) && ($urandom_range(0, 99) < 60);
    inj_dg    = '{layer: 2'($urandom), core: 4'($urandom), data: 32'(up_sent)};
    ej_ready  = $urandom_range(0, 99) < 60;
  end else if (ended) begin
    inj_valid = 0; ej_ready = 0;
  end
  always @(posedge lclk) if (run) begin
    if (inj_valid && inj_ready) begin up_q.push_back(inj_dg); up_sent++; end
    if (ej_valid && ej_ready) begin
      check(dn_q.size() > 0 && ej_dg == dn_q[0], "bus-to-layer order");
      void'(dn_q.pop_front()); dn_got++;
    end
  end
  // bus side: drain and push
  always @(negedge bus_clk) if (run) begin
    bus_inj_pop = !bus_inj_empty && ($urandom_range(0, 99) < 60);
    bus_ej_push = !bus_ej_full && (dn_sent < N) && ($urandom_range(0, 99) < 60);
    bus_ej_dg   = '{layer: 2'($urandom), core: 4'($urandom), data: 32'(dn_sent)};
  end else if (ended) begin
    bus_inj_pop = 0; bus_ej_push = 0;
  end
  always @(posedge bus_clk) if (run) begin
    if (bus_inj_pop) begin
      check(up_q.size() > 0 && bus_inj_dg == up_q[0], "layer-to-bus order");
      void'(up_q.pop_front()); up_got++;
    end
    if (bus_ej_push) begin dn_q.push_back(bus_ej_dg); dn_sent++; end
  end

  initial begin
    int t0, n;
    checks = 0; failures = 0; done = 0;
    repeat (3) @(posedge bus_clk);
    layer_rst_n = 1; bus_rst_n = 1;
    repeat (3) @(posedge bus_clk);
    check(bus_inj_empty && !ej_valid && inj_ready && !bus_ej_full, "idle after reset");
    // latency of an injection on an idle interface
    @(negedge lclk); inj_valid = 1; inj_dg = '{layer: 2'd2, core: 4'd5, data: 32'hCAFE};
    @(posedge lclk); #1 inj_valid = 0;
    n = 0;
    while (bus_inj_empty && n < 10) begin @(posedge bus_clk); #1 n++; end
    if (ASYNC && !ONE_CLOCK) check(n >= 1 && n <= 3, "bi-synchronous injection latency");
    else check(n == 0, "synchronous injection visible next cycle");
    check(bus_inj_dg.data == 32'hCAFE, "latency probe data");
    @(negedge bus_clk); bus_inj_pop = 1; @(posedge bus_clk); #1 bus_inj_pop = 0;
    run = 1;
    wait (up_got == N && dn_got == N);
    run = 0; ended = 1;
    check(up_q.size() == 0 && dn_q.size() == 0, "all delivered");
    if (ONE_CLOCK) check(n_mode_changes >= 20, "mode switched during traffic");
    done = 1;
  end
endmodule
