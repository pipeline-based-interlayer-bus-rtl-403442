// tb_ts_output_port: self-checking test of a transfer-stage output segment.
// Two sources (forwarded and injected) are offered to the port; a receiver
// model with a three-entry buffer drains at random and returns one credit per
// freed entry. Checks: each source's datagrams arrive in order, the receiver
// never holds more than three, a datagram is driven in the cycle of its grant,
// with both sources busy the grants alternate, and with no credits returned
// exactly three datagrams leave and credit_stall is raised. Two more ports,
// built with fixed priority for injected or forwarded data, must always grant
// the favoured source while both request and credits flow back.
module tb_ts_output_port;
  import nis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fwd_req = 0, inj_req = 0, fwd_gnt, inj_gnt;
  datagram_t fwd_dg, inj_dg, out_dg;
  logic out_valid, credit_in = 0, credit_stall;
  int checks = 0, failures = 0;
  int fwd_seq = 0, inj_seq = 0, fwd_exp = 0, inj_exp = 0;
  int rx_fill = 0;
  int last_src = -1, alternations = 0, pairs = 0;
  bit pend_credit = 0;

  ts_output_port dut (.*);

  // Fixed-priority builds, both sources always requesting, credits returned
  // one cycle after each send.
  logic pi_fg, pi_ig, pi_v, pi_c = 0, pf_fg, pf_ig, pf_v, pf_c = 0;
  datagram_t pi_dg, pf_dg;
  ts_output_port #(.PRIO(PRIO_INJECT)) dut_pi (
    .clk, .rst_n, .fwd_req(1'b1), .fwd_dg('0), .fwd_gnt(pi_fg), .inj_req(1'b1), .inj_dg('0),
    .inj_gnt(pi_ig), .out_valid(pi_v), .out_dg(pi_dg), .credit_in(pi_c), .credit_stall());
  ts_output_port #(.PRIO(PRIO_FORWARD)) dut_pf (
    .clk, .rst_n, .fwd_req(1'b1), .fwd_dg('0), .fwd_gnt(pf_fg), .inj_req(1'b1), .inj_dg('0),
    .inj_gnt(pf_ig), .out_valid(pf_v), .out_dg(pf_dg), .credit_in(pf_c), .credit_stall());
  int n_pi = 0, n_pf = 0;
  always @(posedge clk) if (rst_n) begin
    pi_c <= pi_v;
    pf_c <= pf_v;
    if (pi_fg || pi_ig) begin check(pi_ig && !pi_fg, "inject-first grants injection"); n_pi++; end
    if (pf_fg || pf_ig) begin check(pf_fg && !pf_ig, "forward-first grants forwarding"); n_pf++; end
  end

  // Sources: data field = sequence number, core field = source id.
  assign fwd_dg = '{layer: 2'd3, core: 4'd0, data: 32'(fwd_seq)};
  assign inj_dg = '{layer: 2'd3, core: 4'd1, data: 32'(inj_seq)};

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #300000; failures++;
    $display("watchdog expired");
    check(n_pi > 1000 && n_pf > 1000, "fixed-priority ports sent every cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver: count arrivals, check order, drain at random, return credits.
  int p_drain = 50;
  always @(posedge clk) if (rst_n) begin
    bit drain;
    check(out_valid == (fwd_gnt || inj_gnt), "output driven in the cycle of the grant");
    if (out_valid) begin
      if (out_dg.core == 0) begin check(out_dg.data == 32'(fwd_exp), "forward order"); fwd_exp++; end
      else                  begin check(out_dg.data == 32'(inj_exp), "inject order");  inj_exp++; end
    end
    drain = (rx_fill + (out_valid ? 1 : 0) > 0) && ($urandom_range(0, 99) < p_drain);
    rx_fill = rx_fill + (out_valid ? 1 : 0) - (drain ? 1 : 0);
    check(rx_fill <= PIPE_DEPTH, "receiver never overfilled");
    credit_in <= drain;
    if (fwd_gnt) fwd_seq <= fwd_seq + 1;
    if (inj_gnt) inj_seq <= inj_seq + 1;
    if (fwd_gnt || inj_gnt) begin
      if (fwd_req && inj_req && last_src >= 0) begin
        pairs++;
        if ((fwd_gnt ? 0 : 1) != last_src) alternations++;
      end
      last_src <= fwd_gnt ? 0 : 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // No credits come back: exactly three datagrams leave.
    p_drain = 0;
    fwd_req = 1; inj_req = 1;
    repeat (10) @(posedge clk);
    #1 check(fwd_seq + inj_seq == PIPE_DEPTH, "only three sends without credits");
    check(credit_stall, "credit stall visible");
    // Free drain, both sources busy: alternation.
    p_drain = 100;
    repeat (200) @(posedge clk);
    #1 check(pairs > 100 && alternations == pairs, "strict alternation under load");
    $display("pairs %0d alternations %0d", pairs, alternations);
    // Random load.
    p_drain = 40;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      fwd_req = $urandom_range(0, 1) != 0; inj_req = $urandom_range(0, 1) != 0;
    end
    @(negedge clk); fwd_req = 0; inj_req = 0;
    repeat (10) @(posedge clk);
    #1 check(fwd_exp == fwd_seq && inj_exp == inj_seq, "everything granted was delivered");
    check(n_pi > 1000 && n_pf > 1000, "fixed-priority ports sent every cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
