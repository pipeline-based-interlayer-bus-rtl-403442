// ts_output_port: one outgoing bus segment of a transfer stage.
//
// Two sources compete for the segment: datagrams forwarded by the pipeline of
// this direction, and datagrams injected by the local layer (from the
// direction's injection FIFO). By default (PRIO = PRIO_ROUND_ROBIN) a
// round-robin arbiter picks between them, so under continuous traffic from
// both the segment alternates equally, as the document describes; PRIO_INJECT
// and PRIO_FORWARD give the local or the passing traffic fixed priority, the
// other schemes the document allows. A datagram is sent only while a credit is available;
// the port starts with CREDITS credits (the receiver's buffer depth), spends
// one per datagram and regains one per credit_in pulse.
//
// Timing: the port has no register of its own. A granted datagram is popped
// from its source and driven onto out_valid / out_dg in the same cycle, and the
// receiver writes it at the clock edge that ends that cycle; the three
// registers of the receiving pipeline are the only storage on a segment, as in
// the document. A credit returned in a cycle can be spent in that cycle, so a
// credit comes back two cycles after it was spent and three credits keep the
// segment busy every cycle. The credit counter width and same-cycle reuse are
// this design's choices.
module ts_output_port
  import nis_pkg::*;
#(
  parameter int unsigned CREDITS = PIPE_DEPTH,
  parameter prio_e       PRIO    = PRIO_ROUND_ROBIN
) (
  input  logic      clk,
  input  logic      rst_n,
  // forwarded traffic
  input  logic      fwd_req,
  input  datagram_t fwd_dg,
  output logic      fwd_gnt,
  // injected traffic
  input  logic      inj_req,
  input  datagram_t inj_dg,
  output logic      inj_gnt,
  // outgoing segment (combinational from the granted source)
  output logic      out_valid,
  output datagram_t out_dg,
  input  logic      credit_in,
  // observation: a request waited only because no credit was left
  output logic      credit_stall
);

  localparam int unsigned CNT_W = $clog2(CREDITS + 1);

  logic [CNT_W-1:0] credits;
  logic             can_send, send;
  logic [1:0]       req, grant, rr_grant;

  assign can_send = (credits != '0) || credit_in;
  assign req      = {inj_req, fwd_req} & {2{can_send}};

  rr_arbiter #(.N(2)) u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (req),
    .advance(1'b1),
    .grant  (rr_grant)
  );

  always_comb begin
    unique case (PRIO)
      PRIO_INJECT:  grant = req[1] ? 2'b10 : req;
      PRIO_FORWARD: grant = req[0] ? 2'b01 : req;
      default:      grant = rr_grant;
    endcase
  end

  assign fwd_gnt      = grant[0];
  assign inj_gnt      = grant[1];
  assign send         = |grant;
  assign credit_stall = (fwd_req || inj_req) && !can_send;

  assign out_valid = send;
  assign out_dg    = grant[0] ? fwd_dg : inj_dg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits <= CNT_W'(CREDITS);
    else        credits <= credits + CNT_W'(credit_in) - CNT_W'(send);
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits <= CNT_W'(CREDITS));

endmodule
