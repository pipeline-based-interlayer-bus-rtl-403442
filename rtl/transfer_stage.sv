// transfer_stage: the per-layer node of the pipelined interlayer bus.
//
// A transfer stage sits between the bus segment to the layer below ("lo") and
// the segment to the layer above ("hi"), and connects to its own layer through
// the interface's two host-port queues. It does three things:
//   1. Forwards: two identical pipelines (ts_pipeline), one per direction,
//      buffer datagrams arriving from a neighbour and pass those not meant for
//      this layer on to the other neighbour.
//   2. Ejects: a datagram whose destination layer is LAYER_ID leaves its
//      pipeline into the interface's ejection queue. Both pipelines may want to
//      eject in the same cycle, so a round-robin arbiter lets one through.
//   3. Injects: datagrams from the layer are sorted by destination layer into
//      two injection FIFOs, "up" (higher layer address) and "down" (lower), and
//      each competes with forwarded traffic for its segment (ts_output_port,
//      round robin unless PRIO selects a fixed priority), which is credit
//      controlled.
// Datagrams flow in both directions at once and every segment of the bus can
// carry one datagram per cycle in each direction; no global grant exists.
//
// Interface: the lo_*/hi_* segment ports carry a valid, a datagram and a credit
// pulse running the other way. Receive (rx) ports take data from the neighbour
// and return credits to it; transmit (tx) ports send data and take credits.
// An unused end of the bus (bottom or top stage) ties rx_valid and tx_credit low.
// The host side reads the injection queue (show-ahead, inj_empty/inj_pop) and
// writes the ejection queue (ej_push when ej_full is low).
//
// Latency: a datagram written into a receive buffer at one clock edge can leave
// on the next segment in the following cycle, so each stage crossed costs one
// cycle. Following the document: the three-register pipelines,
// split injection FIFOs, round-robin merging and ejection arbitration, credits.
// This design's choices: the depth of the injection FIFOs and a datagram
// addressed to its own layer being an error (it belongs to the layer's router).
module transfer_stage
  import nis_pkg::*;
#(
  parameter int unsigned LAYER_ID  = 0,
  parameter int unsigned INJ_DEPTH = 2,
  parameter prio_e       PRIO      = PRIO_ROUND_ROBIN
) (
  input  logic      clk,
  input  logic      rst_n,
  // segment to the layer below
  input  logic      lo_rx_valid,
  input  datagram_t lo_rx_dg,
  output logic      lo_rx_credit,
  output logic      lo_tx_valid,
  output datagram_t lo_tx_dg,
  input  logic      lo_tx_credit,
  // segment to the layer above
  input  logic      hi_rx_valid,
  input  datagram_t hi_rx_dg,
  output logic      hi_rx_credit,
  output logic      hi_tx_valid,
  output datagram_t hi_tx_dg,
  input  logic      hi_tx_credit,
  // host port: injection queue (read side)
  input  logic      inj_empty,
  input  datagram_t inj_dg,
  output logic      inj_pop,
  // host port: ejection queue (write side)
  output logic      ej_push,
  output datagram_t ej_dg,
  input  logic      ej_full
);

  // ---------------- pipelines ----------------
  datagram_t up_head, dn_head;
  logic      up_ej_req, up_ej_gnt, up_fwd_req, up_fwd_gnt;
  logic      dn_ej_req, dn_ej_gnt, dn_fwd_req, dn_fwd_gnt;

  // Up pipeline: from the layer below towards the layer above.
  ts_pipeline #(.LAYER_ID(LAYER_ID)) u_pipe_up (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (lo_rx_valid),
    .in_dg     (lo_rx_dg),
    .credit_out(lo_rx_credit),
    .head_dg   (up_head),
    .eject_req (up_ej_req),
    .eject_gnt (up_ej_gnt),
    .fwd_req   (up_fwd_req),
    .fwd_gnt   (up_fwd_gnt)
  );

  // Down pipeline: from the layer above towards the layer below.
  ts_pipeline #(.LAYER_ID(LAYER_ID)) u_pipe_dn (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hi_rx_valid),
    .in_dg     (hi_rx_dg),
    .credit_out(hi_rx_credit),
    .head_dg   (dn_head),
    .eject_req (dn_ej_req),
    .eject_gnt (dn_ej_gnt),
    .fwd_req   (dn_fwd_req),
    .fwd_gnt   (dn_fwd_gnt)
  );

  // ---------------- ejection arbitration ----------------
  logic [1:0] ej_req, ej_gnt;

  assign ej_req = {dn_ej_req, up_ej_req} & {2{!ej_full}};

  rr_arbiter #(.N(2)) u_ej_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (ej_req),
    .advance(1'b1),
    .grant  (ej_gnt)
  );

  assign up_ej_gnt = ej_gnt[0];
  assign dn_ej_gnt = ej_gnt[1];
  assign ej_push   = |ej_gnt;
  assign ej_dg     = ej_gnt[1] ? dn_head : up_head;

  // ---------------- injection split ----------------
  logic      go_up;
  logic      iu_full, iu_empty, id_full, id_empty;
  logic      iu_pop, id_pop, iu_push, id_push;
  datagram_t iu_dg, id_dg;

  // Bit k of ABOVE is set when layer k lies above this one.
  localparam logic [(1 << LAYER_W)-1:0] ABOVE = ~((2 << LAYER_ID) - 1);

  assign go_up   = ABOVE[inj_dg.layer];
  assign iu_push = !inj_empty &&  go_up && !iu_full;
  assign id_push = !inj_empty && !go_up && !id_full;
  assign inj_pop = iu_push || id_push;

  sync_fifo #(.WIDTH(DG_W), .DEPTH(INJ_DEPTH)) u_inj_up (
    .clk(clk), .rst_n(rst_n),
    .wr_en(iu_push), .wr_data(inj_dg), .full(iu_full),
    .rd_en(iu_pop), .rd_data(iu_dg), .empty(iu_empty), .count()
  );

  sync_fifo #(.WIDTH(DG_W), .DEPTH(INJ_DEPTH)) u_inj_dn (
    .clk(clk), .rst_n(rst_n),
    .wr_en(id_push), .wr_data(inj_dg), .full(id_full),
    .rd_en(id_pop), .rd_data(id_dg), .empty(id_empty), .count()
  );

  // ---------------- output segments ----------------
  logic hi_stall, lo_stall;

  ts_output_port #(.PRIO(PRIO)) u_out_hi (
    .clk         (clk),
    .rst_n       (rst_n),
    .fwd_req     (up_fwd_req),
    .fwd_dg      (up_head),
    .fwd_gnt     (up_fwd_gnt),
    .inj_req     (!iu_empty),
    .inj_dg      (iu_dg),
    .inj_gnt     (iu_pop),
    .out_valid   (hi_tx_valid),
    .out_dg      (hi_tx_dg),
    .credit_in   (hi_tx_credit),
    .credit_stall(hi_stall)
  );

  ts_output_port #(.PRIO(PRIO)) u_out_lo (
    .clk         (clk),
    .rst_n       (rst_n),
    .fwd_req     (dn_fwd_req),
    .fwd_dg      (dn_head),
    .fwd_gnt     (dn_fwd_gnt),
    .inj_req     (!id_empty),
    .inj_dg      (id_dg),
    .inj_gnt     (id_pop),
    .out_valid   (lo_tx_valid),
    .out_dg      (lo_tx_dg),
    .credit_in   (lo_tx_credit),
    .credit_stall(lo_stall)
  );

  // A datagram for this layer never enters the bus from this layer.
  a_no_self_inject: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(!inj_empty && inj_dg.layer == LAYER_W'(LAYER_ID)));

endmodule
