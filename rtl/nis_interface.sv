// nis_interface: adapter between a layer's router and its transfer stage.
//
// Holds the two host-port queues of the layer: the injection queue (router to
// bus) and the ejection queue (bus to router). When ASYNC is 1 the layer runs
// from its own clock, and both queues are bi-synchronous FIFOs (Gray-coded
// pointers, two-flop synchronizers) that carry datagrams between the layer
// clock and the bus clock. When ASYNC is 0 the layer shares the bus clock and
// the queues are plain single-clock FIFOs; layer_clk and layer_rst_n are then
// unused. This choice between a synchronous and a bi-synchronous interface
// follows the document; making it a build-time parameter, and the queue depth
// (2**ADDR_W, eight entries by default), are this design's choices. In the
// bi-synchronous build the interface is also programmable at run time: with
// sync_mode high (allowed only when layer_clk is bus_clk) the queues skip their
// pointer synchronizers and behave as single-clock FIFOs. sync_mode is unused
// in the synchronous build.
//
// Router side (layer clock): valid/ready handshakes. A datagram is taken on
// inj_valid && inj_ready; one is delivered on ej_valid && ej_ready, ej_dg being
// valid whenever ej_valid is high. Bus side (bus clock): the transfer stage
// reads the injection queue (bus_inj_empty, bus_inj_dg, bus_inj_pop) and writes
// the ejection queue (bus_ej_push, bus_ej_dg, bus_ej_full).
// Latency through a queue: the word is visible right after the write edge in
// the synchronous build or with sync_mode high, and up to three edges of the
// reading clock after the write otherwise.
module nis_interface
  import nis_pkg::*;
#(
  parameter bit          ASYNC  = 1'b1,
  parameter int unsigned ADDR_W = 3
) (
  // layer side
  input  logic      layer_clk,
  input  logic      layer_rst_n,
  input  logic      sync_mode,
  input  logic      inj_valid,
  output logic      inj_ready,
  input  datagram_t inj_dg,
  output logic      ej_valid,
  input  logic      ej_ready,
  output datagram_t ej_dg,
  // bus side
  input  logic      bus_clk,
  input  logic      bus_rst_n,
  output logic      bus_inj_empty,
  output datagram_t bus_inj_dg,
  input  logic      bus_inj_pop,
  input  logic      bus_ej_push,
  input  datagram_t bus_ej_dg,
  output logic      bus_ej_full
);

  logic inj_full, ej_empty;

  assign inj_ready = !inj_full;
  assign ej_valid  = !ej_empty;

  if (ASYNC) begin : g_async
    bisync_fifo #(.WIDTH(DG_W), .ADDR_W(ADDR_W)) u_inj_q (
      .wclk(layer_clk), .wrst_n(layer_rst_n),
      .winc(inj_valid && inj_ready), .wdata(inj_dg), .wfull(inj_full),
      .rclk(bus_clk), .rrst_n(bus_rst_n),
      .rinc(bus_inj_pop), .rdata(bus_inj_dg), .rempty(bus_inj_empty),
      .sync_mode(sync_mode)
    );
    bisync_fifo #(.WIDTH(DG_W), .ADDR_W(ADDR_W)) u_ej_q (
      .wclk(bus_clk), .wrst_n(bus_rst_n),
      .winc(bus_ej_push), .wdata(bus_ej_dg), .wfull(bus_ej_full),
      .rclk(layer_clk), .rrst_n(layer_rst_n),
      .rinc(ej_valid && ej_ready), .rdata(ej_dg), .rempty(ej_empty),
      .sync_mode(sync_mode)
    );
  end else begin : g_sync
    sync_fifo #(.WIDTH(DG_W), .DEPTH(1 << ADDR_W)) u_inj_q (
      .clk(bus_clk), .rst_n(bus_rst_n),
      .wr_en(inj_valid && inj_ready), .wr_data(inj_dg), .full(inj_full),
      .rd_en(bus_inj_pop), .rd_data(bus_inj_dg), .empty(bus_inj_empty), .count()
    );
    sync_fifo #(.WIDTH(DG_W), .DEPTH(1 << ADDR_W)) u_ej_q (
      .clk(bus_clk), .rst_n(bus_rst_n),
      .wr_en(bus_ej_push), .wr_data(bus_ej_dg), .full(bus_ej_full),
      .rd_en(ej_valid && ej_ready), .rd_data(ej_dg), .empty(ej_empty), .count()
    );
  end

endmodule
