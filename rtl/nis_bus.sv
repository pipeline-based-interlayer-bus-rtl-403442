// nis_bus: pipelined interlayer bus for a stack of LAYERS chip layers.
//
// This is the vertical connection of one pillar of a 3D stacked mesh: instead
// of a single shared bus with a central arbiter, where only one transfer can
// be under way, the vertical wires are cut into segments by one transfer stage
// per layer. Each segment is a pair of point-to-point links, one up and one
// down, with credit-based flow control, and all segments work at once. A layer
// reaches the bus through its interface (nis_interface) and never waits for a
// bus grant: it drops a datagram into its injection queue, and the transfer
// stage merges it into the proper direction by round robin with passing
// traffic. Each datagram carries its destination layer, which every transfer
// stage checks to either forward the datagram or eject it to its layer.
//
// Clocking: the transfer stages and segments run on bus_clk. With ASYNC = 1
// every layer has its own clock (layer_clk[i]) and its interface crosses
// between that clock and bus_clk with bi-synchronous FIFOs; with ASYNC = 0 all
// layers run on bus_clk and layer_clk is unused. In the ASYNC = 1 build each
// layer's interface can also be switched to synchronous operation at run time
// with layer_sync[i], for a layer whose clock is bus_clk: its queues then skip
// the synchronizers and the layer sees the latency of the ASYNC = 0 build.
//
// Ports per layer i: inj_valid/inj_ready/inj_dg to send a datagram (its layer
// field must name another layer), ej_valid/ej_ready/ej_dg to receive one; both
// in the layer's clock domain. Resets are asynchronous and active low; assert
// bus_rst_n and all layer_rst_n together.
//
// Latency, bus clock: one cycle per segment crossed plus the interface queues
// and the direction FIFO, so in synchronous operation a datagram from layer s to
// layer d takes |d-s| + 2 clock edges from the one that takes inj_valid to the
// one after which ej_valid is high, when the bus is idle. Each segment carries
// one datagram per cycle in each direction, all segments at once.
// Default LAYERS = 4 and a 32-bit payload follow the document's 3x3x4 system;
// the per-layer clocks as a parameterised choice and the queue depths are this
// design's own.
module nis_bus
  import nis_pkg::*;
#(
  parameter int unsigned LAYERS       = 4,
  parameter bit          ASYNC        = 1'b1,
  parameter int unsigned FIFO_ADDR_W  = 3,
  parameter int unsigned INJ_DEPTH    = 2,
  parameter prio_e       PRIO         = PRIO_ROUND_ROBIN
) (
  input  logic                  bus_clk,
  input  logic                  bus_rst_n,
  input  logic [LAYERS-1:0]     layer_clk,
  input  logic [LAYERS-1:0]     layer_rst_n,
  input  logic [LAYERS-1:0]     layer_sync,
  input  logic [LAYERS-1:0]     inj_valid,
  output logic [LAYERS-1:0]     inj_ready,
  input  datagram_t             inj_dg [LAYERS],
  output logic [LAYERS-1:0]     ej_valid,
  input  logic [LAYERS-1:0]     ej_ready,
  output datagram_t             ej_dg  [LAYERS]
);

  // The layer field must be able to name every layer.
  if (LAYERS < 2 || LAYERS > (1 << LAYER_W)) begin : g_bad_layers
    $error("nis_bus: LAYERS must be between 2 and %0d", 1 << LAYER_W);
  end

  // Segment k joins stage k (below) and stage k+1 (above), k = 0..LAYERS-2.
  // Index LAYERS-1 / the -1 ends are the open ends of the bus.
  logic      up_valid  [LAYERS];  // stage i -> stage i+1
  datagram_t up_dg     [LAYERS];
  logic      up_credit [LAYERS];  // stage i+1 -> stage i, credits for up link
  logic      dn_valid  [LAYERS];  // stage i -> stage i-1
  datagram_t dn_dg     [LAYERS];
  logic      dn_credit [LAYERS];  // stage i-1 -> stage i, credits for down link

  for (genvar i = 0; i < LAYERS; i++) begin : g_layer
    logic      inj_empty, inj_pop, ej_push, ej_full;
    datagram_t inj_q_dg, ej_q_dg;

    logic      lo_rx_valid, hi_rx_valid, lo_tx_credit, hi_tx_credit;
    datagram_t lo_rx_dg, hi_rx_dg;
    logic      lo_rx_credit, hi_rx_credit;

    if (i == 0) begin : g_bottom
      assign lo_rx_valid  = 1'b0;
      assign lo_rx_dg     = '0;
      assign lo_tx_credit = 1'b0;
    end else begin : g_lower
      assign lo_rx_valid  = up_valid[i-1];
      assign lo_rx_dg     = up_dg[i-1];
      assign lo_tx_credit = dn_credit[i];
    end
    if (i == LAYERS - 1) begin : g_top
      assign hi_rx_valid  = 1'b0;
      assign hi_rx_dg     = '0;
      assign hi_tx_credit = 1'b0;
    end else begin : g_upper
      assign hi_rx_valid  = dn_valid[i+1];
      assign hi_rx_dg     = dn_dg[i+1];
      assign hi_tx_credit = up_credit[i];
    end

    // Credits this stage returns go to the neighbour that sent the data.
    if (i > 0)          begin : g_cr_lo assign up_credit[i-1] = lo_rx_credit; end
    if (i < LAYERS - 1) begin : g_cr_hi assign dn_credit[i+1] = hi_rx_credit; end

    transfer_stage #(.LAYER_ID(i), .INJ_DEPTH(INJ_DEPTH), .PRIO(PRIO)) u_ts (
      .clk         (bus_clk),
      .rst_n       (bus_rst_n),
      .lo_rx_valid (lo_rx_valid),
      .lo_rx_dg    (lo_rx_dg),
      .lo_rx_credit(lo_rx_credit),
      .lo_tx_valid (dn_valid[i]),
      .lo_tx_dg    (dn_dg[i]),
      .lo_tx_credit(lo_tx_credit),
      .hi_rx_valid (hi_rx_valid),
      .hi_rx_dg    (hi_rx_dg),
      .hi_rx_credit(hi_rx_credit),
      .hi_tx_valid (up_valid[i]),
      .hi_tx_dg    (up_dg[i]),
      .hi_tx_credit(hi_tx_credit),
      .inj_empty   (inj_empty),
      .inj_dg      (inj_q_dg),
      .inj_pop     (inj_pop),
      .ej_push     (ej_push),
      .ej_dg       (ej_q_dg),
      .ej_full     (ej_full)
    );

    nis_interface #(.ASYNC(ASYNC), .ADDR_W(FIFO_ADDR_W)) u_if (
      .layer_clk    (layer_clk[i]),
      .layer_rst_n  (layer_rst_n[i]),
      .sync_mode    (layer_sync[i]),
      .inj_valid    (inj_valid[i]),
      .inj_ready    (inj_ready[i]),
      .inj_dg       (inj_dg[i]),
      .ej_valid     (ej_valid[i]),
      .ej_ready     (ej_ready[i]),
      .ej_dg        (ej_dg[i]),
      .bus_clk      (bus_clk),
      .bus_rst_n    (bus_rst_n),
      .bus_inj_empty(inj_empty),
      .bus_inj_dg   (inj_q_dg),
      .bus_inj_pop  (inj_pop),
      .bus_ej_push  (ej_push),
      .bus_ej_dg    (ej_q_dg),
      .bus_ej_full  (ej_full)
    );
  end

  // The open ends carry nothing back.
  assign up_credit[LAYERS-1] = 1'b0;
  assign dn_credit[0]        = 1'b0;

endmodule
