// ts_pipeline: one direction of a transfer stage.
//
// Datagrams arriving on a bus segment from the neighbouring transfer stage are
// held in a receive buffer of PIPE_DEPTH registers (three, as in the document).
// The datagram at the head is examined: if its destination layer is this
// stage's layer (LAYER_ID) it asks to be ejected to the layer's interface
// (eject_req), otherwise it asks to be forwarded to the next stage in the same
// direction (fwd_req). Whichever grant arrives pops the head. Every pop returns
// one credit to the upstream stage, registered, so the sender may never have
// more datagrams in flight than the buffer holds (credit-based flow control).
//
// Timing: a datagram on in_valid is written at the clock edge and is at the
// head one cycle later; credit_out pulses for one cycle in the cycle after each
// pop. The credit round trip (send and write, pop, credit back) takes two
// cycles, which the three entries cover with one to spare, so a segment can
// carry one datagram per cycle.
// The credit encoding (one pulse per freed entry) is this design's choice.
module ts_pipeline
  import nis_pkg::*;
#(
  parameter int unsigned LAYER_ID = 0,
  parameter int unsigned DEPTH    = PIPE_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  // incoming segment
  input  logic      in_valid,
  input  datagram_t in_dg,
  output logic      credit_out,
  // head of the pipeline
  output datagram_t head_dg,
  output logic      eject_req,
  input  logic      eject_gnt,
  output logic      fwd_req,
  input  logic      fwd_gnt
);

  logic empty, full, pop;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(DG_W), .DEPTH(DEPTH)) u_buf (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (in_valid),
    .wr_data(in_dg),
    .full   (full),
    .rd_en  (pop),
    .rd_data(head_dg),
    .empty  (empty),
    .count  (count)
  );

  logic for_me;
  assign for_me    = (head_dg.layer == LAYER_W'(LAYER_ID));
  assign eject_req = !empty &&  for_me;
  assign fwd_req   = !empty && !for_me;
  assign pop       = (eject_req && eject_gnt) || (fwd_req && fwd_gnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= 1'b0;
    else        credit_out <= pop;
  end

  // The upstream stage must never send without a credit, so a datagram never
  // meets a full buffer (a credit comes back only after its entry is free).
  a_credit_respected: assert property (@(posedge clk) disable iff (!rst_n)
                                       !(in_valid && full));

endmodule
