// rr_arbiter: round-robin arbiter for N requesters.
//
// Grants one of the active requests, searching from the requester after the
// one granted last, so that under continuous requests every requester is
// served in turn (with two requesters: strict alternation). The grant is
// combinational from req; the priority pointer moves only in a cycle where
// 'advance' is high, i.e. when the granted request was actually accepted
// downstream, so a blocked grant keeps its place. Round robin is the fairness
// scheme the document uses in the transfer stage; the pointer-update rule is
// this design's choice. Reset (asynchronous, active low) gives requester 0
// first priority.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] last;   // index granted most recently
  logic [IDX_W-1:0] win;
  logic             any;

  // Requester 'idx' wins when it requests and none of the requesters
  // between the last winner and it does.
  always_comb begin
    logic [IDX_W-1:0] idx;
    grant = '0;
    win   = last;
    any   = 1'b0;
    idx   = last;
    for (int k = 0; k < N; k++) begin
      idx = (idx == IDX_W'(N - 1)) ? '0 : idx + 1'b1;
      if (!any && req[idx]) begin
        any        = 1'b1;
        win        = idx;
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            last <= IDX_W'(N - 1);
    else if (advance && any) last <= win;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
