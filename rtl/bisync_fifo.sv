// bisync_fifo: bi-synchronous (dual-clock) FIFO between two clock domains.
//
// Lets a layer run from its own clock while the bus runs from another. The
// write side keeps a binary and a Gray-coded write pointer in the write clock
// domain, the read side the same for the read pointer. Each Gray pointer is
// carried into the other domain through a chain of SYNC_STAGES flip-flops, with
// no handshake: consecutive Gray codes differ in one bit, so a pointer sampled
// while it changes is either the old or the new value. The read side compares
// its pointer with the synchronized write pointer to form empty; the write side
// compares with the synchronized read pointer to form full. Pointers have one
// extra bit so that full (same address, wrap bits differ) and empty (pointers
// equal) can be told apart. The Gray-pointer scheme with two synchronizers
// follows the document; pointer width, sync depth and the shown-ahead read are
// this design's choices.
//
// Synchronous mode: the document makes the interface programmable between
// synchronous and asynchronous operation. When sync_mode is high, wclk and
// rclk must be the same clock; the flags are then formed directly from the
// other side's pointer register, with no synchronizer, exactly as in a
// single-clock FIFO. In that mode one side can move past the synchronized copy
// of the other side's pointer, so for SYNC_STAGES+1 clocks after sync_mode
// falls each side reports itself full or empty, until the synchronizers have
// caught up. sync_mode may change at any time while the clocks are the same.
// The bypass mechanism is this design's choice.
//
// Interface: write with winc when wfull is low; read with rinc when rempty is
// low, rdata being the oldest word (shown ahead). With sync_mode low both flags
// are pessimistic: a word written becomes visible to the reader after
// SYNC_STAGES+1 read clocks, a freed slot to the writer after SYNC_STAGES+1
// write clocks. With sync_mode high a word is visible right after the write
// edge. Each side has its own asynchronous active-low reset; both must be
// applied together.
module bisync_fifo #(
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned ADDR_W      = 3,   // depth = 2**ADDR_W
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  input  logic             sync_mode   // 1: wclk and rclk are one clock
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] wbin_next, wgray_next, rbin_next, rgray_next;
  logic [ADDR_W:0] wq [SYNC_STAGES];  // read pointer seen by the write side
  logic [ADDR_W:0] rq [SYNC_STAGES];  // write pointer seen by the read side
  logic            wfull_q, rempty_q;  // flags from the synchronized pointers
  logic [SYNC_STAGES:0] wmode, rmode;  // sync_mode over the last clocks
  logic            wsettle, rsettle;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // Full: top two Gray bits inverted, the rest equal.
  function automatic logic is_full(input logic [ADDR_W:0] w, input logic [ADDR_W:0] r);
    return w == {~r[ADDR_W -: 2], r[ADDR_W-2:0]};
  endfunction

  // Just out of sync mode: block until the synchronized pointers are current.
  assign wsettle = (wmode != '0);
  assign rsettle = (rmode != '0);
  assign wfull   = sync_mode ? is_full(wgray, rgray) : (wfull_q  || wsettle);
  assign rempty  = sync_mode ? (rgray == wgray)      : (rempty_q || rsettle);

  // ---------------- write domain ----------------
  assign wbin_next  = wbin + (ADDR_W+1)'(winc && !wfull);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin    <= '0;
      wgray   <= '0;
      wfull_q <= 1'b0;
      wmode   <= '0;
    end else begin
      wbin    <= wbin_next;
      wgray   <= wgray_next;
      wmode   <= {wmode[SYNC_STAGES-1:0], sync_mode};
      wfull_q <= is_full(wgray_next, wq[SYNC_STAGES-1]);
    end
  end

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[ADDR_W-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) wq[i] <= '0;
    end else begin
      wq[0] <= rgray;
      for (int i = 1; i < SYNC_STAGES; i++) wq[i] <= wq[i-1];
    end
  end

  // ---------------- read domain ----------------
  assign rbin_next  = rbin + (ADDR_W+1)'(rinc && !rempty);
  assign rgray_next = bin2gray(rbin_next);
  assign rdata      = mem[rbin[ADDR_W-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      rempty_q <= 1'b1;
      rmode    <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rgray_next;
      rmode    <= {rmode[SYNC_STAGES-1:0], sync_mode};
      rempty_q <= (rgray_next == rq[SYNC_STAGES-1]);
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) rq[i] <= '0;
    end else begin
      rq[0] <= wgray;
      for (int i = 1; i < SYNC_STAGES; i++) rq[i] <= rq[i-1];
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(winc && wfull));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rinc && rempty));

endmodule
