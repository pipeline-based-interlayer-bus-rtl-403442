// nis_pkg: shared types and constants of the pipelined interlayer bus.
//
// A datagram is the unit that moves along the bus. Each one carries its own
// header: the destination layer address, examined by every transfer stage, and
// the destination core address inside that layer, passed through untouched for
// the layer's router. The bus moves header and payload as one wide word per
// cycle, since through-silicon vias are short and cheap in width.
//
// The layer count (4) and the 32-bit payload follow the 3x3x4 configuration the
// design is sized for; the 4-bit core field covers the 9 cores of a 3x3 layer.
// Carrying the header beside the payload rather than in a separate head flit is
// this design's own choice.
package nis_pkg;

  localparam int unsigned LAYER_W = 2;   // layer address bits (up to 4 layers)
  localparam int unsigned CORE_W  = 4;   // core address bits (3x3 = 9 cores)
  localparam int unsigned DATA_W  = 32;  // payload bits (one 32-bit flit)

  typedef logic [LAYER_W-1:0] layer_addr_t;
  typedef logic [CORE_W-1:0]  core_addr_t;

  typedef struct packed {
    layer_addr_t        layer;  // destination layer
    core_addr_t         core;   // destination core within that layer
    logic [DATA_W-1:0]  data;   // payload
  } datagram_t;

  localparam int unsigned DG_W = $bits(datagram_t);

  // Receive-buffer depth of a transfer-stage pipeline (three registers), which
  // is also the number of credits a sender starts with on each segment.
  localparam int unsigned PIPE_DEPTH = 3;

  // How a transfer-stage output chooses between forwarded and injected data.
  // Round robin is the default; the two fixed priorities are the alternatives
  // the scheme allows (local data first, or passing data first).
  typedef enum logic [1:0] {
    PRIO_ROUND_ROBIN = 2'd0,
    PRIO_INJECT      = 2'd1,
    PRIO_FORWARD     = 2'd2
  } prio_e;

endpackage
