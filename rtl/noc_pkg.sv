// noc_pkg: flit format and port numbering of the mesh network-on-chip.
//
// A packet is a head flit followed by payload flits; the last flit carries
// tail (a head flit with tail set is a packet without payload). Every flit
// belongs to one of two traffic classes, guaranteed throughput (GT) or best
// effort (BE), which travel in separate virtual channels. The head flit's
// data holds the destination and source coordinates:
//   [15:12] destination x, [11:8] destination y, [7:4] source x, [3:0] source y
// The two traffic classes follow the source architecture; the flit layout,
// the 16-bit payload and the port numbering are this design's choices.
package noc_pkg;

  localparam int FW = 16;          // payload bits per flit

  typedef enum logic {BE = 1'b0, GT = 1'b1} tclass_t;

  typedef struct packed {
    tclass_t        cls;
    logic           head;
    logic           tail;
    logic [FW-1:0]  data;
  } flit_t;

  // Router ports.
  localparam int P_LOCAL = 0;
  localparam int P_NORTH = 1;   // towards y - 1
  localparam int P_EAST  = 2;   // towards x + 1
  localparam int P_SOUTH = 3;   // towards y + 1
  localparam int P_WEST  = 4;   // towards x - 1
  localparam int N_PORTS = 5;

  function automatic logic [15:0] head_data(logic [3:0] dx, logic [3:0] dy,
                                            logic [3:0] sx, logic [3:0] sy);
    return {dx, dy, sx, sy};
  endfunction

endpackage
