// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// A packet is a single flit (deflection routing moves flits independently, so
// every flit carries its own destination). A flit holds a valid bit, the
// destination and source mesh coordinates and a data word. Router ports are
// numbered North, East, South, West; the local port is reached through the
// separate eject and inject paths of the router, not through a link.
// Coordinates: x grows to the East, y grows to the North.
// The field widths are this design's choice; the document fixes none.
package noc_pkg;

  localparam int COORD_W  = 4;   // up to a 16 x 16 mesh
  localparam int DATA_W   = 32;  // payload bits per flit
  localparam int NUM_DIRS = 4;   // network ports of a mesh router

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic              valid;
    coord_t            dst_x;
    coord_t            dst_y;
    coord_t            src_x;
    coord_t            src_y;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  localparam flit_t FLIT_NONE = '0;

endpackage
