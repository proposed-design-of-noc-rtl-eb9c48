// xy_route: dimension-ordered (XY) route computation for a 2D mesh.
//
// A flit first travels along x until it reaches the destination column, then
// along y to the destination row; a flit whose destination is this router has
// arrived and needs no output port. XY routing as such follows the document;
// the port numbering (x grows East, y grows North) is this design's choice.
// Combinational; the router's own coordinates are inputs so that one module
// serves every router of the mesh.
module xy_route
  import noc_pkg::*;
(
  input  coord_t here_x,
  input  coord_t here_y,
  input  coord_t dst_x,
  input  coord_t dst_y,
  output dir_e   dir,      // productive output port, meaningless when arrived
  output logic   arrived   // destination is this router
);
  always_comb begin
    arrived = 1'b0;
    dir     = DIR_N;
    if (dst_x > here_x)      dir = DIR_E;
    else if (dst_x < here_x) dir = DIR_W;
    else if (dst_y > here_y) dir = DIR_N;
    else if (dst_y < here_y) dir = DIR_S;
    else                     arrived = 1'b1;
  end
endmodule
