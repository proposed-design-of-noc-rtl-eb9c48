// crossbar: N-input, M-output flit switch. Output j carries the flit of input
// sel[j] when en[j] is high and an empty flit otherwise. One multiplexer per
// output; any input may feed several outputs, the allocator makes sure it
// does not. Purely combinational. The document names the crossbar as a
// router part; the multiplexer form is this design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int N = NUM_DIRS,
  parameter int M = NUM_DIRS,
  localparam int NW = (N > 1) ? $clog2(N) : 1
) (
  input  flit_t               in_flit  [N],
  input  logic [M-1:0][NW-1:0] sel,
  input  logic [M-1:0]        en,
  output flit_t               out_flit [M]
);
  always_comb
    for (int j = 0; j < M; j++)
      out_flit[j] = en[j] ? in_flit[sel[j]] : FLIT_NONE;
endmodule
