// buffer_eject: takes up to one deflected flit per cycle off the router's
// outputs and sends it into the side buffer, where it waits to be re-injected
// instead of hopping away from its destination.
//
// A flit is a candidate when its output was given by deflection and its
// destination is not this router (an arrived flit that could not be ejected
// is left to come back over a link, so that it cannot circle between the
// side buffer and the pipeline of the same router). When the side buffer is
// full nothing is taken and the flits stay deflected. Among several candidates
// a round-robin arbiter (ppe) picks one. The one-per-cycle rule follows the
// document's block diagram; the round-robin choice and the arrived-flit rule
// are this design's.
// Combinational from outputs to `push`; the pointer moves at the clock edge
// after a capture. Synchronous active-high reset.
module buffer_eject
  import noc_pkg::*;
#(
  parameter int P = NUM_DIRS,
  localparam int PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  coord_t       here_x,
  input  coord_t       here_y,
  input  flit_t        out_in  [P],
  input  logic [P-1:0] defl,
  input  logic         buf_full,
  output flit_t        out_out [P],   // outputs after the capture
  output logic         push,
  output flit_t        push_flit
);
  logic [P-1:0]  cand, gnt;
  logic [PW-1:0] ptr, gnt_idx;
  logic          any;

  always_comb
    for (int j = 0; j < P; j++)
      cand[j] = out_in[j].valid && defl[j] && !buf_full &&
                !(out_in[j].dst_x == here_x && out_in[j].dst_y == here_y);

  ppe #(.N(P)) u_arb (.req(cand), .prio(ptr), .gnt(gnt), .gnt_idx(gnt_idx), .any(any));

  always_comb begin
    push      = any;
    push_flit = FLIT_NONE;
    for (int j = 0; j < P; j++) begin
      out_out[j] = out_in[j];
      if (gnt[j]) begin
        push_flit  = out_in[j];
        out_out[j] = FLIT_NONE;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      ptr <= '0;
    else if (any) ptr <= PW'((int'(gnt_idx) + 1) % P);
  end
endmodule
