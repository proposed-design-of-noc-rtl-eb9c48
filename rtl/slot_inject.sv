// slot_inject: puts one flit into a free pipeline slot of the router.
//
// A deflection router may only take in a new flit when a slot is empty,
// because every flit in the router must leave on some output next cycle. The
// router uses this unit twice, in the order of its block diagram: first to
// re-inject the head of the side buffer, then to inject a flit from the local
// network interface. The flit goes into the lowest-numbered empty slot whose
// port exists (`port_ok`; a router on the mesh edge has fewer links), so the
// number of flits never exceeds the number of usable outputs. The lowest-
// index rule is this design's choice.
// Purely combinational: `accepted` tells the source that its flit was taken.
module slot_inject
  import noc_pkg::*;
#(
  parameter int P = NUM_DIRS
) (
  input  logic [P-1:0] port_ok,
  input  flit_t        slot_in  [P],
  input  flit_t        in_flit,       // candidate flit, valid bit = request
  output flit_t        slot_out [P],
  output logic         accepted
);
  always_comb begin
    accepted = 1'b0;
    for (int i = 0; i < P; i++) begin
      slot_out[i] = slot_in[i];
      if (in_flit.valid && !accepted && port_ok[i] && !slot_in[i].valid) begin
        slot_out[i] = in_flit;
        accepted    = 1'b1;
      end
    end
  end
endmodule
