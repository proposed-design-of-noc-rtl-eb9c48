// eject_unit: first stage of the router pipeline. Of the flits in the
// router's slots this cycle, it takes one whose destination is this router out
// of the network and hands it to the local network interface, so that it
// stops contending for output links.
//
// Up to one flit leaves per cycle (a single eject path, as in the router's
// block diagram). When several flits have arrived, a round-robin arbiter (a
// ppe whose priority is one past the last winner) picks one; the others are
// deflected and come back later. The choice of round-robin is this design's
// own; the document only says arrived flits must be ejected.
// Combinational from slots to outputs; the round-robin pointer moves at the
// clock edge after an ejection. Synchronous active-high reset.
module eject_unit
  import noc_pkg::*;
#(
  parameter int P = NUM_DIRS,
  localparam int PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic   clk,
  input  logic   rst,
  input  coord_t here_x,
  input  coord_t here_y,
  input  flit_t  slot_in  [P],
  output flit_t  slot_out [P],   // the ejected slot is emptied
  output flit_t  ej_flit,        // valid bit set when a flit leaves
  output logic [P-1:0] arrived   // per slot: destination is here (before ejection)
);
  logic [PW-1:0] ptr;
  logic [P-1:0]  gnt;
  logic [PW-1:0] gnt_idx;
  logic          any;

  always_comb
    for (int i = 0; i < P; i++)
      arrived[i] = slot_in[i].valid && slot_in[i].dst_x == here_x && slot_in[i].dst_y == here_y;

  ppe #(.N(P)) u_arb (.req(arrived), .prio(ptr), .gnt(gnt), .gnt_idx(gnt_idx), .any(any));

  always_comb begin
    ej_flit = FLIT_NONE;
    for (int i = 0; i < P; i++) begin
      slot_out[i] = slot_in[i];
      if (gnt[i]) begin
        ej_flit     = slot_in[i];
        slot_out[i] = FLIT_NONE;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      ptr <= '0;
    else if (any) ptr <= PW'((int'(gnt_idx) + 1) % P);
  end
endmodule
