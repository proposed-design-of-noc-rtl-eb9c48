// deflect_alloc: final output-port assignment of the deflection router.
//
// Flits that the iSLIP scheduler matched keep their productive output. Every
// other flit (one that lost arbitration, or one that arrived here but could not
// be ejected) is deflected: it takes a free output that exists, since a
// bufferless router cannot hold it. Unmatched flits are served in slot order
// and each takes the lowest-numbered free output; this order is this design's
// choice. Because slots are only filled on ports that exist, a free output
// is always found.
// Purely combinational. `sel[j]` names the slot that drives output j when
// `used[j]` is high; `defl[j]` marks an output that carries a deflected flit.
module deflect_alloc #(
  parameter int P = 4,
  localparam int PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [P-1:0]         port_ok,
  input  logic [P-1:0]         in_valid,
  input  logic [P-1:0]         matched,
  input  logic [P-1:0][PW-1:0] mport,    // matched output of each slot
  output logic [P-1:0][PW-1:0] sel,
  output logic [P-1:0]         used,
  output logic [P-1:0]         defl
);
  always_comb begin
    logic done;
    done = 1'b0;
    sel  = '0;
    used = '0;
    defl = '0;
    // productive assignments from the scheduler
    for (int i = 0; i < P; i++)
      if (in_valid[i] && matched[i]) begin
        used[mport[i]] = 1'b1;
        sel[mport[i]]  = PW'(i);
      end
    // deflections into the remaining outputs
    for (int i = 0; i < P; i++)
      if (in_valid[i] && !matched[i]) begin
        done = 1'b0;
        for (int j = 0; j < P; j++)
          if (!done && port_ok[j] && !used[j]) begin
            used[j] = 1'b1;
            defl[j] = 1'b1;
            sel[j]  = PW'(i);
            done    = 1'b1;
          end
      end
  end
endmodule
