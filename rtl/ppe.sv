// ppe: programmable priority encoder, the arbitration element of the iSLIP
// scheduler.
//
// Of the N request bits it grants the first one found when searching upward
// (with wrap-around) from the position given on the extra priority port
// `prio`. Driving `prio` with "one past the last winner" gives a round-robin
// arbiter in which the requester just served has the lowest priority.
// The document names the PPE and its extra priority port; the binary
// encoding of the priority and the search loop are this design's choices.
// Purely combinational: grant is valid in the same cycle as the request.
module ppe #(
  parameter int N  = 4,
  localparam int PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [PW-1:0] prio,   // position with the highest priority
  output logic [N-1:0]  gnt,    // one-hot grant, zero when no request
  output logic [PW-1:0] gnt_idx,
  output logic          any
);
  // Requests at or above the priority position win over those below it;
  // within each group the lowest position wins.
  logic [N-1:0] upper, pick;
  logic         upper_any;

  always_comb begin
    for (int i = 0; i < N; i++) upper[i] = req[i] && (i >= int'(prio));
    upper_any = |upper;
    pick      = upper_any ? upper : req;
    gnt       = '0;
    gnt_idx   = '0;
    for (int i = N - 1; i >= 0; i--)
      if (pick[i]) begin
        gnt      = '0;
        gnt[i]   = 1'b1;
        gnt_idx  = PW'(i);
      end
    any = |req;
  end
endmodule
