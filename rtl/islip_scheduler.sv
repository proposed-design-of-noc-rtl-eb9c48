// islip_scheduler: iSLIP matching of N inputs to M outputs.
//
// Each iteration has three steps. Request: every input still unmatched asks
// for every output it has a flit for. Grant: every output still unmatched
// grants one of the requests, the first at or after its grant pointer.
// Accept: every input still unmatched accepts one of its grants, the first at
// or after its accept pointer. The arbiters are programmable priority encoders
// (ppe) whose extra priority port is driven by these pointers. Only grants
// accepted in the first iteration move the pointers, to one beyond the
// partner: a grant pointer then gives the just-served input the lowest
// priority, which is what makes iSLIP starvation free and desynchronises the
// output arbiters.
// The document asks for an iSLIP scheduler built from PPEs with round-robin
// priority; the number of iterations (ITER, default 1) is this design's
// choice. With the router's single request per input one iteration already
// yields a maximal match.
// Timing: the match is combinational from `req`; pointers update at the
// clock edge when `update` is high. Synchronous active-high reset sets all
// pointers to 0.
module islip_scheduler #(
  parameter int N    = 4,
  parameter int M    = 4,
  parameter int ITER = 1,
  localparam int NW = (N > 1) ? $clog2(N) : 1,
  localparam int MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                update,
  input  logic [N-1:0][M-1:0] req,      // req[i][j]: input i wants output j
  output logic [N-1:0][M-1:0] match,    // one-hot rows and columns
  output logic [N-1:0]        in_matched,
  output logic [N-1:0][MW-1:0] in_port  // output given to input i
);
  logic [M-1:0][NW-1:0] gptr;  // grant pointer per output
  logic [N-1:0][MW-1:0] aptr;  // accept pointer per input

  // first-iteration results, for the pointer update
  logic [M-1:0][NW-1:0] g1_idx;
  logic [N-1:0][MW-1:0] a1_idx;
  logic [N-1:0][M-1:0]  acc1;

  for (genvar it = 0; it < ITER; it++) begin : g_iter
    logic [N-1:0]         in_f, in_nx;     // inputs unmatched before / after
    logic [M-1:0]         out_f, out_nx;   // outputs unmatched before / after
    logic [N-1:0][M-1:0]  m_in, m_nx;      // match so far before / after
    logic [M-1:0][N-1:0]  gnt_om;          // gnt_om[j][i]: output j grants input i
    logic [N-1:0][M-1:0]  gnt_im;          // the same, transposed
    logic [N-1:0][M-1:0]  acc;             // acc[i][j]: input i accepts output j
    logic [M-1:0][NW-1:0] g_idx;
    logic [N-1:0][MW-1:0] a_idx;
    logic [N-1:0]         a_any;

    if (it == 0) begin : g_start
      assign in_f  = '1;
      assign out_f = '1;
      assign m_in  = '0;
      assign g1_idx = g_idx;
      assign a1_idx = a_idx;
      assign acc1   = acc;
    end else begin : g_chain
      assign in_f  = g_iter[it-1].in_nx;
      assign out_f = g_iter[it-1].out_nx;
      assign m_in  = g_iter[it-1].m_nx;
    end

    for (genvar j = 0; j < M; j++) begin : g_out
      logic [N-1:0] col;
      logic [N-1:0] g;
      always_comb
        for (int i = 0; i < N; i++)
          col[i] = req[i][j] && in_f[i] && out_f[j];
      ppe #(.N(N)) u_grant (.req(col), .prio(gptr[j]), .gnt(g), .gnt_idx(g_idx[j]), .any());
      assign gnt_om[j] = g;
    end

    always_comb
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++)
          gnt_im[i][j] = gnt_om[j][i];

    for (genvar i = 0; i < N; i++) begin : g_in
      logic [M-1:0] row, a;
      assign row = gnt_im[i];
      ppe #(.N(M)) u_accept (.req(row), .prio(aptr[i]), .gnt(a),
                             .gnt_idx(a_idx[i]), .any(a_any[i]));
      assign acc[i] = a;
    end

    always_comb begin
      in_nx  = in_f & ~a_any;
      out_nx = out_f;
      for (int i = 0; i < N; i++) out_nx &= ~acc[i];
      m_nx   = m_in | acc;
    end
  end

  always_comb begin
    match = g_iter[ITER-1].m_nx;
    for (int i = 0; i < N; i++) begin
      in_matched[i] = |match[i];
      in_port[i]    = '0;
      for (int j = 0; j < M; j++)
        if (match[i][j]) in_port[i] = MW'(j);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gptr <= '0;
      aptr <= '0;
    end else if (update) begin
      for (int j = 0; j < M; j++)
        if (acc1[g1_idx[j]][j])
          gptr[j] <= NW'((int'(g1_idx[j]) + 1) % N);
      for (int i = 0; i < N; i++)
        if (|acc1[i])
          aptr[i] <= MW'((int'(a1_idx[i]) + 1) % M);
    end
  end
endmodule
