// minbd_router: minimally buffered deflection router for a 2D mesh with an
// iSLIP scheduler.
//
// The router has no input buffers. Every flit that enters must leave on some
// output link in the next cycle; a flit that cannot have its productive (XY)
// output is deflected to another one. A small side buffer cuts the number of
// deflections: up to one deflected flit per cycle is pulled off the outputs
// into the side buffer and re-injected later when a slot is free, instead of
// being sent away from its destination.
//
// The flits of the four link inputs pass, in one cycle, through:
//   1. eject_unit   - up to one flit destined here leaves to the local port;
//   2. slot_inject  - the head of the side buffer re-enters a free slot;
//   3. slot_inject  - a flit from the local port enters a free slot;
//   4. xy_route + islip_scheduler - each flit requests its XY output and the
//      iSLIP scheduler (round-robin PPE arbiters) matches slots to outputs;
//   5. deflect_alloc + crossbar - losers are deflected to free outputs;
//   6. buffer_eject - one deflected flit may be taken into the side buffer.
// The stage order, the one-flit eject and buffer-eject rules, the side
// buffer and the iSLIP/PPE scheduler follow the document; the single-cycle
// pipeline, the port order and all tie-break rules are this design's.
// No golden-flit or age priority is used, since the document gives none: the
// round-robin pointers of the scheduler are the only fairness mechanism.
//
// Interface: in_flit/out_flit are the links, indexed by dir_e (N,E,S,W). The
// outputs and ej_flit are registered, so a hop takes one cycle. inj_flit is
// offered by the network interface and inj_ready (combinational) says it was
// taken this cycle. The ev_* outputs pulse for one cycle on each event and
// serve as performance counters. X and Y are the router's coordinates in a
// MESH_X x MESH_Y mesh; links that leave the mesh are never used.
module minbd_router
  import noc_pkg::*;
#(
  parameter int MESH_X     = 3,
  parameter int MESH_Y     = 3,
  parameter int X          = 1,
  parameter int Y          = 1,
  parameter int SIDE_DEPTH = 4,
  parameter int ITER       = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  flit_t in_flit  [NUM_DIRS],
  output flit_t out_flit [NUM_DIRS],
  input  flit_t inj_flit,
  output logic  inj_ready,
  output flit_t ej_flit,
  // event pulses
  output logic       ev_eject,
  output logic       ev_inject,
  output logic       ev_reinject,
  output logic       ev_buf_push,
  output logic       ev_buf_full,
  output logic       ev_contend,
  output logic [2:0] ev_deflect     // flits leaving on a deflected output
);
  localparam int P  = NUM_DIRS;
  localparam int PW = $clog2(P);
  localparam int SAW = (SIDE_DEPTH > 1) ? $clog2(SIDE_DEPTH) : 1;

  localparam coord_t HX = coord_t'(X);
  localparam coord_t HY = coord_t'(Y);

  // links that exist at this mesh position
  localparam logic [P-1:0] PORT_OK = {
    X > 0,          // W (bit 3)
    Y > 0,          // S
    X < MESH_X - 1, // E
    Y < MESH_Y - 1  // N (bit 0)
  };

  // ---- 1. eject ---------------------------------------------------------
  flit_t        s_in [P];
  flit_t        s_ej [P];
  flit_t        ej_c;
  logic [P-1:0] arrived_unused;

  // ignore anything on a link that does not exist
  always_comb
    for (int i = 0; i < P; i++)
      s_in[i] = PORT_OK[i] ? in_flit[i] : FLIT_NONE;

  eject_unit #(.P(P)) u_eject (
    .clk, .rst, .here_x(HX), .here_y(HY),
    .slot_in(s_in), .slot_out(s_ej), .ej_flit(ej_c), .arrived(arrived_unused));

  // ---- 2. re-inject from the side buffer --------------------------------
  flit_t         sb_head, sb_head_v, push_flit;
  logic          sb_empty, sb_full, sb_pop, sb_push;
  logic [SAW:0]  sb_count;
  flit_t         s_rj [P];

  always_comb begin
    sb_head_v       = sb_head;
    sb_head_v.valid = !sb_empty;
  end

  slot_inject #(.P(P)) u_reinject (
    .port_ok(PORT_OK), .slot_in(s_ej), .in_flit(sb_head_v),
    .slot_out(s_rj), .accepted(sb_pop));

  // ---- 3. local injection -----------------------------------------------
  flit_t s_ij [P];

  slot_inject #(.P(P)) u_inject (
    .port_ok(PORT_OK), .slot_in(s_rj), .in_flit(inj_flit),
    .slot_out(s_ij), .accepted(inj_ready));

  // ---- 4. route computation and iSLIP scheduling ------------------------
  logic [P-1:0][P-1:0]  req;
  logic [P-1:0][P-1:0]  match_unused;
  logic [P-1:0]         matched;
  logic [P-1:0][PW-1:0] mport;
  logic [P-1:0]         valid_v;

  for (genvar i = 0; i < P; i++) begin : g_rc
    dir_e dir;
    logic arr;
    xy_route u_rc (.here_x(HX), .here_y(HY), .dst_x(s_ij[i].dst_x), .dst_y(s_ij[i].dst_y),
                   .dir(dir), .arrived(arr));
    always_comb begin
      req[i]      = '0;
      req[i][dir] = s_ij[i].valid && !arr;
      valid_v[i]  = s_ij[i].valid;
    end
  end

  islip_scheduler #(.N(P), .M(P), .ITER(ITER)) u_sched (
    .clk, .rst, .update(1'b1), .req(req),
    .match(match_unused), .in_matched(matched), .in_port(mport));

  // ---- 5. deflection and crossbar ---------------------------------------
  logic [P-1:0][PW-1:0] sel;
  logic [P-1:0]         used, defl;
  flit_t                x_out [P];

  deflect_alloc #(.P(P)) u_defl (
    .port_ok(PORT_OK), .in_valid(valid_v), .matched(matched), .mport(mport),
    .sel(sel), .used(used), .defl(defl));

  crossbar #(.N(P), .M(P)) u_xbar (.in_flit(s_ij), .sel(sel), .en(used), .out_flit(x_out));

  // ---- 6. buffer eject and side buffer ----------------------------------
  flit_t o_next [P];

  buffer_eject #(.P(P)) u_bej (
    .clk, .rst, .here_x(HX), .here_y(HY),
    .out_in(x_out), .defl(defl), .buf_full(sb_full),
    .out_out(o_next), .push(sb_push), .push_flit(push_flit));

  flit_fifo #(.DEPTH(SIDE_DEPTH)) u_side (
    .clk, .rst, .push(sb_push), .din(push_flit), .pop(sb_pop),
    .head(sb_head), .empty(sb_empty), .full(sb_full), .count(sb_count));

  // ---- output registers -------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < P; j++) out_flit[j] <= FLIT_NONE;
      ej_flit <= FLIT_NONE;
    end else begin
      for (int j = 0; j < P; j++) out_flit[j] <= o_next[j];
      ej_flit <= ej_c;
    end
  end

  // ---- events -----------------------------------------------------------
  always_comb begin
    ev_eject    = ej_c.valid;
    ev_inject   = inj_ready;
    ev_reinject = sb_pop;
    ev_buf_push = sb_push;
    ev_buf_full = sb_full && (defl != '0);
    ev_contend  = 1'b0;
    for (int j = 0; j < P; j++) begin
      int n;
      n = 0;
      for (int i = 0; i < P; i++) n += int'(req[i][j]);
      if (n > 1) ev_contend = 1'b1;
    end
    ev_deflect = '0;
    for (int j = 0; j < P; j++) ev_deflect += 3'(o_next[j].valid && defl[j]);
  end

  // every flit that came in or was injected leaves, is ejected or is buffered
  a_conserve: assert property (@(posedge clk) disable iff (rst)
    $countones({ej_c.valid, sb_push, o_next[0].valid, o_next[1].valid,
                o_next[2].valid, o_next[3].valid}) ==
    $countones({s_in[0].valid, s_in[1].valid, s_in[2].valid, s_in[3].valid,
                sb_pop, inj_ready}))
    else $error("minbd_router: flit lost or duplicated");
  a_no_edge_out: assert property (@(posedge clk) disable iff (rst)
    (({o_next[3].valid, o_next[2].valid, o_next[1].valid, o_next[0].valid}) & ~PORT_OK) == '0)
    else $error("minbd_router: flit sent off the mesh");
endmodule
