// noc_mesh: a MESH_X x MESH_Y network-on-chip built from minimally buffered
// deflection routers with iSLIP schedulers, one network interface per node.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X; x grows to the East and y
// to the North. Neighbouring routers are joined by a pair of one-way links,
// each the registered output of one router, so a flit moves one hop per
// cycle. Links that would leave the mesh are tied off. The IP cores
// (processors, memories, accelerators, I/O) are not part of this design:
// each node's network-interface handshake is brought out as a port, in
// arrays indexed by node. The ev_* arrays are the routers' event pulses.
// The mesh topology, the router and the network interfaces follow the
// document; the default 3 x 3 size is that of its example mesh.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int MESH_X     = 3,
  parameter int MESH_Y     = 3,
  parameter int SIDE_DEPTH = 4,
  parameter int ITER       = 1,
  parameter int INJ_DEPTH  = 4,
  localparam int NODES = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              send_valid [NODES],
  output logic              send_ready [NODES],
  input  coord_t            send_dst_x [NODES],
  input  coord_t            send_dst_y [NODES],
  input  logic [DATA_W-1:0] send_data  [NODES],
  output logic              recv_valid [NODES],
  output coord_t            recv_src_x [NODES],
  output coord_t            recv_src_y [NODES],
  output logic [DATA_W-1:0] recv_data  [NODES],
  output logic              ev_eject    [NODES],
  output logic              ev_inject   [NODES],
  output logic              ev_reinject [NODES],
  output logic              ev_buf_push [NODES],
  output logic              ev_buf_full [NODES],
  output logic              ev_contend  [NODES],
  output logic [2:0]        ev_deflect  [NODES]
);
  flit_t link [NODES][NUM_DIRS];   // link[n][d]: output d of router n

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;
      flit_t in_l [NUM_DIRS];
      flit_t inj, ej;
      logic  inj_rdy;

      if (y < MESH_Y - 1) begin : g_n
        assign in_l[DIR_N] = link[N + MESH_X][DIR_S];
      end else begin : g_n0
        assign in_l[DIR_N] = FLIT_NONE;
      end
      if (x < MESH_X - 1) begin : g_e
        assign in_l[DIR_E] = link[N + 1][DIR_W];
      end else begin : g_e0
        assign in_l[DIR_E] = FLIT_NONE;
      end
      if (y > 0) begin : g_s
        assign in_l[DIR_S] = link[N - MESH_X][DIR_N];
      end else begin : g_s0
        assign in_l[DIR_S] = FLIT_NONE;
      end
      if (x > 0) begin : g_w
        assign in_l[DIR_W] = link[N - 1][DIR_E];
      end else begin : g_w0
        assign in_l[DIR_W] = FLIT_NONE;
      end

      minbd_router #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(x), .Y(y),
        .SIDE_DEPTH(SIDE_DEPTH), .ITER(ITER)
      ) u_router (
        .clk, .rst, .in_flit(in_l), .out_flit(link[N]),
        .inj_flit(inj), .inj_ready(inj_rdy), .ej_flit(ej),
        .ev_eject(ev_eject[N]), .ev_inject(ev_inject[N]), .ev_reinject(ev_reinject[N]),
        .ev_buf_push(ev_buf_push[N]), .ev_buf_full(ev_buf_full[N]),
        .ev_contend(ev_contend[N]), .ev_deflect(ev_deflect[N]));

      network_interface #(.X(x), .Y(y), .INJ_DEPTH(INJ_DEPTH)) u_ni (
        .clk, .rst,
        .send_valid(send_valid[N]), .send_ready(send_ready[N]),
        .send_dst_x(send_dst_x[N]), .send_dst_y(send_dst_y[N]), .send_data(send_data[N]),
        .recv_valid(recv_valid[N]), .recv_src_x(recv_src_x[N]), .recv_src_y(recv_src_y[N]),
        .recv_data(recv_data[N]),
        .inj_flit(inj), .inj_ready(inj_rdy), .ej_flit(ej));
    end
  end
endmodule
