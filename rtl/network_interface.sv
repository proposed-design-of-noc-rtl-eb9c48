// network_interface: joins an IP core (processor, memory, accelerator, I/O)
// to its router, keeping computation and communication apart.
//
// Send side: the core offers a destination and a data word with a
// valid/ready handshake (a word moves when send_valid and send_ready are both
// high at a clock edge). The interface turns it into a flit, adding its own
// coordinates as the source, and queues it in a small FIFO until the router
// finds a free slot for it. Receive side: a flit ejected by the router is
// shown to the core for one cycle on recv_valid with its source and data; the
// core must take it then (the router has no means to hold it back).
// The document gives only the role of the network interface; the handshake,
// the queue depth (INJ_DEPTH) and the flit format are this design's choices.
module network_interface
  import noc_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int INJ_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst,
  // core side
  input  logic              send_valid,
  output logic              send_ready,
  input  coord_t            send_dst_x,
  input  coord_t            send_dst_y,
  input  logic [DATA_W-1:0] send_data,
  output logic              recv_valid,
  output coord_t            recv_src_x,
  output coord_t            recv_src_y,
  output logic [DATA_W-1:0] recv_data,
  // router side
  output flit_t             inj_flit,
  input  logic              inj_ready,
  input  flit_t             ej_flit
);
  localparam int QW = (INJ_DEPTH > 1) ? $clog2(INJ_DEPTH) : 1;

  flit_t        new_flit, q_head;
  logic         q_empty, q_full;
  logic [QW:0]  q_count;

  always_comb begin
    new_flit.valid = 1'b1;
    new_flit.dst_x = send_dst_x;
    new_flit.dst_y = send_dst_y;
    new_flit.src_x = coord_t'(X);
    new_flit.src_y = coord_t'(Y);
    new_flit.data  = send_data;
  end

  assign send_ready = !q_full;

  flit_fifo #(.DEPTH(INJ_DEPTH)) u_injq (
    .clk, .rst, .push(send_valid && send_ready), .din(new_flit),
    .pop(inj_ready), .head(q_head), .empty(q_empty), .full(q_full), .count(q_count));

  always_comb begin
    inj_flit       = q_head;
    inj_flit.valid = !q_empty;
  end

  assign recv_valid = ej_flit.valid;
  assign recv_src_x = ej_flit.src_x;
  assign recv_src_y = ej_flit.src_y;
  assign recv_data  = ej_flit.data;

  a_eject_here: assert property (@(posedge clk) disable iff (rst)
    ej_flit.valid |-> (ej_flit.dst_x == coord_t'(X) && ej_flit.dst_y == coord_t'(Y)))
    else $error("network_interface: flit ejected at the wrong node");
endmodule
