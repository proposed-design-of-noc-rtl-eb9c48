// tb_noc_mesh_8x8: the end-to-end test of tb_noc_mesh run on an 8 x 8 mesh
// (64 routers), the size at which deflection routers are commonly compared.
//  1. Zero-load latency: single packets between chosen node pairs on an idle
//     network. A packet accepted at clock edge t must be received after edge
//     t + hops + 1 (one edge to leave the interface queue through the first
//     router, one per further hop, one to the eject register).
//  2. Uniform random traffic: every node sends packets to random other nodes.
//  3. Hot spot: every node sends to the centre node, which can eject only one
//     flit per cycle, so flits contend, deflect and fill side buffers.
// A scoreboard checks that every packet arrives exactly once, at its
// destination, with its source and data intact, and that none is lost.
// Each router mechanism (injection, ejection, iSLIP contention, deflection,
// side-buffer capture, re-injection, full side buffer) is counted over the
// whole mesh and must have happened.
module tb_noc_mesh_8x8;
  import noc_pkg::*;
  localparam int MX = 8, MY = 8, NODES = MX * MY;
  localparam int HOT = (MY / 2) * MX + MX / 2;   // centre node
  int checks = 0, failures = 0;
  logic clk = 0, rst;

  logic              send_valid [NODES], send_ready [NODES];
  coord_t            send_dst_x [NODES], send_dst_y [NODES];
  logic [DATA_W-1:0] send_data  [NODES];
  logic              recv_valid [NODES];
  coord_t            recv_src_x [NODES], recv_src_y [NODES];
  logic [DATA_W-1:0] recv_data  [NODES];
  logic ev_eject [NODES], ev_inject [NODES], ev_reinject [NODES], ev_buf_push [NODES];
  logic ev_buf_full [NODES], ev_contend [NODES];
  logic [2:0] ev_deflect [NODES];

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  always #5 clk = ~clk;

  // data word: [31:24] source node, [23:0] sequence number
  int expected [int];        // data -> destination node
  int sent_at  [int];        // data -> cycle of acceptance
  int seq [NODES];
  int cyc = 0;
  int n_eject, n_inject, n_reinject, n_bufpush, n_buffull, n_contend, n_defl;
  int n_recv, lat_sum, lat_max;

  always @(posedge clk) cyc <= cyc + 1;

  // receive side and event counters, sampled just before each edge
  always @(negedge clk) if (!rst) begin
    for (int n = 0; n < NODES; n++) begin
      n_eject    += int'(ev_eject[n]);
      n_inject   += int'(ev_inject[n]);
      n_reinject += int'(ev_reinject[n]);
      n_bufpush  += int'(ev_buf_push[n]);
      n_buffull  += int'(ev_buf_full[n]);
      n_contend  += int'(ev_contend[n]);
      n_defl     += int'(ev_deflect[n]);
      if (recv_valid[n]) begin
        int d, src;
        d   = int'(recv_data[n]);
        src = int'(recv_data[n][31:24]);
        checks++;
        if (!expected.exists(d)) begin
          failures++; $display("cycle %0d: node %0d got unknown or repeated packet %h", cyc, n, d);
        end else if (expected[d] != n || int'(recv_src_x[n]) != src % MX || int'(recv_src_y[n]) != src / MX) begin
          failures++; $display("cycle %0d: packet %h at node %0d, expected node %0d", cyc, d, n, expected[d]);
          expected.delete(d);
        end else begin
          int lat;
          lat = cyc - sent_at[d];
          lat_sum += lat; n_recv++;
          if (lat > lat_max) lat_max = lat;
          expected.delete(d);
          sent_at.delete(d);
        end
      end
    end
  end

  task automatic idle_all();
    for (int n = 0; n < NODES; n++) begin
      send_valid[n] = 0; send_dst_x[n] = '0; send_dst_y[n] = '0; send_data[n] = '0;
    end
  endtask

  // offer one packet from node s to node d in this cycle (inputs set after an edge)
  task automatic offer(input int s, input int d);
    send_valid[s] = 1'b1;
    send_dst_x[s] = coord_t'(d % MX);
    send_dst_y[s] = coord_t'(d / MX);
    send_data[s]  = {8'(s), 24'(seq[s])};
  endtask

  // at the edge: record the packets that were accepted
  task automatic clock_and_record();
    logic acc [NODES];
    for (int n = 0; n < NODES; n++) acc[n] = send_valid[n] && send_ready[n];
    @(posedge clk);
    for (int n = 0; n < NODES; n++)
      if (acc[n]) begin
        expected[int'(send_data[n])] = int'(send_dst_y[n]) * MX + int'(send_dst_x[n]);
        sent_at[int'(send_data[n])]  = cyc;
        seq[n]++;
      end
    #1;
  endtask

  task automatic drain(input int max_cycles);
    idle_all();
    for (int c = 0; c < max_cycles && expected.size() > 0; c++) clock_and_record();
    repeat (3) clock_and_record();
    checks++;
    if (expected.size() != 0) begin failures++; $display("%0d packets lost or stuck", expected.size()); end
  endtask

  function automatic int hops(input int s, input int d);
    int dx, dy;
    dx = (s % MX) - (d % MX); dy = (s / MX) - (d / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets outstanding", expected.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pairs [5][2] = '{'{0, NODES - 1}, '{NODES - 1, 0}, '{MX - 1, NODES - MX}, '{HOT, HOT + 1}, '{1, NODES - 2}};
    rst = 1; idle_all();
    foreach (seq[n]) seq[n] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // 1. zero-load latency
    foreach (pairs[p]) begin
      int s, d, t0, got;
      s = pairs[p][0]; d = pairs[p][1];
      offer(s, d);
      clock_and_record();
      t0 = cyc;
      idle_all();
      got = -1;
      for (int c = 0; c < 20 && got < 0; c++) begin
        if (recv_valid[d]) got = cyc - t0;
        else clock_and_record();
      end
      checks++;
      if (got != hops(s, d) + 1) begin
        failures++; $display("zero-load %0d->%0d: %0d cycles, expected %0d", s, d, got, hops(s, d) + 1);
      end else $display("zero-load %0d->%0d: %0d hops, %0d cycles", s, d, hops(s, d), got);
      repeat (2) clock_and_record();
    end
    drain(50);

    // 2. uniform random traffic, about 30% offered load per node
    for (int c = 0; c < 3000; c++) begin
      idle_all();
      for (int n = 0; n < NODES; n++)
        if ($urandom % 100 < 30) begin
          int d;
          d = $urandom % (NODES - 1);
          if (d >= n) d++;
          offer(n, d);
        end
      clock_and_record();
    end
    drain(5000);
    $display("uniform: %0d packets, mean latency %0d.%02d, max %0d", n_recv,
             lat_sum / (n_recv > 0 ? n_recv : 1), (lat_sum * 100 / (n_recv > 0 ? n_recv : 1)) % 100, lat_max);

    // 3. hot spot towards the centre node
    for (int c = 0; c < 600; c++) begin
      idle_all();
      for (int n = 0; n < NODES; n++) if (n != HOT && $urandom % 2 == 0) offer(n, HOT);
      clock_and_record();
    end
    drain(20000);

    $display("eject %0d inject %0d reinject %0d buffer %0d full %0d contend %0d deflect %0d",
             n_eject, n_inject, n_reinject, n_bufpush, n_buffull, n_contend, n_defl);
    checks++;
    if (n_eject != n_inject) begin failures++; $display("injected %0d, ejected %0d", n_inject, n_eject); end
    checks++;
    if (n_eject == 0 || n_inject == 0 || n_reinject == 0 || n_bufpush == 0 || n_buffull == 0 ||
        n_contend == 0 || n_defl == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
