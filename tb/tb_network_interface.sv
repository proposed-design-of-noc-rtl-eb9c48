// tb_network_interface: the core sends random words through the interface
// while the router side accepts at random. Flits must leave in order with the
// destination, data and the interface's own source coordinates (3,1);
// send_ready must drop when the four-entry queue is full. Ejected flits must
// appear on the receive port in the same cycle.
module tb_network_interface;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic send_valid, send_ready, recv_valid, inj_ready;
  coord_t sdx, sdy, rsx, rsy;
  logic [DATA_W-1:0] sdata, rdata;
  flit_t inj, ej;
  flit_t expq [$];

  network_interface #(.X(3), .Y(1), .INJ_DEPTH(4)) dut (
    .clk, .rst, .send_valid, .send_ready, .send_dst_x(sdx), .send_dst_y(sdy), .send_data(sdata),
    .recv_valid, .recv_src_x(rsx), .recv_src_y(rsy), .recv_data(rdata),
    .inj_flit(inj), .inj_ready, .ej_flit(ej));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stalls = 0;
    rst = 1; send_valid = 0; inj_ready = 0; ej = FLIT_NONE; sdx = 0; sdy = 0; sdata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      flit_t e;
      send_valid = ($urandom % 3 != 0);
      sdx = coord_t'($urandom); sdy = coord_t'($urandom); sdata = $urandom;
      inj_ready = inj.valid && ($urandom % 3 == 0);
      ej = flit_t'({$urandom, $urandom, $urandom});
      ej.valid = ($urandom % 4 == 0);
      ej.dst_x = 4'd3; ej.dst_y = 4'd1;
      #1;
      checks++;
      if (send_ready != (expq.size() < 4)) begin failures++; $display("cycle %0d: send_ready %0b with %0d queued", cyc, send_ready, expq.size()); end
      if (!send_ready) stalls++;
      checks++;
      if (inj.valid != (expq.size() > 0) || (expq.size() > 0 && inj != expq[0])) begin
        failures++; $display("cycle %0d: injected flit wrong", cyc);
      end
      checks++;
      if (recv_valid != ej.valid || (ej.valid && (rsx != ej.src_x || rsy != ej.src_y || rdata != ej.data))) begin
        failures++; $display("cycle %0d: receive port wrong", cyc);
      end
      e.valid = 1'b1; e.dst_x = sdx; e.dst_y = sdy; e.src_x = 4'd3; e.src_y = 4'd1; e.data = sdata;
      @(posedge clk);
      if (inj_ready && expq.size() > 0) void'(expq.pop_front());
      if (send_valid && send_ready) expq.push_back(e);
      #1;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
