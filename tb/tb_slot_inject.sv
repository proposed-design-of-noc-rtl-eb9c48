// tb_slot_inject: random slot occupancy, port masks and candidate flits.
// The candidate must land in the lowest-numbered empty slot of an existing
// port, and be refused when there is none; other slots must not change.
module tb_slot_inject;
  import noc_pkg::*;
  localparam int P = 4;
  int checks = 0, failures = 0;
  logic [P-1:0] port_ok;
  flit_t slot_in [P], slot_out [P], f;
  logic accepted;

  slot_inject #(.P(P)) dut (.port_ok, .slot_in, .in_flit(f), .slot_out, .accepted);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc_n = 0, ref_n = 0;
    for (int t = 0; t < 3000; t++) begin
      int w;
      port_ok = P'($urandom);
      for (int i = 0; i < P; i++) begin
        slot_in[i] = flit_t'({$urandom, $urandom, $urandom});
        slot_in[i].valid = port_ok[i] && ($urandom % 2 == 0);
      end
      f = flit_t'({$urandom, $urandom, $urandom});
      f.valid = ($urandom % 4 != 0);
      #1;
      w = -1;
      if (f.valid)
        for (int i = 0; i < P; i++) if (w < 0 && port_ok[i] && !slot_in[i].valid) w = i;
      checks++;
      if (accepted != (w >= 0)) begin failures++; $display("t=%0d: accepted %0b expected slot %0d", t, accepted, w); end
      if (w >= 0) acc_n++; else if (f.valid) ref_n++;
      for (int i = 0; i < P; i++) begin
        checks++;
        if (slot_out[i] != ((i == w) ? f : slot_in[i])) begin failures++; $display("t=%0d: slot %0d wrong", t, i); end
      end
    end
    checks++;
    if (acc_n == 0 || ref_n == 0) begin failures++; $display("accept/refuse not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
