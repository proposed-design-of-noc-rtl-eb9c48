// tb_ppe: exhaustive check of the programmable priority encoder for N = 4 and
// N = 5. For every request pattern and every priority position the grant must
// be the first requesting position found searching upward from the priority,
// wrapping around, which the testbench works out with its own loop.
module tb_ppe;
  int checks = 0, failures = 0;

  logic [3:0] req4, gnt4;
  logic [1:0] prio4, idx4;
  logic       any4;
  logic [4:0] req5, gnt5;
  logic [2:0] prio5, idx5;
  logic       any5;

  ppe #(.N(4)) dut4 (.req(req4), .prio(prio4), .gnt(gnt4), .gnt_idx(idx4), .any(any4));
  ppe #(.N(5)) dut5 (.req(req5), .prio(prio5), .gnt(gnt5), .gnt_idx(idx5), .any(any5));

  function automatic int ref_pick(input int n, input int r, input int p);
    for (int k = 0; k < n; k++)
      if (r[(p + k) % n]) return (p + k) % n;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int p = 0; p < 4; p++) begin
        int w;
        req4 = 4'(r); prio4 = 2'(p); #1;
        w = ref_pick(4, r, p);
        checks++;
        if (w < 0) begin
          if (any4 || gnt4 != 0) begin failures++; $display("N4 r=%b p=%0d: unexpected grant %b", req4, p, gnt4); end
        end else if (!any4 || gnt4 != 4'(1 << w) || idx4 != 2'(w)) begin
          failures++; $display("N4 r=%b p=%0d: grant %b idx %0d, expected %0d", req4, p, gnt4, idx4, w);
        end
      end
    for (int r = 0; r < 32; r++)
      for (int p = 0; p < 5; p++) begin
        int w;
        req5 = 5'(r); prio5 = 3'(p); #1;
        w = ref_pick(5, r, p);
        checks++;
        if (w < 0) begin
          if (any5 || gnt5 != 0) begin failures++; $display("N5 r=%b p=%0d: unexpected grant", req5, p); end
        end else if (!any5 || gnt5 != 5'(1 << w) || idx5 != 3'(w)) begin
          failures++; $display("N5 r=%b p=%0d: grant %b idx %0d, expected %0d", req5, p, gnt5, idx5, w);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
