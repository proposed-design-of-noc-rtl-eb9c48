// tb_deflect_alloc: random legal scheduler results (each matched slot on a
// distinct existing output, no more valid slots than existing outputs). Every
// valid slot must get exactly one output, matched slots their own, deflected
// slots the lowest free existing outputs in slot order, and no flit may use a
// missing port.
module tb_deflect_alloc;
  localparam int P = 4;
  int checks = 0, failures = 0;
  logic [P-1:0] port_ok, in_valid, matched, used, defl;
  logic [P-1:0][1:0] mport, sel;

  deflect_alloc #(.P(P)) dut (.port_ok, .in_valid, .matched, .mport, .sel, .used, .defl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ndefl = 0;
    for (int t = 0; t < 4000; t++) begin
      logic [P-1:0] e_used, e_defl, taken;
      logic [P-1:0][1:0] e_sel;
      int nok, nv;
      port_ok = P'($urandom) | P'(1 << ($urandom % P));
      nok = $countones(port_ok);
      in_valid = '0; matched = '0; mport = '0; taken = '0;
      nv = 0;
      for (int i = 0; i < P; i++)
        if (nv < nok && $urandom % 3 != 0) begin
          in_valid[i] = 1'b1; nv++;
        end
      for (int i = 0; i < P; i++)
        if (in_valid[i] && $urandom % 2 == 0) begin
          int j;
          j = $urandom % P;
          if (port_ok[j] && !taken[j]) begin matched[i] = 1'b1; mport[i] = 2'(j); taken[j] = 1'b1; end
        end
      #1;
      e_used = taken; e_defl = '0; e_sel = '0;
      for (int i = 0; i < P; i++) if (matched[i]) e_sel[mport[i]] = 2'(i);
      for (int i = 0; i < P; i++)
        if (in_valid[i] && !matched[i]) begin
          bit done;
          done = 0;
          for (int j = 0; j < P; j++)
            if (!done && port_ok[j] && !e_used[j]) begin
              e_used[j] = 1; e_defl[j] = 1; e_sel[j] = 2'(i); done = 1;
            end
        end
      ndefl += $countones(e_defl);
      checks++;
      if (used != e_used || defl != e_defl) begin
        failures++; $display("t=%0d: used %b/%b defl %b/%b", t, used, e_used, defl, e_defl);
      end
      for (int j = 0; j < P; j++) if (e_used[j]) begin
        checks++;
        if (sel[j] != e_sel[j]) begin failures++; $display("t=%0d: sel[%0d]=%0d expected %0d", t, j, sel[j], e_sel[j]); end
      end
      checks++;
      if ((used & ~port_ok) != 0 || $countones(used) != nv) begin
        failures++; $display("t=%0d: flits not all placed on existing ports", t);
      end
    end
    checks++;
    if (ndefl == 0) begin failures++; $display("no deflection exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
