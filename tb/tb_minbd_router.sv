// tb_minbd_router: the router at the centre (1,1) of a 3 x 3 mesh, so all four
// links exist. Every flit carries a unique tag in its data word and a
// scoreboard tracks the flits inside the router.
//  - Directed: a lone flit crosses in one cycle on its XY output; two flits
//    wanting the same output give one a productive hop while the loser goes
//    into the side buffer and leaves on the same output one cycle later;
//    two flits arriving together are ejected one per cycle-slot, the other
//    deflected; four flits per cycle all heading East fill the side buffer.
//  - Random: random flits on the links and from the local port.
// Every cycle: each output flit must be a flit that entered and has not left,
// flits on a non-XY output are counted as deflections and must match the
// router's deflection count, ejected flits must be addressed here, and after
// draining no flit may be missing. Each mechanism (eject, inject, iSLIP
// contention, deflection, side-buffer capture, re-injection, full side buffer)
// must have happened.
module tb_minbd_router;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  flit_t in_f [NUM_DIRS], out_f [NUM_DIRS], inj, ej;
  logic inj_ready;
  logic ev_eject, ev_inject, ev_reinject, ev_buf_push, ev_buf_full, ev_contend;
  logic [2:0] ev_deflect;

  minbd_router #(.MESH_X(3), .MESH_Y(3), .X(1), .Y(1)) dut (
    .clk, .rst, .in_flit(in_f), .out_flit(out_f), .inj_flit(inj), .inj_ready, .ej_flit(ej),
    .ev_eject, .ev_inject, .ev_reinject, .ev_buf_push, .ev_buf_full, .ev_contend, .ev_deflect);

  always #5 clk = ~clk;

  flit_t pending [int];
  int tag = 1;
  int n_eject, n_inject, n_reinject, n_bufpush, n_buffull, n_contend, n_defl_dut, n_defl_seen, n_prod;

  function automatic flit_t mk(input int dx, input int dy);
    flit_t f;
    f.valid = 1'b1; f.dst_x = coord_t'(dx); f.dst_y = coord_t'(dy);
    f.src_x = 4'd0; f.src_y = 4'd0; f.data = 32'(tag);
    tag++;
    return f;
  endfunction

  function automatic dir_e xy(input flit_t f);
    if (f.dst_x > 1) return DIR_E;
    if (f.dst_x < 1) return DIR_W;
    if (f.dst_y > 1) return DIR_N;
    return DIR_S;
  endfunction

  // called #1 after a clock edge: checks the registered outputs
  task automatic check_outputs();
    for (int d = 0; d < NUM_DIRS; d++)
      if (out_f[d].valid) begin
        int t = int'(out_f[d].data);
        checks++;
        if (!pending.exists(t) || pending[t] != out_f[d]) begin
          failures++; $display("%0t: unknown or duplicated flit %0d on output %0d", $time, t, d);
        end else pending.delete(t);
        if (out_f[d].dst_x == 1 && out_f[d].dst_y == 1) n_defl_seen++;
        else if (xy(out_f[d]) == dir_e'(d)) n_prod++;
        else n_defl_seen++;
      end
    if (ej.valid) begin
      int t = int'(ej.data);
      checks++;
      if (!pending.exists(t) || ej.dst_x != 1 || ej.dst_y != 1) begin
        failures++; $display("%0t: bad eject of flit %0d", $time, t);
      end else pending.delete(t);
    end
  endtask

  // called #2 after a clock edge, with inputs set: records what enters
  task automatic record_inputs();
    for (int d = 0; d < NUM_DIRS; d++)
      if (in_f[d].valid) pending[int'(in_f[d].data)] = in_f[d];
    if (inj_ready) pending[int'(inj.data)] = inj;
    n_eject    += int'(ev_eject);
    n_inject   += int'(ev_inject);
    n_reinject += int'(ev_reinject);
    n_bufpush  += int'(ev_buf_push);
    n_buffull  += int'(ev_buf_full);
    n_contend  += int'(ev_contend);
    n_defl_dut += int'(ev_deflect);
  endtask

  task automatic clear_inputs();
    foreach (in_f[d]) in_f[d] = FLIT_NONE;
    inj = FLIT_NONE;
  endtask

  task automatic cycle();
    #1 record_inputs();
    @(posedge clk);
    #1 check_outputs();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: %0d flits still pending", pending.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t a, b;
    rst = 1; clear_inputs();
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // 1. lone flit: one cycle, productive output
    a = mk(2, 1);
    in_f[DIR_W] = a;
    cycle();
    clear_inputs();
    checks++;
    if (out_f[DIR_E] != a) begin failures++; $display("lone flit not on East after one cycle"); end

    // 2. two flits for East: loser buffered, leaves East one cycle later
    a = mk(2, 0); b = mk(2, 2);
    in_f[DIR_N] = a; in_f[DIR_W] = b;
    #1;
    checks++;
    if (!ev_contend || !ev_buf_push || ev_deflect != 0) begin
      failures++; $display("contention: contend %0b push %0b deflect %0d", ev_contend, ev_buf_push, ev_deflect);
    end
    cycle();
    clear_inputs();
    checks++;
    if (!((out_f[DIR_E] == a) || (out_f[DIR_E] == b))) begin failures++; $display("contention: no winner on East"); end
    #1;
    checks++;
    if (!ev_reinject) begin failures++; $display("contention: loser not re-injected"); end
    cycle();
    checks++;
    if (!((out_f[DIR_E] == a) || (out_f[DIR_E] == b))) begin failures++; $display("contention: loser not on East next cycle"); end

    // 3. two flits arriving here together: one ejected, one deflected
    a = mk(1, 1); b = mk(1, 1);
    in_f[DIR_E] = a; in_f[DIR_S] = b;
    #1;
    checks++;
    if (!ev_eject || ev_deflect != 1 || ev_buf_push) begin
      failures++; $display("double arrival: eject %0b deflect %0d push %0b", ev_eject, ev_deflect, ev_buf_push);
    end
    cycle();
    clear_inputs();
    cycle();

    // 4. saturation towards East: side buffer fills up
    for (int c = 0; c < 10; c++) begin
      for (int d = 0; d < NUM_DIRS; d++) in_f[d] = mk(2, $urandom % 3);
      inj = mk(2, 1);
      cycle();
    end
    clear_inputs();
    checks++;
    if (n_buffull == 0) begin failures++; $display("side buffer never full under saturation"); end
    repeat (10) cycle();

    // 5. random traffic
    for (int c = 0; c < 5000; c++) begin
      for (int d = 0; d < NUM_DIRS; d++) begin
        in_f[d] = ($urandom % 100 < 45) ? mk($urandom % 3, $urandom % 3) : FLIT_NONE;
      end
      inj = ($urandom % 2 == 0) ? mk($urandom % 3, $urandom % 3) : FLIT_NONE;
      if (inj.valid && inj.dst_x == 1 && inj.dst_y == 1) inj.dst_x = 4'd0;
      cycle();
    end
    clear_inputs();
    repeat (20) cycle();

    checks++;
    if (pending.size() != 0) begin failures++; $display("%0d flits never left", pending.size()); end
    checks++;
    if (n_defl_dut != n_defl_seen) begin
      failures++; $display("deflections counted %0d, seen %0d", n_defl_dut, n_defl_seen);
    end
    $display("eject %0d inject %0d reinject %0d buffer %0d full %0d contend %0d deflect %0d productive %0d",
             n_eject, n_inject, n_reinject, n_bufpush, n_buffull, n_contend, n_defl_dut, n_prod);
    checks++;
    if (n_eject == 0 || n_inject == 0 || n_reinject == 0 || n_bufpush == 0 || n_buffull == 0 ||
        n_contend == 0 || n_defl_dut == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
