// tb_buffer_eject: random outputs with deflection flags for the router at
// (2,0). At most one deflected flit that is not destined here may be taken per
// cycle, none when the side buffer is full, chosen round robin (modelled),
// and the taken output must be emptied while the others are unchanged.
module tb_buffer_eject;
  import noc_pkg::*;
  localparam int P = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  flit_t o_in [P], o_out [P], pf;
  logic [P-1:0] defl;
  logic full, push;
  int ptr;

  buffer_eject #(.P(P)) dut (.clk, .rst, .here_x(4'd2), .here_y(4'd0), .out_in(o_in),
    .defl, .buf_full(full), .out_out(o_out), .push, .push_flit(pf));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pushes = 0, blocked = 0;
    rst = 1; full = 0; defl = '0;
    foreach (o_in[j]) o_in[j] = FLIT_NONE;
    ptr = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [P-1:0] cand;
      int w;
      full = ($urandom % 5 == 0);
      for (int j = 0; j < P; j++) begin
        o_in[j] = flit_t'({$urandom, $urandom, $urandom});
        o_in[j].valid = ($urandom % 4 != 0);
        if ($urandom % 4 == 0) begin o_in[j].dst_x = 4'd2; o_in[j].dst_y = 4'd0; end
        defl[j] = ($urandom % 2 == 0);
        cand[j] = o_in[j].valid && defl[j] && !full &&
                  !(o_in[j].dst_x == 4'd2 && o_in[j].dst_y == 4'd0);
      end
      #1;
      w = -1;
      for (int k = 0; k < P; k++) if (w < 0 && cand[(ptr + k) % P]) w = (ptr + k) % P;
      if (full && |(defl)) blocked++;
      checks++;
      if (push != (w >= 0) || (w >= 0 && pf != o_in[w])) begin
        failures++; $display("cycle %0d: push %0b expected slot %0d", cyc, push, w);
      end
      for (int j = 0; j < P; j++) begin
        checks++;
        if (o_out[j] != ((j == w) ? FLIT_NONE : o_in[j])) begin failures++; $display("cycle %0d: output %0d wrong", cyc, j); end
      end
      if (w >= 0) begin ptr = (w + 1) % P; pushes++; end
      @(posedge clk); #1;
    end
    checks++;
    if (pushes == 0 || blocked == 0) begin failures++; $display("capture or full case not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
