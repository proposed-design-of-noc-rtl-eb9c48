// tb_eject_unit: random slot contents, some destined for the router at (1,2).
// Checks that exactly one arrived flit is ejected when any has arrived, that
// the choice follows a round-robin order (a model of the pointer), that the
// ejected slot is emptied and all other slots pass unchanged.
module tb_eject_unit;
  import noc_pkg::*;
  localparam int P = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  flit_t slot_in [P], slot_out [P], ej;
  logic [P-1:0] arrived;
  int ptr;

  eject_unit #(.P(P)) dut (.clk, .rst, .here_x(4'd1), .here_y(4'd2),
    .slot_in, .slot_out, .ej_flit(ej), .arrived);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int multi = 0;
    rst = 1;
    foreach (slot_in[i]) slot_in[i] = FLIT_NONE;
    ptr = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int w, n;
      logic [P-1:0] arr;
      for (int i = 0; i < P; i++) begin
        slot_in[i] = flit_t'({$urandom, $urandom, $urandom});
        slot_in[i].valid = ($urandom % 4 != 0);
        if ($urandom % 2 == 0) begin slot_in[i].dst_x = 4'd1; slot_in[i].dst_y = 4'd2; end
        arr[i] = slot_in[i].valid && slot_in[i].dst_x == 4'd1 && slot_in[i].dst_y == 4'd2;
      end
      #1;
      w = -1;
      for (int k = 0; k < P; k++) if (w < 0 && arr[(ptr + k) % P]) w = (ptr + k) % P;
      n = $countones(arr);
      if (n > 1) multi++;
      checks++;
      if (arrived != arr) begin failures++; $display("cycle %0d: arrived %b expected %b", cyc, arrived, arr); end
      checks++;
      if (w < 0) begin
        if (ej.valid) begin failures++; $display("cycle %0d: spurious eject", cyc); end
      end else if (ej != slot_in[w]) begin
        failures++; $display("cycle %0d: ejected wrong flit, expected slot %0d", cyc, w);
      end
      for (int i = 0; i < P; i++) begin
        checks++;
        if (slot_out[i] != ((i == w) ? FLIT_NONE : slot_in[i])) begin
          failures++; $display("cycle %0d: slot %0d wrong", cyc, i);
        end
      end
      if (w >= 0) ptr = (w + 1) % P;
      @(posedge clk); #1;
    end
    checks++;
    if (multi == 0) begin failures++; $display("no cycle with competing arrivals"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
