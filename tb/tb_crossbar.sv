// tb_crossbar: random flits, selections and enables on a 4 x 4 crossbar; each
// enabled output must carry its selected input, a disabled one nothing.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t in_f [4], out_f [4];
  logic [3:0][1:0] sel;
  logic [3:0] en;

  crossbar #(.N(4), .M(4)) dut (.in_flit(in_f), .sel, .en, .out_flit(out_f));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      foreach (in_f[i]) in_f[i] = flit_t'({$urandom, $urandom, $urandom});
      sel = 8'($urandom);
      en  = 4'($urandom);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (out_f[j] != (en[j] ? in_f[sel[j]] : FLIT_NONE)) begin
          failures++; $display("t=%0d: output %0d wrong", t, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
