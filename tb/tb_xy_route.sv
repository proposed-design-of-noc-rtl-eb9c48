// tb_xy_route: checks the XY route computation for every router position and
// destination in an 8 x 8 mesh: x is corrected first, then y, and a flit at
// its destination is reported as arrived.
module tb_xy_route;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  coord_t hx, hy, dx, dy;
  dir_e   dir;
  logic   arrived;

  xy_route dut (.here_x(hx), .here_y(hy), .dst_x(dx), .dst_y(dy), .dir(dir), .arrived(arrived));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) begin
        logic exp_arr;
        dir_e exp_dir;
        hx = coord_t'(a); hy = coord_t'(b); dx = coord_t'(c); dy = coord_t'(d);
        #1;
        exp_arr = (a == c) && (b == d);
        exp_dir = (c > a) ? DIR_E : (c < a) ? DIR_W : (d > b) ? DIR_N : DIR_S;
        checks++;
        if (arrived != exp_arr || (!exp_arr && dir != exp_dir)) begin
          failures++;
          $display("here (%0d,%0d) dst (%0d,%0d): dir %0d arrived %0b", a, b, c, d, dir, arrived);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
