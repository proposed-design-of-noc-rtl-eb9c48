// tb_flit_fifo: random pushes and pops against a queue model, including
// pushes into a full FIFO together with a pop, and simultaneous push and pop.
// Checks the head flit, empty, full and the occupancy count every cycle.
module tb_flit_fifo;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic push, pop, empty, full;
  flit_t din, head;
  logic [2:0] count;
  flit_t model [$];

  flit_fifo #(.DEPTH(4)) dut (.clk, .rst, .push, .din, .pop, .head, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // check state
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 4) ||
          int'(count) != model.size() || (model.size() > 0 && head != model[0])) begin
        failures++;
        $display("cycle %0d: size %0d count %0d empty %0b full %0b", cyc, model.size(), count, empty, full);
      end
      // drive: never push into a full FIFO without popping
      pop  = ($urandom % 3 != 0);
      push = ($urandom % 2 == 0) && (model.size() < 4 || (pop && model.size() > 0));
      din  = flit_t'({$urandom, $urandom, $urandom});
      din.valid = 1'b1;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push) model.push_back(din);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
