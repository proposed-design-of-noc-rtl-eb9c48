// flit_fifo: small first-in first-out queue of flits. It is the router's side
// buffer, which holds flits that would otherwise have been deflected until a
// pipeline slot is free to re-inject them; the network interface uses it as
// its injection queue too.
//
// A circular array with read and write pointers and an occupancy counter.
// Push and pop may happen in the same cycle, also when full (the pop frees the
// place). The head flit is shown on `head` whenever `empty` is low
// (first-word fall-through), so a pop takes effect at the next clock edge.
// Depth 4 matches the four slots drawn for the side buffer; the document
// only asks for a "small FIFO". Synchronous active-high reset.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int DEPTH = 4,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t head,
  output logic  empty,
  output logic  full,
  output logic [AW:0] count
);
  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign head  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // A push into a full queue without a pop is lost; the router never does it.
  property p_no_overflow;
    @(posedge clk) disable iff (rst) !(push && full && !pop);
  endproperty
  assert property (p_no_overflow) else $error("flit_fifo: push while full");
endmodule
