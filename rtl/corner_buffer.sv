// corner_buffer: the one buffer of the semi-bufferless router.
//
// A flit that has finished its x transport (it reached its destination
// column) turns off the x-ring into this buffer; from here it enters the
// y-ring as soon as a free y slot passes. Flits leave in the order they came
// in, which keeps the flit order of the X-Y route. The buffer is a circular
// FIFO with show-ahead output: the oldest flit is on `head` whenever
// `not_empty` is high.
//
// Interface: push/push_flit write one flit per cycle while `full` is low, or
// while a pop happens in the same cycle; pop removes the head. `can_push` is
// `!full || pop`, so a full buffer drained this cycle accepts a flit at once.
// Timing: a flit pushed at a clock edge is on `head` right after that edge.
// The buffer itself follows the router slides; its depth (default 4) is this
// design's own choice, the slides' power plot sweeps it between 1 and 64.
module corner_buffer
  import flit_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t push_flit,
  input  logic  pop,
  output flit_t head,
  output logic  not_empty,
  output logic  full,
  output logic  can_push
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t           mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [CW-1:0]   count;

  assign not_empty = (count != '0);
  assign full      = (count == CW'(DEPTH));
  assign can_push  = !full || pop;
  assign head      = not_empty ? mem[rd_ptr] : FLIT_NONE;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && can_push) mem[wr_ptr] <= push_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && can_push) wr_ptr <= next_ptr(wr_ptr);
      if (pop && not_empty) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push && can_push) - CW'(pop && not_empty);
    end
  end

  // A pop from an empty buffer or a push into a full one that is not
  // drained in the same cycle is a caller error.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> not_empty)
    else $error("corner_buffer: pop while empty");
  assert property (@(posedge clk) disable iff (!rst_n) push |-> can_push)
    else $error("corner_buffer: push while full");

endmodule
