// tb_corner_buffer: self-checking test of the corner buffer FIFO.
//
// Drives random pushes and pops (never a pop from empty, never a push into a
// full buffer that is not drained in the same cycle) and keeps its own queue
// of the flits pushed. After every cycle it compares head, not_empty, full and
// can_push with that queue, and every popped flit with the queue's front.
// Also checks the show-ahead timing: a flit pushed into an empty buffer is on
// head right after the clock edge.
module tb_corner_buffer;
  import flit_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic  clk = 0, rst_n = 0;
  logic  push, pop;
  flit_t push_flit, head;
  logic  not_empty, full, can_push;
  int    checks = 0, failures = 0;
  flit_t model [$];

  corner_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare_state();
    check(not_empty == (model.size() != 0), "not_empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() != 0) check(head == model[0], "head");
    else check(head == FLIT_NONE, "empty head");
  endtask

  function automatic flit_t rand_flit();
    flit_t f;
    f.valid = 1'b1;
    f.dst_x = COORD_W'($urandom);
    f.dst_y = COORD_W'($urandom);
    f.data  = $urandom;
    return f;
  endfunction

  initial begin
    push = 0; pop = 0; push_flit = FLIT_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_state();

    // Show-ahead: a pushed flit is visible right after the edge.
    push = 1; push_flit = rand_flit();
    @(posedge clk); #1;
    model.push_back(push_flit);
    push = 0;
    compare_state();

    // Fill to full, check can_push, then pop and push in one full cycle.
    while (model.size() < DEPTH) begin
      @(negedge clk);
      push = 1; push_flit = rand_flit();
      @(posedge clk); #1;
      model.push_back(push_flit);
      push = 0;
    end
    compare_state();
    check(!can_push, "can_push low when full");
    @(negedge clk);
    pop = 1;
    #1 check(can_push, "can_push high when full and popping");
    push = 1; push_flit = rand_flit();
    @(posedge clk); #1;
    void'(model.pop_front());
    model.push_back(push_flit);
    push = 0; pop = 0;
    compare_state();

    // Random traffic.
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      pop  = (model.size() != 0) && ($urandom_range(0, 99) < 45);
      push = ($urandom_range(0, 99) < 50) && ((model.size() < DEPTH) || pop);
      push_flit = rand_flit();
      @(posedge clk); #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_flit);
      push = 0; pop = 0;
      compare_state();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
