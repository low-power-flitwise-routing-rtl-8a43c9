// tb_order_keeper: self-checking test of the extra-round order keeper.
//
// The testbench models one constantly rotating ring of RING slots passing an
// exit point, one slot per cycle. New flits are put into empty slots at
// random, numbered in the order they first reach the exit; the resource
// behind the exit is free at random. A flit that is not taken stays in its
// slot and comes back RING cycles later. The rule checked every cycle is that
// the exit is granted exactly when a flit is there, the resource is free and
// the flit is the oldest one not yet taken; so flits leave strictly in order
// and no flit waits once it is the oldest and the resource is free. The
// `held` output is checked to flag exactly the flits refused for order only.
module tb_order_keeper;

  localparam int unsigned RING = 4;
  localparam int unsigned PW   = $clog2(RING);

  logic          clk = 0, rst_n = 0;
  logic [PW-1:0] phase;
  logic          want, res_ok, take, deflect, held;
  int            checks = 0, failures = 0;

  order_keeper #(.RING(RING)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  logic slot_valid [RING];
  int   slot_seq   [RING];
  int   next_new, next_take, n_held, n_deflect;

  initial begin
    phase = '0; want = 0; res_ok = 0;
    next_new = 0; next_take = 0; n_held = 0; n_deflect = 0;
    for (int i = 0; i < RING; i++) begin slot_valid[i] = 0; slot_seq[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      int p;
      int load;
      @(negedge clk);
      p = cyc % RING;
      // Vary load and resource availability in phases.
      load = ((cyc / 2000) % 2 == 0) ? 60 : 25;
      if (!slot_valid[p] && cyc < 19000 && $urandom_range(0, 99) < load) begin
        slot_valid[p] = 1;
        slot_seq[p]   = next_new++;
      end
      phase  = PW'(p);
      want   = slot_valid[p];
      res_ok = ($urandom_range(0, 99) < (((cyc / 1000) % 2 == 0) ? 35 : 80));
      #1;
      check(take == (want && res_ok && slot_seq[p] == next_take), "take");
      check(deflect == (want && !take), "deflect");
      check(held == (want && res_ok && slot_seq[p] != next_take), "held");
      if (held) n_held++;
      if (deflect) n_deflect++;
      @(posedge clk);
      if (take) begin
        slot_valid[p] = 0;
        next_take++;
      end
    end
    check(next_take == next_new, "every flit taken");
    check(n_held > 0, "order hold happened");
    check(n_deflect > 0, "extra round happened");
    $display("flits %0d, extra rounds %0d, order holds %0d", next_new, n_deflect, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
