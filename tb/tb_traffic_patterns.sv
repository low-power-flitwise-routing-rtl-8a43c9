// tb_traffic_patterns: saturation throughput of the torus under the
// synthetic traffic patterns of the evaluation (uniform random, tornado,
// neighbor), on an 8 x 8 torus (on the default 4 x 4 torus tornado and
// neighbor would be the same pattern).
//
// Every router offers a flit on every cycle (a saturated source). After a
// warm-up of WARM cycles the testbench counts delivered flits for MEAS
// cycles and reports the accepted throughput in flits/cycle/router. Between
// patterns the network is drained. Destinations, for router (x, y) on a k x k
// torus, follow the usual synthetic patterns:
//   uniform random: any other router, uniformly;
//   tornado:        ((x + ceil(k/2) - 1) mod k, (y + ceil(k/2) - 1) mod k);
//   neighbor:       ((x + 1) mod k, (y + 1) mod k).
// Checked throughout: each
// flit reaches its destination, flits of a source/destination pair arrive in
// order, nothing is lost, and every pattern delivers traffic.
module tb_traffic_patterns;
  import flit_pkg::*;

  localparam int unsigned NX = 8, NY = 8, NN = NX * NY;
  localparam int WARM = 500, MEAS = 3000;

  logic       clk = 0, rst_n = 0;
  logic       inj_valid [NN];
  flit_t      inj_flit  [NN];
  logic       inj_ready [NN];
  flit_t      ej_flit   [NN];
  router_ev_t ev        [NN];
  int         checks = 0, failures = 0;

  torus_noc #(.NX(NX), .NY(NY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  int sent_seq [NN][NN];
  int exp_seq  [NN][NN];
  int n_sent, n_recv;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < NN; d++) begin
        if (ej_flit[d].valid) begin
          int s, q;
          s = int'(ej_flit[d].data[31:24]);
          q = int'(ej_flit[d].data[23:0]);
          n_recv++;
          check(int'(ej_flit[d].dst_x) == d % NX && int'(ej_flit[d].dst_y) == d / NX,
                "delivered to its destination");
          check(q == exp_seq[s][d], "in order, none lost");
          exp_seq[s][d] = q + 1;
        end
      end
    end
  end

  function automatic int pick_dest(input int pattern, input int s);
    int x = s % NX, y = s / NX, d;
    case (pattern)
      0: begin
        do d = $urandom_range(0, NN - 1); while (d == s);
      end
      1: d = ((y + (NY + 1) / 2 - 1) % NY) * NX + (x + (NX + 1) / 2 - 1) % NX;
      default: d = ((y + 1) % NY) * NX + (x + 1) % NX;
    endcase
    return d;
  endfunction

  // Run one pattern with saturated sources; returns delivered flits in the
  // measurement window.
  task automatic run_pattern(input int pattern, output int delivered);
    int recv_start;
    for (int c = 0; c < WARM + MEAS; c++) begin
      @(negedge clk);
      if (c == WARM) recv_start = n_recv;
      for (int s = 0; s < NN; s++) begin
        if (!inj_valid[s]) begin
          int d;
          d = pick_dest(pattern, s);
          inj_valid[s] = 1;
          inj_flit[s].valid = 1'b1;
          inj_flit[s].dst_x = COORD_W'(d % NX);
          inj_flit[s].dst_y = COORD_W'(d / NX);
          inj_flit[s].data  = {8'(s), 24'(sent_seq[s][d])};
        end
      end
      #1;
      for (int s = 0; s < NN; s++) begin
        if (inj_ready[s]) begin
          int d;
          d = int'(inj_flit[s].dst_y) * NX + int'(inj_flit[s].dst_x);
          sent_seq[s][d]++;
          n_sent++;
          fork
            automatic int ss = s;
            begin @(posedge clk); #1 inj_valid[ss] = 0; end
          join_none
        end
      end
    end
    @(negedge clk);
    delivered = n_recv - recv_start;
    // Stop offering and drain.
    for (int s = 0; s < NN; s++) inj_valid[s] = 0;
    repeat (600) @(posedge clk);
    check(n_recv == n_sent, "drained completely");
  endtask

  string names [3] = '{"uniform random", "tornado", "neighbor"};

  initial begin
    for (int s = 0; s < NN; s++) begin
      inj_valid[s] = 0;
      inj_flit[s]  = FLIT_NONE;
      for (int d = 0; d < NN; d++) begin sent_seq[s][d] = 0; exp_seq[s][d] = 0; end
    end
    n_sent = 0; n_recv = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      int delivered;
      run_pattern(p, delivered);
      check(delivered > 0, "pattern delivers traffic");
      $display("%s: accepted %0d flits in %0d cycles, %0.3f flits/cycle/router",
               names[p], delivered, MEAS, real'(delivered) / real'(MEAS * NN));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
