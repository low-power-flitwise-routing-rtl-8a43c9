// tb_torus_noc: end-to-end test of the torus network at its default size.
//
// Every router gets a traffic source and a sink. Each flit's payload carries
// its source number and a sequence number per source/destination pair; the
// sink at each router checks that a flit arrives at its own destination, that
// flits of a pair arrive in the order they were sent and that none is lost or
// duplicated. Three phases:
//   1. zero load: single flits between chosen routers, with the latency
//      checked against dx + dy (+1 when the flit uses the y-ring), dx and dy
//      being the hops along the unidirectional rings;
//   2. uniform random traffic at high load;
//   3. a hot column: every router sends to column 0, which fills corner
//      buffers and forces extra rounds.
// After a drain the testbench checks that everything sent was delivered and
// that every mechanism of the router happened at least once: injection to
// the x-ring and to the corner buffer, turns, y-ring entry, ejection from
// both rings, extra rounds for a full corner buffer, for an eject conflict and
// for order keeping, and slot requests and yields on both rings.
module tb_torus_noc;
  import flit_pkg::*;

  localparam int unsigned NX = 4, NY = 4, NN = NX * NY;
  localparam int unsigned NEV = $bits(router_ev_t);

  logic       clk = 0, rst_n = 0;
  logic       inj_valid [NN];
  flit_t      inj_flit  [NN];
  logic       inj_ready [NN];
  flit_t      ej_flit   [NN];
  router_ev_t ev        [NN];
  int         checks = 0, failures = 0;

  torus_noc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
  int ev_count [NEV];

  // Sinks and event counters.
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
        for (int e = 0; e < NEV; e++) if (ev[d][e]) ev_count[e]++;
      end
    end
  end

  function automatic flit_t mk(input int s, input int d);
    flit_t f;
    f.valid = 1'b1;
    f.dst_x = COORD_W'(d % NX);
    f.dst_y = COORD_W'(d / NX);
    f.data  = {8'(s), 24'(sent_seq[s][d])};
    return f;
  endfunction

  // One cycle of traffic generation: pattern 0 idle, 1 uniform, 2 hot column.
  task automatic traffic_cycle(input int pattern, input int rate);
    @(negedge clk);
    for (int s = 0; s < NN; s++) begin
      if (!inj_valid[s] && pattern != 0 && $urandom_range(0, 99) < rate) begin
        int d;
        do begin
          if (pattern == 1) d = $urandom_range(0, NN - 1);
          else              d = NX * $urandom_range(0, NY - 1);
        end while (d == s);
        inj_valid[s] = 1;
        inj_flit[s]  = mk(s, d);
      end
    end
    #1;
    for (int s = 0; s < NN; s++) begin
      if (inj_valid[s] && inj_ready[s]) begin
        int d = int'(inj_flit[s].dst_y) * NX + int'(inj_flit[s].dst_x);
        sent_seq[s][d]++;
        n_sent++;
        // Cleared right after the clock edge that takes it.
        fork
          automatic int ss = s;
          begin @(posedge clk); #1 inj_valid[ss] = 0; end
        join_none
      end
    end
  endtask

  task automatic zero_load(input int s, input int d);
    int dx = (d % NX - s % NX + NX) % NX;
    int dy = (d / NX - s / NX + NY) % NY;
    int lat = 0;
    @(negedge clk);
    inj_valid[s] = 1;
    inj_flit[s]  = mk(s, d);
    #1 check(inj_ready[s], "zero load: ready");
    @(posedge clk);
    sent_seq[s][d]++;
    n_sent++;
    #1 inj_valid[s] = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!ej_flit[d].valid && lat < 100);
    check(lat == dx + dy + (dy > 0 ? 1 : 0), "zero-load latency");
    if (lat != dx + dy + (dy > 0 ? 1 : 0))
      $display("  %0d -> %0d: latency %0d", s, d, lat);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    for (int s = 0; s < NN; s++) begin
      inj_valid[s] = 0;
      inj_flit[s]  = FLIT_NONE;
      for (int d = 0; d < NN; d++) begin sent_seq[s][d] = 0; exp_seq[s][d] = 0; end
    end
    for (int e = 0; e < NEV; e++) ev_count[e] = 0;
    n_sent = 0; n_recv = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Phase 1: zero load, all source/destination pairs from two sources.
    for (int s = 0; s < NN; s += 5)
      for (int d = 0; d < NN; d++)
        if (d != s) zero_load(s, d);

    // Phase 2: uniform random traffic.
    for (int c = 0; c < 4000; c++) traffic_cycle(1, 30);
    // Phase 3: hot column.
    for (int c = 0; c < 3000; c++) traffic_cycle(2, 40);
    // Drain: let pending injections finish, then wait.
    for (int c = 0; c < 2000; c++) traffic_cycle(0, 0);

    check(n_recv == n_sent, "everything delivered");
    $display("flits sent %0d, delivered %0d", n_sent, n_recv);
    $display("events: inject_x %0d inject_corner %0d turn %0d enter_y %0d eject_x %0d eject_y %0d",
             ev_count[12], ev_count[11], ev_count[10], ev_count[9], ev_count[8], ev_count[7]);
    $display("        round_cb_full %0d round_eject %0d round_order %0d req_x %0d req_y %0d yield_x %0d yield_y %0d",
             ev_count[6], ev_count[5], ev_count[4], ev_count[3], ev_count[2], ev_count[1], ev_count[0]);
    for (int e = 0; e < NEV; e++) check(ev_count[e] > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
