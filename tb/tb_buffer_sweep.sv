// tb_buffer_sweep: saturation throughput against corner buffer depth.
//
// Four 4x4 tori, identical except for the corner buffer depth (1, 4, 16 and
// 64 flits), run saturated uniform random traffic side by side. Each
// traffic_bench checks delivery and order; this testbench collects their
// results, prints the accepted throughput per depth and checks that a deeper
// corner buffer never makes the network accept much less than the one-flit
// buffer, and that the deepest one accepts more.
module tb_buffer_sweep;

  localparam int NDEP = 4;
  localparam int MEAS = 3000;
  localparam int NN   = 16;
  localparam int DEPTHS [NDEP] = '{1, 4, 16, 64};

  logic clk = 0, rst_n = 0;
  logic done      [NDEP];
  int   delivered [NDEP];
  int   bchecks   [NDEP];
  int   bfail     [NDEP];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NDEP; i++) begin : g_dep
    traffic_bench #(
      .NX(4), .NY(4), .CB_DEPTH(DEPTHS[i]), .PATTERN(0), .MEAS(MEAS)
    ) u_bench (
      .clk, .rst_n,
      .done      (done[i]),
      .delivered (delivered[i]),
      .checks    (bchecks[i]),
      .failures  (bfail[i])
    );
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      #1;
      all_done = 1;
      for (int i = 0; i < NDEP; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NDEP; i++) begin
      checks   += bchecks[i];
      failures += bfail[i];
      $display("corner buffer %2d: %0.3f flits/cycle/router", DEPTHS[i],
               real'(delivered[i]) / real'(MEAS * NN));
      checks++;
      if (delivered[i] * 100 < delivered[0] * 95) begin
        failures++;
        $display("FAIL depth %0d accepts much less than depth 1", DEPTHS[i]);
      end
    end
    checks++;
    if (delivered[NDEP-1] <= delivered[0]) begin
      failures++;
      $display("FAIL deepest buffer accepts no more than depth 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
