// traffic_bench: saturated traffic source and checking sink for one torus.
//
// Instantiates a torus_noc of the given size and corner buffer depth and
// offers a flit at every router on every cycle, with destinations from one
// synthetic pattern (0 uniform random, 1 tornado, 2 neighbor). After WARM
// cycles it counts delivered flits for MEAS cycles, then stops offering and
// drains for DRAIN cycles. Every delivered flit is checked for its
// destination and for the order within its source/destination pair, and at
// the end all flits must have arrived. Results appear on the output ports
// when `done` rises.
module traffic_bench
  import flit_pkg::*;
#(
  parameter int unsigned NX       = 8,
  parameter int unsigned NY       = 8,
  parameter int unsigned CB_DEPTH = 4,
  parameter int          PATTERN  = 0,
  parameter int          WARM     = 500,
  parameter int          MEAS     = 3000,
  parameter int          DRAIN    = 800
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   delivered,
  output int   checks,
  output int   failures
);

  localparam int unsigned NN = NX * NY;

  logic       inj_valid [NN];
  flit_t      inj_flit  [NN];
  logic       inj_ready [NN];
  flit_t      ej_flit   [NN];
  router_ev_t ev        [NN];

  torus_noc #(.NX(NX), .NY(NY), .CB_DEPTH(CB_DEPTH)) u_noc (.*);

  int sent_seq [NN][NN];
  int exp_seq  [NN][NN];
  int n_sent, n_recv, cyc;
  logic offering;

  function automatic int pick_dest(input int s);
    int x = s % NX, y = s / NX, d;
    case (PATTERN)
      0: begin
        do d = $urandom_range(0, NN - 1); while (d == s);
      end
      1: d = ((y + (NY + 1) / 2 - 1) % NY) * NX + (x + (NX + 1) / 2 - 1) % NX;
      default: d = ((y + 1) % NY) * NX + (x + 1) % NX;
    endcase
    return d;
  endfunction

  function automatic flit_t next_flit(input int s);
    flit_t f;
    int d;
    d = pick_dest(s);
    f.valid = 1'b1;
    f.dst_x = COORD_W'(d % NX);
    f.dst_y = COORD_W'(d / NX);
    f.data  = {8'(s), 24'(sent_seq[s][d])};
    return f;
  endfunction

  assign offering = (cyc < WARM + MEAS);

  // Sources: a new flit replaces the offered one after each handshake.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0;
      n_sent = 0;
      for (int s = 0; s < NN; s++) begin
        inj_valid[s] <= 1'b0;
        inj_flit[s]  <= FLIT_NONE;
        for (int d = 0; d < NN; d++) sent_seq[s][d] = 0;
      end
    end else begin
      cyc <= cyc + 1;
      for (int s = 0; s < NN; s++) begin
        if (inj_valid[s] && inj_ready[s]) begin
          int d;
          d = int'(inj_flit[s].dst_y) * NX + int'(inj_flit[s].dst_x);
          sent_seq[s][d]++;
          n_sent++;
        end
      end
      for (int s = 0; s < NN; s++) begin
        if (!inj_valid[s] || inj_ready[s]) begin
          inj_valid[s] <= offering;
          inj_flit[s]  <= next_flit(s);
        end
      end
    end
  end

  // Sinks.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_recv = 0;
      delivered = 0;
      checks = 0;
      failures = 0;
      done = 1'b0;
      for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) exp_seq[s][d] = 0;
    end else begin
      for (int d = 0; d < NN; d++) begin
        if (ej_flit[d].valid) begin
          int s, q;
          s = int'(ej_flit[d].data[31:24]);
          q = int'(ej_flit[d].data[23:0]);
          n_recv++;
          if (cyc >= WARM && cyc < WARM + MEAS) delivered++;
          checks += 2;
          if (!(int'(ej_flit[d].dst_x) == d % NX && int'(ej_flit[d].dst_y) == d / NX)) failures++;
          if (q != exp_seq[s][d]) failures++;
          exp_seq[s][d] = q + 1;
        end
      end
      if (cyc == WARM + MEAS + DRAIN && !done) begin
        checks++;
        if (n_recv != n_sent) failures++;
        done = 1'b1;
      end
    end
  end

endmodule
