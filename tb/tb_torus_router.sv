// tb_torus_router: self-checking test of one semi-bufferless router.
//
// The router under test sits at column MX, row MY of a 4x4 torus. The
// testbench plays the rest of both rings: what leaves on x_out for another
// column, or on y_out for another row, is taken off by the (modelled) next
// routers; a flit that leaves on x_out or y_out although this router is its
// exit point is on an extra round and comes back exactly one ring length
// (4 cycles) later. The testbench also puts flits of other routers into empty
// slots heading for the router, and drives the slot requests of the
// successors.
//
// Part 1 checks the zero-load paths and their timing one by one: pass on the
// x-ring, eject from the x-ring, turn to the y-ring through the corner buffer,
// inject to the x-ring, inject to the corner buffer, eject from the y-ring.
// Part 2 checks the conflict rules: eject port conflict, corner buffer full,
// an injection refused for a successor's request, and slot requests sent
// upstream. Part 3 runs random traffic and checks that every flit leaves
// exactly once, through the right exit, and that flits of one stream leave
// each exit in the order they were sent.
module tb_torus_router;
  import flit_pkg::*;

  localparam int unsigned NX = 4, NY = 4, MX = 1, MY = 2, CBD = 4;

  logic       clk = 0, rst_n = 0;
  flit_t      x_in, x_out, y_in, y_out, inj_flit, ej_flit;
  logic       xreq_in, xreq_out, yreq_in, yreq_out, inj_valid, inj_ready;
  router_ev_t ev;
  int         checks = 0, failures = 0;

  torus_router #(.NX(NX), .NY(NY), .MY_X(MX), .MY_Y(MY), .CB_DEPTH(CBD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  // Stream classes, carried in the top bits of the payload.
  localparam int C_X = 1, C_Y = 2, C_L = 3;
  int seq [4];

  function automatic flit_t mk(input int cls, input int dx, input int dy);
    flit_t f;
    f.valid = 1'b1;
    f.dst_x = COORD_W'(dx);
    f.dst_y = COORD_W'(dy);
    f.data  = {4'(cls), 28'(seq[cls])};
    seq[cls]++;
    return f;
  endfunction

  // Ring models: delay lines feeding x_in / y_in.
  flit_t xr [NX-1];
  flit_t yr [NY-1];
  assign x_in = xr[NX-2];
  assign y_in = yr[NY-2];

  // What left through which exit, for the scoreboard.
  int   n_sent, n_left;
  int   last_seq [3][4];  // exit (0 ej, 1 x, 2 y) x class
  router_ev_t seen;

  task automatic note_exit(input int ex, input flit_t f);
    int cls = int'(f.data[31:28]);
    int s   = int'(f.data[27:0]);
    n_left++;
    check(s > last_seq[ex][cls], "stream order at exit");
    last_seq[ex][cls] = s;
    case (ex)
      0: check(f.dst_x == MX && f.dst_y == MY, "ejected flit is for this router");
      1: check(f.dst_x != MX, "x exit only for other columns");
      default: check(f.dst_x == MX && f.dst_y != MY, "y exit only for other rows");
    endcase
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      seen <= seen | ev;
      for (int i = NX - 2; i > 0; i--) xr[i] <= xr[i-1];
      for (int i = NY - 2; i > 0; i--) yr[i] <= yr[i-1];
      xr[0] <= (x_out.valid && x_out.dst_x == MX) ? x_out : FLIT_NONE;
      yr[0] <= (y_out.valid && y_out.dst_y == MY) ? y_out : FLIT_NONE;
      if (x_out.valid && x_out.dst_x != MX) note_exit(1, x_out);
      if (y_out.valid && y_out.dst_y != MY) note_exit(2, y_out);
      if (ej_flit.valid) note_exit(0, ej_flit);
    end
  end

  // Put a flit into the slot that reaches the router in the next cycle.
  task automatic put_x(input flit_t f);
    xr[NX-2] = f;
    n_sent++;
  endtask
  task automatic put_y(input flit_t f);
    yr[NY-2] = f;
    n_sent++;
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  flit_t f, g;

  initial begin
    for (int c = 0; c < 4; c++) seq[c] = 0;
    for (int e = 0; e < 3; e++) for (int c = 0; c < 4; c++) last_seq[e][c] = -1;
    for (int i = 0; i < NX - 1; i++) xr[i] = FLIT_NONE;
    for (int i = 0; i < NY - 1; i++) yr[i] = FLIT_NONE;
    seen = '0; n_sent = 0; n_left = 0;
    xreq_in = 0; yreq_in = 0; inj_valid = 0; inj_flit = FLIT_NONE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    tick();

    // ---- Part 1: zero-load paths ----
    f = mk(C_X, 3, 0); put_x(f);                 // pass on x
    tick();
    check(x_out == f, "x pass: on x_out one cycle later");

    f = mk(C_X, MX, MY); put_x(f);               // eject from x
    tick();
    check(ej_flit == f, "x eject: on ej_flit one cycle later");

    f = mk(C_X, MX, 0); put_x(f);                // turn
    tick();
    check(!y_out.valid, "turn: in corner buffer after one cycle");
    tick();
    check(y_out == f, "turn: on y_out after two cycles");

    f = mk(C_Y, MX, MY); put_y(f);               // eject from y
    tick();
    check(ej_flit == f, "y eject: on ej_flit one cycle later");

    f = mk(C_L, 2, 3);                           // inject onto x
    inj_valid = 1; inj_flit = f;
    #1 check(inj_ready, "inject x: ready on empty slot");
    tick();
    inj_valid = 0; n_sent++;
    check(x_out == f, "inject x: on x_out one cycle later");

    f = mk(C_L, MX, 3);                          // inject to corner buffer
    inj_valid = 1; inj_flit = f;
    #1 check(inj_ready, "inject corner: ready");
    tick();
    inj_valid = 0; n_sent++;
    check(!y_out.valid, "inject corner: in buffer after one cycle");
    tick();
    check(y_out == f, "inject corner: on y_out after two cycles");
    repeat (2) tick();

    // ---- Part 2: conflicts ----
    // Eject conflict: both rings bring a flit for this router.
    f = mk(C_X, MX, MY); put_x(f);
    g = mk(C_Y, MX, MY); put_y(g);
    tick();
    check(ej_flit == g, "eject conflict: y-ring flit wins");
    check(x_out == f, "eject conflict: x-ring flit takes an extra round");
    check(seen.round_eject, "eject conflict event");
    repeat (NX) tick();
    check(ej_flit == f, "eject conflict: flit ejected after one round");

    // Successor request: an empty slot is left free, no injection.
    f = mk(C_L, 3, 1);
    xreq_in = 1; inj_valid = 1; inj_flit = f;
    #1 check(!inj_ready, "request from successor: injection refused");
    tick();
    check(!x_out.valid, "request from successor: slot left empty");
    check(xreq_out, "waiting injector asks its own predecessor");
    xreq_in = 0;
    #1 check(inj_ready, "injection once request is gone");
    tick();
    inj_valid = 0; n_sent++;
    check(x_out == f, "injected after request");
    tick();
    check(!xreq_out, "request dropped after injection");

    // No free slot: a passing flit blocks the injection.
    f = mk(C_X, 0, 0); put_x(f);
    g = mk(C_L, 2, 0);
    inj_valid = 1; inj_flit = g;
    #1 check(!inj_ready, "no free slot: not ready");
    tick();
    check(xreq_out, "no free slot: request to predecessor");
    check(x_out == f, "no free slot: passing flit kept its slot");
    #1 check(inj_ready, "free slot next cycle");
    tick();
    inj_valid = 0; n_sent++;
    check(x_out == g, "injected on the next free slot");
    repeat (2) tick();

    // Corner buffer full: passing y-ring flits leave it no slot.
    for (int i = 0; i < CBD; i++) begin
      put_x(mk(C_X, MX, 0));
      put_y(mk(C_Y, MX, 3));
      tick();
    end
    f = mk(C_X, MX, 3); put_x(f);
    put_y(mk(C_Y, MX, 3));
    tick();
    check(x_out == f, "corner buffer full: flit takes an extra round");
    check(seen.round_cb_full, "corner buffer full event");
    check(yreq_out, "corner buffer asks y predecessor for a slot");
    // The buffer drains one flit now, but a later flit for the same exit
    // must still wait behind the one on its extra round.
    g = mk(C_X, MX, 1); put_x(g);
    tick();
    check(x_out == g, "order: later flit sent round behind the waiting one");
    check(seen.round_order, "order hold event");
    // A successor's request makes the buffer leave a free slot.
    yreq_in = 1;
    tick();
    check(!y_out.valid, "request from y successor: slot left empty");
    check(seen.yield_y, "corner buffer yielded a y slot on request");
    tick();
    check(y_out.valid, "waiting buffer takes the next slot after yielding once");
    yreq_in = 0;
    repeat (30) tick();
    check(last_seq[2][C_X] == int'(g.data[27:0]), "both deflected flits left on the y-ring in order");

    // ---- Part 3: random traffic ----
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if (!x_in.valid && $urandom_range(0, 99) < 40) begin
        int dx = $urandom_range(0, NX - 1);
        int dy = $urandom_range(0, NY - 1);
        put_x(mk(C_X, dx, dy));
      end
      if (!y_in.valid && $urandom_range(0, 99) < 30) begin
        int dy = $urandom_range(0, NY - 1);
        put_y(mk(C_Y, MX, dy));
      end
      xreq_in = ($urandom_range(0, 99) < 15);
      yreq_in = ($urandom_range(0, 99) < 25);
      if (!inj_valid && $urandom_range(0, 99) < 40) begin
        int dx, dy;
        do begin
          dx = $urandom_range(0, NX - 1);
          dy = $urandom_range(0, NY - 1);
        end while (dx == MX && dy == MY);
        inj_valid = 1;
        inj_flit  = mk(C_L, dx, dy);
      end
      #1;
      if (inj_valid && inj_ready) begin
        @(posedge clk);
        #1;
        inj_valid = 0;
        n_sent++;
      end
    end
    @(negedge clk);
    inj_valid = 0; xreq_in = 0; yreq_in = 0;
    repeat (200) tick();
    check(n_left == n_sent, "every flit left exactly once");
    check(seen.inject_x && seen.inject_corner && seen.turn && seen.enter_y, "basic events");
    check(seen.eject_x && seen.eject_y && seen.req_x && seen.req_y && seen.yield_x,
          "eject and request events");
    $display("flits sent %0d, left %0d", n_sent, n_left);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
