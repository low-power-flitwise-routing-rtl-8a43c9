// torus_router: semi-bufferless router of the unidirectional torus.
//
// Each router sits on one x-ring (its row) and one y-ring (its column). Both
// rings rotate constantly: the x_out and y_out registers are the ring slots,
// and every flit moves one router per cycle. A router has 2+1 inputs (x-ring,
// y-ring, local inject), 2+1 outputs (x-ring, y-ring, local eject), a 3x3
// crossbar and a single buffer, the corner buffer. Routing is fixed X then Y:
//   - a local flit enters the x-ring when the slot passing by is empty; a
//     flit for this router's own column goes straight to the corner buffer;
//   - a flit on the x-ring travels until it reaches its destination column,
//     then turns into the corner buffer (or ejects here if this is also its
//     row);
//   - the corner buffer's oldest flit enters the y-ring when the y slot
//     passing by is empty, and travels until its row, where it ejects.
// Nothing stalls on a ring. A flit that cannot leave the ring (corner buffer
// full, or the eject port taken by the other ring's flit) goes on for an
// extra round and comes back RING cycles later. order_keeper blocks make sure
// such a flit still leaves before the flits that arrived after it. A router
// that cannot find an empty slot (for a local flit on the x-ring, or for its
// corner buffer's head on the y-ring) asks its predecessor on that ring,
// over xreq_out/yreq_out, to leave a slot empty. A predecessor with a request
// pending passes the request further upstream when its own slot is full; when
// the slot is empty it leaves it empty, unless it is waiting for a slot
// itself and already gave up the previous one (then it takes this one).
//
// Interface and timing: x_in/y_in come straight from the predecessors'
// x_out/y_out registers; xreq_in/yreq_in come from the successors' registered
// request outputs. The local inject port is a valid/ready handshake (ready
// may depend on the flit's destination column); ej_flit is registered and
// valid for one cycle per delivered flit. Zero-load latency from the inject
// handshake to ej_flit.valid is dx + dy cycles, plus one when dy > 0 (the
// corner buffer), where dx, dy are the hop counts along the rings.
//
// The ring structure, the port counts, the 3x3 crossbar, the single corner
// buffer, the extra rounds and the slot requests to the predecessor follow
// the slides. Eject priority (y-ring first), the direct path from inject to
// the corner buffer, the one-cycle registered request wires and the
// alternating yield of a waiting router are this design's own choices.
// Flits may not be addressed to their own source.
module torus_router
  import flit_pkg::*;
#(
  parameter int unsigned NX       = 4,   // routers per x-ring
  parameter int unsigned NY       = 4,   // routers per y-ring
  parameter int unsigned MY_X     = 0,   // this router's column
  parameter int unsigned MY_Y     = 0,   // this router's row
  parameter int unsigned CB_DEPTH = 4    // corner buffer depth in flits
) (
  input  logic       clk,
  input  logic       rst_n,
  // x-ring
  input  flit_t      x_in,
  output flit_t      x_out,
  input  logic       xreq_in,     // successor asks for an empty x slot
  output logic       xreq_out,    // ask predecessor for an empty x slot
  // y-ring
  input  flit_t      y_in,
  output flit_t      y_out,
  input  logic       yreq_in,
  output logic       yreq_out,
  // local port
  input  logic       inj_valid,
  input  flit_t      inj_flit,    // valid bit ignored, inj_valid qualifies it
  output logic       inj_ready,
  output flit_t      ej_flit,
  // event pulses
  output router_ev_t ev
);

  localparam int unsigned PXW = $clog2(NX);
  localparam int unsigned PYW = $clog2(NY);

  // Slot phases: a slot comes back to this router every NX (NY) cycles.
  logic [PXW-1:0] phase_x;
  logic [PYW-1:0] phase_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_x <= '0;
      phase_y <= '0;
    end else begin
      phase_x <= (phase_x == PXW'(NX - 1)) ? '0 : phase_x + 1'b1;
      phase_y <= (phase_y == PYW'(NY - 1)) ? '0 : phase_y + 1'b1;
    end
  end

  // Where the passing flits want to go.
  logic x_col_here, x_want_eject, x_want_turn, y_want_eject;
  assign x_col_here   = x_in.valid && (x_in.dst_x == COORD_W'(MY_X));
  assign x_want_eject = x_col_here && (x_in.dst_y == COORD_W'(MY_Y));
  assign x_want_turn  = x_col_here && (x_in.dst_y != COORD_W'(MY_Y));
  assign y_want_eject = y_in.valid && (y_in.dst_y == COORD_W'(MY_Y));

  // Corner buffer.
  logic  cb_push, cb_pop, cb_not_empty, cb_full, cb_can_push;
  flit_t cb_head;
  flit_t xb_in  [3];
  logic [1:0] xb_sel [3];
  flit_t xb_out [3];

  corner_buffer #(.DEPTH(CB_DEPTH)) u_cb (
    .clk, .rst_n,
    .push      (cb_push),
    .push_flit (xb_out[XB_OUT_C]),
    .pop       (cb_pop),
    .head      (cb_head),
    .not_empty (cb_not_empty),
    .full      (cb_full),
    .can_push  (cb_can_push)
  );

  // Exit points: y-ring eject, x-ring eject, x-ring turn.
  logic y_ej_take, y_ej_defl, y_ej_held;
  logic x_ej_take, x_ej_defl, x_ej_held;
  logic x_tn_take, x_tn_defl, x_tn_held;

  order_keeper #(.RING(NY)) u_ok_y_eject (
    .clk, .rst_n, .phase(phase_y), .want(y_want_eject), .res_ok(1'b1),
    .take(y_ej_take), .deflect(y_ej_defl), .held(y_ej_held)
  );

  order_keeper #(.RING(NX)) u_ok_x_eject (
    .clk, .rst_n, .phase(phase_x), .want(x_want_eject), .res_ok(!y_ej_take),
    .take(x_ej_take), .deflect(x_ej_defl), .held(x_ej_held)
  );

  order_keeper #(.RING(NX)) u_ok_x_turn (
    .clk, .rst_n, .phase(phase_x), .want(x_want_turn), .res_ok(cb_can_push),
    .take(x_tn_take), .deflect(x_tn_defl), .held(x_tn_held)
  );

  // Slot availability after this cycle's exits.
  logic x_free, y_free;
  assign x_free = !x_in.valid || x_tn_take || x_ej_take;
  assign y_free = !y_in.valid || y_ej_take;

  // Fairness between a waiting router and a requesting successor: a router
  // that wants an empty slot while its successor asks for one leaves the
  // first such slot to the successor and takes the next one itself. Without
  // this, a ring on which every router waits would pass empty slots forever.
  logic yielded_x, yielded_y;
  logic x_slot_mine, y_slot_mine;
  assign x_slot_mine = x_free && (!xreq_in || yielded_x);
  assign y_slot_mine = y_free && (!yreq_in || yielded_y);

  // Corner buffer head enters the y-ring on an empty slot it may use.
  assign cb_pop = cb_not_empty && y_slot_mine;

  // Local injection.
  logic inj_col_here, inj_to_x, inj_to_cb;
  assign inj_col_here = (inj_flit.dst_x == COORD_W'(MY_X));
  assign inj_to_x     = inj_valid && !inj_col_here && x_slot_mine;
  assign inj_to_cb    = inj_valid && inj_col_here && !x_tn_take && cb_can_push;
  assign inj_ready    = inj_col_here ? (!x_tn_take && cb_can_push) : x_slot_mine;
  assign cb_push      = x_tn_take || inj_to_cb;

  // Crossbar.
  flit_t inj_f;
  always_comb begin
    inj_f       = inj_flit;
    inj_f.valid = 1'b1;
    xb_in[XB_IN_X] = x_in;
    xb_in[XB_IN_Y] = y_in;
    xb_in[XB_IN_L] = inj_f;

    if (x_in.valid && !x_tn_take && !x_ej_take) xb_sel[XB_OUT_X] = XB_IN_X;
    else if (inj_to_x)                          xb_sel[XB_OUT_X] = XB_IN_L;
    else                                        xb_sel[XB_OUT_X] = XB_NONE;

    if (x_tn_take)      xb_sel[XB_OUT_C] = XB_IN_X;
    else if (inj_to_cb) xb_sel[XB_OUT_C] = XB_IN_L;
    else                xb_sel[XB_OUT_C] = XB_NONE;

    if (y_ej_take)      xb_sel[XB_OUT_E] = XB_IN_Y;
    else if (x_ej_take) xb_sel[XB_OUT_E] = XB_IN_X;
    else                xb_sel[XB_OUT_E] = XB_NONE;
  end

  xbar3x3 u_xbar (.in(xb_in), .sel(xb_sel), .out(xb_out));

  // The y-ring slot keeps a passing flit or takes the corner buffer head.
  flit_t y_next;
  always_comb begin
    if (y_in.valid && !y_ej_take) y_next = y_in;
    else if (cb_pop)              y_next = cb_head;
    else                          y_next = FLIT_NONE;
  end

  // Slot requests to the predecessors.
  logic x_wants, xreq_d, yreq_d;
  assign x_wants = inj_valid && !inj_col_here;
  assign xreq_d  = (x_wants && !x_slot_mine) || (xreq_in && !x_free);
  assign yreq_d  = (cb_not_empty && !y_slot_mine) || (yreq_in && !y_free);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out    <= FLIT_NONE;
      y_out    <= FLIT_NONE;
      ej_flit  <= FLIT_NONE;
      xreq_out  <= 1'b0;
      yreq_out  <= 1'b0;
      yielded_x <= 1'b0;
      yielded_y <= 1'b0;
    end else begin
      if (x_wants && x_free)      yielded_x <= xreq_in && !yielded_x;
      if (cb_not_empty && y_free) yielded_y <= yreq_in && !yielded_y;
      x_out    <= xb_out[XB_OUT_X];
      y_out    <= y_next;
      ej_flit  <= xb_out[XB_OUT_E];
      xreq_out <= xreq_d;
      yreq_out <= yreq_d;
    end
  end

  // Events.
  always_comb begin
    ev               = '0;
    ev.inject_x      = inj_to_x;
    ev.inject_corner = inj_to_cb;
    ev.turn          = x_tn_take;
    ev.enter_y       = cb_pop;
    ev.eject_x       = x_ej_take;
    ev.eject_y       = y_ej_take;
    ev.round_cb_full = x_tn_defl && cb_full && !cb_pop;
    ev.round_eject   = x_ej_defl && y_ej_take;
    ev.round_order   = y_ej_held || x_ej_held || x_tn_held;
    ev.req_x         = xreq_d;
    ev.req_y         = yreq_d;
    ev.yield_x       = x_wants && x_free && !x_slot_mine;
    ev.yield_y       = cb_not_empty && y_free && !y_slot_mine;
  end

  // A flit on the y-ring is already in its destination column.
  assert property (@(posedge clk) disable iff (!rst_n)
                   y_in.valid |-> (y_in.dst_x == COORD_W'(MY_X)))
    else $error("torus_router: y-ring flit outside its column");
  // The y-ring eject port has priority, so only the flit order holds a
  // y-ring flit back.
  assert property (@(posedge clk) disable iff (!rst_n) y_ej_defl |-> y_ej_held)
    else $error("torus_router: y-ring flit deflected without cause");
  // A router does not send flits to itself.
  assert property (@(posedge clk) disable iff (!rst_n)
                   inj_valid |-> !(inj_col_here && inj_flit.dst_y == COORD_W'(MY_Y)))
    else $error("torus_router: flit addressed to its own source");

endmodule
