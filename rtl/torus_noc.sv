// torus_noc: unidirectional torus network of semi-bufferless routers.
//
// NX x NY routers form NY x-rings (one per row, flits move to increasing x
// and wrap from column NX-1 to column 0) and NX y-rings (one per column,
// flits move to increasing y and wrap). Both kinds of ring rotate constantly,
// one router per cycle. Slot requests run the other way round each ring, from
// a router to its predecessor. Every router has one local port where a core
// injects single-flit packets and receives the flits addressed to it.
//
// The physical layout of the slides folds each ring (routers interleaved so
// that no link has to span the whole chip); folding changes link lengths only,
// not the logical ring order, so it does not show in this netlist.
//
// Interface: per router n = y*NX + x, a valid/ready inject port (inj_valid,
// inj_flit, inj_ready), a registered eject port (ej_flit, valid for one cycle
// per delivered flit) and the router's event pulses (ev). The torus of
// unidirectional rings follows the slides; the 4x4 default follows the
// network drawn in them, and the corner buffer depth of 4 is this design's own.
module torus_noc
  import flit_pkg::*;
#(
  parameter int unsigned NX       = 4,
  parameter int unsigned NY       = 4,
  parameter int unsigned CB_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       inj_valid [NX*NY],
  input  flit_t      inj_flit  [NX*NY],
  output logic       inj_ready [NX*NY],
  output flit_t      ej_flit   [NX*NY],
  output router_ev_t ev        [NX*NY]
);

  flit_t x_link [NX*NY];   // x_out of router n
  flit_t y_link [NX*NY];   // y_out of router n
  logic  x_req  [NX*NY];   // xreq_out of router n, to its x predecessor
  logic  y_req  [NX*NY];

  for (genvar y = 0; y < NY; y++) begin : g_row
    for (genvar x = 0; x < NX; x++) begin : g_col
      localparam int unsigned N     = y * NX + x;
      localparam int unsigned XPRED = y * NX + (x + NX - 1) % NX;  // west
      localparam int unsigned XSUCC = y * NX + (x + 1) % NX;       // east
      localparam int unsigned YPRED = ((y + NY - 1) % NY) * NX + x; // south
      localparam int unsigned YSUCC = ((y + 1) % NY) * NX + x;      // north

      torus_router #(
        .NX(NX), .NY(NY), .MY_X(x), .MY_Y(y), .CB_DEPTH(CB_DEPTH)
      ) u_router (
        .clk, .rst_n,
        .x_in      (x_link[XPRED]),
        .x_out     (x_link[N]),
        .xreq_in   (x_req[XSUCC]),
        .xreq_out  (x_req[N]),
        .y_in      (y_link[YPRED]),
        .y_out     (y_link[N]),
        .yreq_in   (y_req[YSUCC]),
        .yreq_out  (y_req[N]),
        .inj_valid (inj_valid[N]),
        .inj_flit  (inj_flit[N]),
        .inj_ready (inj_ready[N]),
        .ej_flit   (ej_flit[N]),
        .ev        (ev[N])
      );
    end
  end

endmodule
