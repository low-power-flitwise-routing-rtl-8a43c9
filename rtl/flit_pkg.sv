// flit_pkg: types shared by the routers of the unidirectional torus.
//
// Every packet is a single flit, and every flit carries its own destination
// (column x, row y) next to its payload, so no head flit and no per-packet
// state is needed anywhere in the network. The coordinate and payload widths
// are fixed here for the whole network; the payload width is this design's
// own choice (32 bits), the coordinate width covers rings of up to 16 routers.
//
// router_ev_t is a record of one-cycle event pulses a router reports, used to
// count how often each routing mechanism happens.
package flit_pkg;

  localparam int unsigned COORD_W = 4;   // up to 16 routers per ring
  localparam int unsigned DATA_W  = 32;  // payload bits carried by a flit

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic              valid;
    coord_t            dst_x;
    coord_t            dst_y;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam flit_t FLIT_NONE = '0;

  // Crossbar port numbers: inputs and outputs of the 3x3 switch.
  localparam logic [1:0] XB_IN_X  = 2'd0;  // x-ring input
  localparam logic [1:0] XB_IN_Y  = 2'd1;  // y-ring input
  localparam logic [1:0] XB_IN_L  = 2'd2;  // local inject
  localparam logic [1:0] XB_NONE  = 2'd3;  // output left idle
  localparam int unsigned XB_OUT_X = 0;    // x-ring output slot
  localparam int unsigned XB_OUT_C = 1;    // corner path, into the corner buffer
  localparam int unsigned XB_OUT_E = 2;    // local eject

  // One-cycle event pulses of a router.
  typedef struct packed {
    logic inject_x;       // local flit entered the x-ring
    logic inject_corner;  // local flit went straight to the corner buffer
    logic turn;           // x-ring flit turned into the corner buffer
    logic enter_y;        // corner buffer flit entered the y-ring
    logic eject_x;        // x-ring flit ejected here
    logic eject_y;        // y-ring flit ejected here
    logic round_cb_full;  // extra round: corner buffer full
    logic round_eject;    // extra round: conflict at local eject port
    logic round_order;    // extra round: an older flit for this point is still circling
    logic req_x;          // slot request sent to x-ring predecessor
    logic req_y;          // slot request sent to y-ring predecessor
    logic yield_x;        // free x slot left for the successor on request
    logic yield_y;        // free y slot left for the successor on request
  } router_ev_t;

endpackage
