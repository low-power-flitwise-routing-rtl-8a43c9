// xbar3x3: the 3x3 crossbar of the torus router.
//
// The router has 2+1 inputs (x-ring in, y-ring in, local inject) and 2+1
// outputs. The crossbar connects each output to at most one input, chosen by
// the router's routing logic: output 0 is the x-ring slot, output 1 is the
// corner path (into the corner buffer, from which flits enter the y-ring),
// output 2 is the local eject port. Which input may reach which output is the
// routing logic's business; the crossbar itself is a full 3x3 switch.
//
// Interface: sel[o] holds the input index (0, 1 or 2) for output o, or
// XB_NONE, in which case the output carries an empty flit. Purely
// combinational. The 3x3 size follows the router slides; the select encoding
// and the port order are this design's own.
module xbar3x3
  import flit_pkg::*;
(
  input  flit_t      in  [3],
  input  logic [1:0] sel [3],
  output flit_t      out [3]
);

  always_comb begin
    for (int o = 0; o < 3; o++) begin
      out[o] = (sel[o] == XB_NONE) ? FLIT_NONE : in[sel[o]];
    end
  end

endmodule
