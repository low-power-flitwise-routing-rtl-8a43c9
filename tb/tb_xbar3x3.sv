// tb_xbar3x3: self-checking test of the router's 3x3 crossbar.
//
// Applies every combination of the three output selects (input 0, 1, 2 or
// none) with random flits on the inputs, and checks that each output carries
// exactly the selected input's flit, or an empty flit when left idle.
module tb_xbar3x3;
  import flit_pkg::*;

  flit_t      in  [3];
  logic [1:0] sel [3];
  flit_t      out [3];
  int         checks = 0, failures = 0;

  xbar3x3 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 64; s++) begin
        for (int i = 0; i < 3; i++) begin
          in[i].valid = 1'b1;
          in[i].dst_x = COORD_W'($urandom);
          in[i].dst_y = COORD_W'($urandom);
          in[i].data  = $urandom;
        end
        sel[0] = 2'(s);
        sel[1] = 2'(s >> 2);
        sel[2] = 2'(s >> 4);
        #1;
        for (int o = 0; o < 3; o++) begin
          flit_t expected;
          case (sel[o])
            2'd0:    expected = in[0];
            2'd1:    expected = in[1];
            2'd2:    expected = in[2];
            default: expected = '0;
          endcase
          checks++;
          if (out[o] !== expected) begin
            failures++;
            $display("FAIL output %0d select %0d", o, sel[o]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
