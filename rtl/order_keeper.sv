// order_keeper: keeps flits in order when some of them take an extra round.
//
// Rings rotate constantly, one slot per cycle, so a flit that cannot leave
// the ring at its exit point (corner buffer full, or the eject port taken)
// comes back to the same point exactly RING cycles later, in the same slot.
// A slot is named by its phase, a cycle count modulo RING that every router
// keeps. This block watches one exit point of one ring. It remembers, in
// arrival order, the phases of the flits it had to send on an extra round
// (a FIFO of phases plus one pending bit per phase), and it lets a flit leave
// only if it is the oldest one waiting: a flit in a pending slot leaves only
// when its phase is at the FIFO head, and a new flit leaves only when nothing
// is pending. Every other flit that wants this exit is sent round again and
// queued behind. Flits that share a source and destination arrive at the exit
// in the order they were sent, so they also leave in that order.
//
// Interface, all in one cycle: `want` says the flit passing now has this
// exit as its next step, `res_ok` that the resource behind the exit is free;
// `take` grants the exit, `deflect` says the flit goes round again, and
// `held` that it goes round only because an older flit is still waiting.
// The state changes at the clock edge. That the order must be kept across
// extra rounds follows the slides; this way of keeping it is this design's own.
module order_keeper #(
  parameter int unsigned RING = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(RING)-1:0] phase,
  input  logic                    want,
  input  logic                    res_ok,
  output logic                    take,
  output logic                    deflect,
  output logic                    held
);

  localparam int unsigned PW = $clog2(RING);
  localparam int unsigned CW = $clog2(RING + 1);

  logic [RING-1:0] pending;
  logic [PW-1:0]   queue [RING];
  logic [PW-1:0]   q_rd, q_wr;
  logic [CW-1:0]   q_count;
  logic            allowed, is_pending, do_push, do_pop;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(RING - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    is_pending = pending[phase];
    allowed    = is_pending ? (queue[q_rd] == phase) : (q_count == '0);
    take       = want && allowed && res_ok;
    deflect    = want && !take;
    held       = want && res_ok && !allowed;
    do_pop     = take && is_pending;
    do_push    = deflect && !is_pending;
  end

  always_ff @(posedge clk) begin
    if (do_push) queue[q_wr] <= phase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      q_rd    <= '0;
      q_wr    <= '0;
      q_count <= '0;
    end else begin
      if (do_push) begin
        pending[phase] <= 1'b1;
        q_wr           <= next_ptr(q_wr);
        q_count        <= q_count + 1'b1;
      end
      if (do_pop) begin
        pending[phase] <= 1'b0;
        q_rd           <= next_ptr(q_rd);
        q_count        <= q_count - 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(do_push && do_pop))
    else $error("order_keeper: push and pop in one cycle");

endmodule
