# Semi-bufferless flit routing on a unidirectional torus

A network-on-chip for small embedded cores, built so that the routers stay
tiny and cheap in power. Three ideas make it small:

- **Unidirectional torus.** Every row is a ring that only moves to increasing
  x, every column a ring that only moves to increasing y. A router therefore
  has 2+1 inputs and 2+1 outputs (x-ring, y-ring, local core) instead of the
  4+1 of a mesh router, and a 3x3 crossbar instead of a 5x5 one.
- **Constantly rotating rings.** Each ring is a chain of one-flit slots, one
  register per router, that advances one router every cycle and never stops.
  Flits on a ring are never stalled or buffered; they only enter an empty slot
  or leave the ring.
- **One buffer per router.** The only storage is the *corner buffer*, where a
  flit waits after its x journey until the y-ring offers it an empty slot.

Packets are single flits, and every flit carries its destination next to its
payload. There is no head flit, no per-packet state, no credit-based flow
control and no virtual channel. The price is a wider link (the destination
rides along with every flit) and, under load, *extra rounds*: a flit that
cannot leave a ring where it wants to just goes once more around the ring.

## How a flit travels

Routing is fixed X-then-Y. For a flit from router (sx, sy) to (dx, dy):

1. **Inject.** The local core offers the flit on a valid/ready port. If the
   destination is in another column, the flit enters the x-ring as soon as the
   slot passing the router is empty. If the destination is in the router's
   own column, the flit goes straight into the corner buffer.
2. **x transport.** The flit moves one router per cycle along the row.
3. **Turn.** At column dx it leaves the x-ring into that router's corner
   buffer. If dy is the row it is already in, it leaves to the local eject
   port at once.
4. **Enter the y-ring.** The corner buffer's oldest flit takes the first
   empty y slot passing the router.
5. **y transport and eject.** At row dy it leaves to the local eject port.

With `hx = (dx - sx) mod NX` and `hy = (dy - sy) mod NY` hops, the zero-load
latency from the inject handshake to the cycle the flit is on `ej_flit` is
`hx + hy` cycles, plus one if `hy > 0` (the cycle spent in the corner buffer).
The end-to-end testbench checks this number for 60 source/destination pairs.

All slot registers are in the routers (`x_out`, `y_out`); the wires between
routers carry no logic. `ej_flit` is registered too.

## Conflicts and extra rounds

Nothing on a ring ever waits, so every conflict at an exit point is solved
by sending the flit round the ring once more. It comes back to the same
router exactly NX (or NY) cycles later, in the same slot.

| Situation | What happens |
|---|---|
| Flit wants to turn, corner buffer full | extra round on the x-ring |
| Flits on both rings want the eject port in the same cycle | the y-ring flit ejects; the x-ring flit takes an extra round |
| Flit wants to turn or eject, an older flit for the same exit is still on its extra round | extra round (see next section) |
| Local flit finds no empty x slot, or the corner buffer's head finds no empty y slot | the router asks its ring predecessor for an empty slot |

A full corner buffer accepts a turning flit in a cycle where it is also
handing its head to the y-ring.

## Keeping flits in order

Because every flit of a source/destination pair takes the same route, flits
would arrive in the order they were sent if nothing overtook anything. Extra
rounds break this: if flit A is sent round because the corner buffer is full,
and flit B, sent after A, arrives one cycle later and finds a free entry, B
would leave before A. The design must keep order across extra rounds so that
a core can send a long piece of data as a train of single flits.

`order_keeper` sits at each of the three exit points of a router (x-ring
turn, x-ring eject, y-ring eject). It relies on the rings rotating without
ever stopping: a slot passes the router every NX cycles, so the router can
name a slot by its *phase*, a free-running cycle count modulo the ring length.

- It keeps one *pending* bit per phase and a FIFO of phases, in the order
  their flits were first sent round.
- A flit in a pending slot may leave only if its phase is at the FIFO head.
- A flit in a slot that is not pending may leave only if the FIFO is empty.
- Any flit that wants this exit but is not allowed to leave, or whose
  resource is busy, goes round again. If its slot was not yet pending, its
  phase is appended to the FIFO.

So at each exit, flits leave in exactly the order they first arrived there.
For a pair of routers that order is the order of sending. The x-ring turn
point feeds the corner buffer, which is a FIFO, and the y-ring eject point
then keeps the order a second time. The cost per exit point is RING pending
bits and a FIFO of RING entries of log2(RING) bits, plus its pointers: in the
4x4 default, 4 pending bits and 4 two-bit entries.

## Slot requests and fairness

A router that cannot find an empty slot raises a one-bit request to its
predecessor on that ring (`xreq_out`, `yreq_out`, registered, moving against
the ring). A router that sees a request from its successor does the following:

- if its own outgoing slot is full (a passing flit), it passes the request
  further upstream;
- if its outgoing slot is empty, it leaves it empty so that the slot reaches
  the successor; but if it is waiting for a slot itself and has already given
  up the previous one, it takes this one. Waiting routers therefore alternate:
  they give one slot up, then take one.

The alternation is necessary. Without it, a ring on which every router has
something waiting (easy to reach with a hot column of destinations) would
pass empty slots round forever, each router yielding to the next.

## Modules

```
torus_noc            NX x NY grid, ring and request wiring
└── torus_router     one per grid point
    ├── corner_buffer    FIFO between the x-ring and the y-ring
    ├── order_keeper x3  x turn, x eject, y eject
    └── xbar3x3          3x3 switch: {x in, y in, inject} -> {x slot, corner path, eject}
flit_pkg             flit_t, crossbar port numbers, router_ev_t
```

The crossbar's three outputs are the x-ring slot, the *corner path* into the
corner buffer and the eject port. The y-ring slot is chosen after the
crossbar, between the passing y flit and the corner buffer head.

### Flit format (`flit_pkg::flit_t`, 41 bits)

| Field | Bits | Meaning |
|---|---|---|
| `valid` | 1 | slot holds a flit |
| `dst_x` | `COORD_W` = 4 | destination column |
| `dst_y` | `COORD_W` = 4 | destination row |
| `data` | `DATA_W` = 32 | payload |

### Top-level ports (`torus_noc`)

Per router, index `n = y*NX + x`:

| Port | Dir | Meaning |
|---|---|---|
| `inj_valid[n]`, `inj_flit[n]` | in | core offers a flit (`inj_flit.valid` is ignored) |
| `inj_ready[n]` | out | flit is taken at this clock edge. It may depend on the flit's destination column. |
| `ej_flit[n]` | out | delivered flit, valid for one cycle. There is no back-pressure: the core must take it. |
| `ev[n]` | out | one-cycle event pulses (`router_ev_t`), for counting the mechanisms above |

`clk` is the clock. `rst_n` is an asynchronous, active-low reset. A core must
not send a flit to itself; an assertion catches this.

### Parameters

| Parameter | Default | Where |
|---|---|---|
| `NX`, `NY` | 4, 4 | `torus_noc`, `torus_router`. The network drawings of the design are 4x4; no size is stated. |
| `CB_DEPTH` | 4 | corner buffer entries. The original power plot labels the proposed router "PN(1,...,64)", read here as a sweep of this depth; no main value is named. |
| `COORD_W`, `DATA_W` | 4, 32 | `flit_pkg`. Not specified by the design. |

`NX` and `NY` must be at least 2 and at most 2^`COORD_W`.

## Verification

Each testbench checks against values it works out on its own, prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_corner_buffer` | Random push/pop against a queue model. It checks head, full, `can_push`, show-ahead timing, and push while full and popping. |
| `tb_order_keeper` | Models a rotating ring. It checks that the exit is granted exactly when the passing flit is the oldest one waiting and the resource is free, and that every flit leaves. |
| `tb_xbar3x3` | All 64 select combinations. |
| `tb_torus_router` | One router with the rest of both rings modelled. First, each path and its cycle timing. Then the eject conflict (including the flit's return after one round), corner buffer full, order hold, slot requests and yields. Then 6000 random cycles, checking that each flit leaves exactly once, through the right exit, and in stream order. |
| `tb_torus_noc` | The full default 4x4 network. It runs zero-load latency tests, uniform random traffic, then a hot column (every router sends to column 0). Each flit is checked for its destination and for per-pair order, and at the end for complete delivery. Each of the 13 event types must occur at least once. |
| `tb_buffer_sweep` | Four 4x4 networks with corner buffers of 1, 4, 16 and 64 flits under saturated uniform random traffic. The sources and checking sinks are in the helper `traffic_bench`. It checks delivery and order, and that a deeper buffer never accepts much less traffic than the one-flit buffer. |
| `tb_traffic_patterns` | Saturation throughput on an 8x8 torus for uniform random, tornado ((x+3, y+3) mod 8) and neighbor ((x+1, y+1) mod 8) traffic, with the same delivery checks. |

Measured saturation throughput (flits/cycle/router): 8x8 uniform random
0.198, tornado 0.250, neighbor 1.000. On 4x4 uniform random it is 0.361.
On 4x4 with corner buffers of 1, 4, 16 and 64 flits, uniform random
saturates at 0.305, 0.365, 0.368 and 0.373. Past a few entries, a deeper
corner buffer buys little. The 8x8 uniform figure is in the range 0.14 to 0.23 that the original evaluation
reports for this router class, but the network size and measurement method
behind those numbers are not known, so this is no match claim.

### Running a testbench

```
verilator --binary --timing --assert -Irtl -y rtl rtl/flit_pkg.sv \
    tb/tb_torus_noc.sv --top-module tb_torus_noc -Mdir obj_tb_torus_noc
./obj_tb_torus_noc/Vtb_torus_noc
```

Replace `tb_torus_noc` with any other testbench name. Every testbench
finishes in well under a second.

## What is taken from the design and what is added here

Taken from the design:

- the unidirectional torus with constantly rotating x- and y-rings;
- the router with 2+1 ports, a 3x3 crossbar and a single corner buffer;
- single-flit packets that carry their destination;
- X-Y routing: enter the x-ring on an empty slot, turn into the corner
  buffer, enter the y-ring on an empty slot, eject;
- extra rounds when the corner buffer is full or the eject port is taken;
- slot requests to the predecessor;
- keeping flit order across extra rounds.

Chosen here, where the design says nothing:

- the phase-FIFO order mechanism;
- the y-ring-first eject priority;
- the direct inject-to-corner-buffer path for the own column;
- ejecting from the x-ring when the flit is already in its row;
- the alternating yield of a waiting router;
- the registered request wires;
- the valid/ready inject handshake and the eject port without back-pressure;
- all widths, the 4x4 default size, the corner buffer depth of 4, and the
  reset style.

The *folded* torus layout changes only where routers are placed, so that the
wrap-around link is no longer than the others. It does not change the logical
ring order, so the netlist is the plain torus.

Not part of this RTL:

- the cores themselves;
- the conventional virtual-channel mesh router, which serves only as a
  baseline for comparison;
- any power or area model.

Power saving comes from the small router structure, and nothing here measures
it.
