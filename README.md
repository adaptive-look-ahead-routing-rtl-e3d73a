# Adaptive look-ahead west-first routing for a low-latency mesh NoC

A low-latency NoC router saves a pipeline stage by routing one hop ahead: the
head flit arrives already carrying the output port it must take, so switch
arbitration starts at once. Meanwhile the router works out the port the flit
will take at the *next* router. Such look-ahead routers normally use
dimension-order (XY) routing. XY routing is easy to compute ahead of time, but
it cannot steer traffic around a congested link.

This RTL makes the look-ahead decision adaptive. Every router sums up its own
congestion in a two-bit *preference word* and sends it to its four neighbours
every cycle. When router R computes the look-ahead port for the next router N,
it uses N's preference word. The adaptive choice therefore follows the
congestion of the router where it is applied, not the router that computes it.
Deadlock freedom comes from the west-first turn model.

What is here is the routing logic that gets added to a router: a per-router
routing module and a 4x4 mesh of them with the preferences wired between
neighbours. The router datapath (VC buffers, allocators, crossbar) and the IP
cores are not part of this RTL. They connect through the ports of the mesh top.

## Routing rule (west-first, minimal)

Coordinates: x grows to the East and y grows to the North; (0,0) is the
south-west corner. At router (cx, cy), a packet for (tx, ty) takes:

| condition                    | port                                    |
|------------------------------|-----------------------------------------|
| tx < cx                      | WEST (every westward hop comes first)   |
| tx = cx, ty > cy / < cy / =  | NORTH / SOUTH / LOCAL                   |
| tx > cx, ty = cy             | EAST                                    |
| tx > cx, ty > cy             | NORTH if `pref.ne_take_y`, else EAST    |
| tx > cx, ty < cy             | SOUTH if `pref.se_take_y`, else EAST    |

No turn into West is ever made, which breaks every cycle of channel
dependencies in the mesh. Only the last two rows are adaptive. Every path is
minimal.

## The preference word

`pref_t` (in `la_noc_pkg`) has one bit per adaptive case:

- `ne_take_y`: for packets going north-east, North is preferred to East.
- `se_take_y`: for packets going south-east, South is preferred to East.

`pref_port_unit` computes both bits from `cong_free[d]`. That is the number
of free flit slots (credits) in the downstream input buffer behind output `d`.
A bit is set when North (or South) has strictly more free slots than East.
On a tie, East is kept. West needs no comparison, because westward hops are
never adaptive. The word is registered: the neighbours see a change in
congestion one clock later. Reset clears the word, so an idle network starts
out routing like XY.

## Timing, and what is stale

- `route_port` and `la_port` are combinational. They are meant to be computed
  in the router's first stage, in parallel with switch arbitration.
- When R reads N's preference, that preference reflects N's credits from one
  clock earlier.
- The look-ahead port is fixed when R computes it and travels in the head
  flit. If N's congestion changes before the flit arrives, the decision is not
  revised. This is what look-ahead routing trades for its saved stage. The
  end-to-end testbench moves congestion between hops on purpose to exercise
  this.
- A flit injected by the local core has no upstream router. For the local
  input, `la_routing_module` computes the first output port itself, using the
  router's own preference word.

## Modules

| file | role |
|------|------|
| `rtl/la_noc_pkg.sv` | `port_e` (LOCAL=0, EAST=1, WEST=2, NORTH=3, SOUTH=4), `dir_e` (index of the 4-entry neighbour arrays: E, W, N, S), `pref_t` |
| `rtl/west_first_route.sv` | the routing rule above, combinational |
| `rtl/pref_port_unit.sv` | credits to registered preference word |
| `rtl/la_route_unit.sv` | for one input: neighbour coordinates and preference behind `out_port`, then the west-first rule there |
| `rtl/la_routing_module.sv` | one router: a preference unit, five look-ahead units and the injection route |
| `rtl/la_noc_routing_mesh.sv` | top: `MESH_X` x `MESH_Y` routing modules with the preferences wired between neighbours |

### Attaching a router datapath

The ports of `la_noc_routing_mesh` are indexed by router number
`r = y*MESH_X + x`. Inputs are indexed by `port_e` and credit counts by
`dir_e`.

- `cong_free[r][d]`: the router's credit counters for its mesh outputs.
- `in_dst_x/y[r][p]` and `in_la_port[r][p]`: fields of the head flit waiting
  at input `p`. `in_la_port` is ignored for the local input.
- `route_port[r][p]`: the output to request. For mesh inputs this is just
  `in_la_port`; for the local input it is computed.
- `la_port[r][p]`: the value to write into the head flit's routing field
  before the flit leaves.
- `pref[r]`: observation only. The mesh already does the wiring.

Preference inputs at the mesh edge are tied to zero. Minimal routing never
picks a port that leaves the mesh, so those inputs are never used. Because
`route_port` passes through for mesh inputs, synthesis reports those outputs
as wired to inputs; this is intentional.

Parameters: `MESH_X = MESH_Y = 4` (the 4x4 network the scheme was evaluated
on) and `CONG_W = 4` (credit counter width). Coordinate width is derived from
the mesh size.

## How far it can be trusted

These parts follow the published scheme: adaptive look-ahead routing; each
router pre-computing a preferred output port from its local congestion and
sending it to its neighbours; use of that preference in the look-ahead
decision; the west-first turn model; the 4x4 mesh. These parts are choices
made here: the two-bit encoding of the preference; free credits as the
congestion measure; the tie rule; the one-cycle register; the port and
coordinate encoding; first-hop routing with the router's own preference.

Not included:

- The two-stage virtual-channel wormhole router, with its buffers, VC and
  switch allocation, and crossbar.
- The traffic-generating IP cores.

Without the router there is no packet timing. The published results (about
15% lower average latency per hop than look-ahead XY under transpose traffic,
with about 12% more router area and no loss of clock frequency) cannot be
reproduced with this RTL. For reference, the whole 4x4 routing plane
synthesizes to about 2,200 word-level cells and 32 flip-flops.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the RTL with
a reference model written separately from signed hop counts. Each ends by
printing `TB_RESULT checks=N failures=M`.

- `tb_west_first_route`: every position, destination and preference of a 4x4
  mesh. It also checks that every hop is minimal and stays inside the mesh.
- `tb_pref_port_unit`: random and tied credit counts, the one-clock latency,
  and asynchronous reset.
- `tb_la_route_unit`: every position, destination and legal output, with
  random neighbour preferences.
- `tb_la_routing_module`: two router positions, with random congestion,
  preferences and head flits on all five inputs.
- `tb_la_noc_routing_mesh`: the end-to-end test at the default 4x4 size.
  - It walks head flits hop by hop, carrying the look-ahead port from router
    to router. Congestion changes between hops.
  - It checks every route, every look-ahead port, every preference word,
    minimal path length, and that no packet turns into West.
  - Directed cases: a congested East output sends north-east and south-east
    traffic along Y first. Congested Y outputs send it East first. For each of
    the East, North and South hop directions, a case gives the neighbour a
    preference opposite to the current router's, which shows the neighbour's
    word is the one used.
  - Traffic: 1,000 uniform-random packets and 8 rounds of transpose traffic
    ((x,y) sends to (y,x)).
  - Each mechanism is counted, and the test fails if any never happens:
    adaptive Y choice, adaptive East choice, West hop, ejection, preference
    change, and a look-ahead whose neighbour preference differs.

To run one with plain Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/la_noc_pkg.sv tb/tb_la_noc_routing_mesh.sv --top-module tb_la_noc_routing_mesh
./obj_dir/Vtb_la_noc_routing_mesh
```

Every testbench finishes in well under a second of simulation time.
