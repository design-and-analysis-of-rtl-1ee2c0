# A routed inter-ALU operand network (RIAN) for an 8x8 ALU array

In a conventional wide processor every ALU result is broadcast to every ALU
input that might need it. The wiring grows with the square of the number of
ALUs, and fan-out, fan-in and wire length make the bypass path slow. This
design replaces the broadcast with a routed network. Each ALU node has a
small router that is linked only to its neighbours. A result travels point to
point, hop by hop, from the node that produces it to the one node that
consumes it. The consumer is named in the producing instruction.

The idea and its main mechanisms come from the paper *Design and Analysis of
Routed Inter-ALU Networks for ILP Scalability and Performance*: point-to-point
multi-hop routing, separate control and payload networks with lookahead path
reservation, and a two-slot throttle. The paper evaluates these at the level of
circuit delays and simulated IPC; it does not give RTL. Everything below the
level of those mechanisms is this design's own: flit formats, routing rule,
arbitration, buffer depth, node pipeline and ports. The section "Where this
departs from the paper" lists the differences.

The default configuration is the paper's best grid-processor network: 8x8
nodes in the **star** topology, where each node is linked to its eight
surrounding nodes. The bottom row is also linked to the top row. Every node has
a 64-entry x 64-bit register file, a 64-bit integer ALU and a 64-bit integer
multiplier.

## How one operand crosses the network

Every operand travels as two flits on two physically separate networks:

| flit    | fields                                                        | width |
|---------|---------------------------------------------------------------|-------|
| control | destination column (4), destination row (4), destination register (6) | 14 |
| payload | the 64-bit value                                              | 64    |

The destination comes from the instruction. So the producing node already
knows where its result will go in the cycle it issues the instruction, before
the ALU has produced the value. It sends the control flit at once, and the
payload follows exactly one cycle later on the same links. At each router the
control flit is decoded and arbitrated one cycle ahead of its payload. When it
wins an output, it reserves that output's payload path for the next cycle. The
payload then goes through the router without any decision of its own. This is
the "lookahead": routing and arbitration are off the payload's path.

Cycle by cycle, for an instruction issued at node A in cycle `t`, with its
result going to a node B that is `h` hops away, on a free path:

```
cycle   control network                      payload network
t       A issues; control flit enters A's      ALU computes, result registered
        router and wins its output at once
t+1     control flit at hop 1 router, wins     payload enters A's router, follows
        its output                             the path reserved in cycle t
...     one hop per cycle                      one hop per cycle, one behind
t+h     control flit at B wins B's local port
t+h+1   B latches the destination register     payload crosses B's router
t+h+2                                          B writes the register (deliver_valid)
```

So an operand is delivered `h + 2` cycles after issue: one cycle in the ALU,
one per hop, and one into the register file. A dependent instruction at B can
issue in that cycle, because the register file is write-through. A result
whose destination is its own node never enters the network (the paper's
"direct bypass"). It is written to the register file in the next cycle, so
dependent instructions on one node run back to back.

A control flit that cannot leave, because its output is taken or throttled,
waits in its input's control buffer. Its payload is then written to that
input's data buffer when it arrives. Buffers are first-word-fall-through and
are bypassed when empty: a flit that can leave in its arrival cycle is never
stored. The flits of one input leave in order, one per cycle. Each control
flit reserves exactly one payload slot on exactly one output, one cycle later.
So the payload a reserved path expects is always at the head of its data
buffer, or arriving that cycle. An assertion in `rian_router` checks this.

## Flow control: the two-slot throttle

There are no acknowledgements. Each router input watches its own buffers. While
its control buffer or its data buffer has two or fewer free slots, it asserts
`throttle` back to the neighbour that feeds it. That neighbour then sends no
new control flit on that link. The two slots hold:

- the payload that still follows a control flit already sent, and
- a flit sent in the cycle while the throttle travels back.

The throttle is combinational from the buffer counters and is sampled by the
upstream arbiter in the same cycle. In the common, uncongested case, traffic
never sees it. The node's own input (results produced by its ALU) is throttled
the same way. When it is throttled, the node drops `issue_ready` and stops
issuing: congestion backs up into the producing ALU, as the paper intends. A
node always accepts operands delivered to it, one per cycle.

`DEPTH` (default 8) sets both buffers of every input. It must be at least 3.

## Routing and topology

Nodes sit on a grid: column `x` grows to the east, row `y` to the south, and
row 0 is on top. Router ports are numbered N, NE, E, SE, S, SW, W, NW (0-7),
then LOCAL (8).

- **Star** (`TOPO_STAR`, default): a flit moves diagonally while both its
  column and its row differ from the destination's, then straight. A trip
  takes max(|dx|, |dy|) hops.
- **Mesh** (`TOPO_MESH`): only the four orthogonal links. Column first, then
  row; a trip takes |dx| + |dy| hops.
- **Wrap** (`WRAP=1`, default): every column is closed into a ring by links
  from the bottom row to the top row. Diagonal links wrap the same way. A flit
  takes the wrap when that makes its row distance strictly shorter. Ties go
  the direct way. Every link, wrap links included, takes one cycle. That makes
  the wrap links the paper's fast "express" channels, which it quotes at one
  cycle for an 8x8 grid. Columns do not wrap.

Routing is minimal and deterministic, so two operands between the same pair of
nodes arrive in the order they were sent. Without wrap, the routing cannot
deadlock, because every hop moves a flit monotonically in both coordinates.
With wrap, each column ring can in principle form a cyclic wait when traffic is
very heavy. The design adds no virtual channels, because the paper describes
none. The testbenches' traffic, including a burst where all 63 nodes target
one node, never deadlocked.

## The node

`rian_node` takes one instruction per cycle:

| field | meaning |
|-------|---------|
| `op`  | `OP_ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, SLT, SLTU, LI, MUL` |
| `rs1`, `rs2` | source registers in this node's register file |
| `imm` | 32-bit immediate, sign-extended by `OP_LI` |
| `dst` | destination column, row and register (the control flit) |

The ALU and the multiplier are single-cycle. `MUL` returns the low 64 bits of
the product. The register file has two source read ports, one observation read
port, and two write ports: one for the node's own results and one for operands
from the network. If both write ports name the same register, the network port
wins.

The paper studies two machines on top of such a network: a statically
scheduled VLIW and a grid processor that fires instructions when their operands
arrive. It describes neither machine's instruction fetch or firing hardware, so
neither is built. Whatever drives `instr_valid` decides when an instruction may
issue. `deliver_valid/deliver_reg` shows when each operand lands.

## Top-level interface (`rian_grid`)

Nodes are numbered `n = y*GRID_X + x`. All per-node ports are packed arrays
indexed by `n`.

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; active-low asynchronous reset of control state |
| `instr_valid[n]`, `instr[n]` | in | instruction offered to node n (`rian_pkg::instr_t`) |
| `issue_ready[n]` | out | node n takes the offered instruction at this clock edge |
| `deliver_valid[n]`, `deliver_reg[n]`, `deliver_data[n]` | out | operand from the network written at node n |
| `dbg_raddr[n]`, `dbg_rdata[n]` | in/out | combinational read of any register of node n |
| `ev_issue_stall`, `ev_local_bypass`, `ev_stall`, `ev_throttle`, `ev_cut_through` | out | per-node event bits, for statistics |

`issue_ready` depends only on registered state. An instruction held valid
while `issue_ready` is low is taken in the first cycle it goes high.

| parameter | default | meaning |
|-----------|---------|---------|
| `GRID_X`, `GRID_Y` | 8, 8 | array size (the paper's 8x8; coordinates allow up to 16x16) |
| `TOPO` | `TOPO_STAR` | `TOPO_STAR` (8 links per node) or `TOPO_MESH` (4) |
| `WRAP` | 1 | bottom-to-top wrap links |
| `DEPTH` | 8 | control and data buffer slots per router input (this design's choice) |

Register contents and buffer storage are not reset. A program writes a
register before reading it.

## Where this departs from the paper

- **Router clock.** The paper's routers are quad-pumped at 4x the ALU clock,
  with per-hop delays rounded to quarter cycles. Here the ALU and the router
  share one clock, and a hop takes one cycle, the same assumption as the
  paper's throttle analysis. The paper's circuit figures (100 ps forwarding,
  300 ps packet processing) are delays, not logic, and are not modelled.
- **Unbuilt parts.** The FPU is not built: the paper names it but gives no
  format or operations. The triangle topology is not built, because its wiring
  is not specified. The star without express channels (a slower wrap wire) is
  not built. The VLIW study's M4 network, whose links reach two nodes along a
  row, is not built either. Its M2 network, a row with links between adjacent
  nodes only, is this array with `GRID_Y=1`, `TOPO=TOPO_MESH` and `WRAP=0`.
- **This design's own choices:** the routing rule, round-robin arbitration,
  buffer depth, flit fields, ALU operation set, single-cycle multiplier and
  register-file ports.
- **Broadcast baselines.** The single-hop broadcast networks the paper
  compares against are not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rian_buffer` | order against a queue model, bypass without storage, count |
| `tb_rian_rr_arbiter` | grants against a round-robin model, fairness |
| `tb_rian_route` | every source/destination pair of an 8x8 array, star and mesh, with and without wrap: chosen port and minimal hop count |
| `tb_rian_router` | about 24,000 packets from 9 inputs under random downstream throttling: each leaves once, on the right port, payload one cycle behind its control flit, nothing sent into a throttle, one-cycle hop when idle |
| `tb_rian_alu`, `tb_rian_mul`, `tb_rian_regfile` | results against independent reference arithmetic and a register model |
| `tb_rian_node` | back-to-back dependent local instructions, lookahead timing toward a neighbour, delivery of an incoming operand, ALU stall while a link is throttled, and in-order release |
| `tb_rian_line` | the array as a single row of 4, 8 and 16 nodes with adjacent-node links only (`GRID_Y=1`, `TOPO_MESH`, `WRAP=0`), the linear network of the paper's VLIW study: end-to-end latency and random traffic at each width |
| `tb_rian_grid` | full 8x8 default configuration: hop latency `h+2` for chosen pairs (including a wrap hop); a sum of squares over 64 nodes gathered at node 0 (result 89440); random and hot-spot traffic, with every operand delivered once, to the right register, in per-pair order. It counts contention stalls, throttles, ALU stalls, cut-throughs, local bypasses and wrap use, and fails if any count is zero |

To run one with Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/rian_pkg.sv tb/tb_rian_grid.sv \
          --top-module tb_rian_grid -o sim
obj_dir/sim
```

The full 8x8 end-to-end test runs in a few seconds.

## Files

| file | contents |
|------|----------|
| `rtl/rian_pkg.sv` | widths, flit and instruction types, directions, opcodes |
| `rtl/rian_grid.sv` | top: the array and its link wiring |
| `rtl/rian_node.sv` | one node: issue, result stage, delivery, register file, router |
| `rtl/rian_router.sv` | lookahead router: buffers, decoders, control switch, data switch, throttle |
| `rtl/rian_route.sv` | routing decision for one control flit |
| `rtl/rian_rr_arbiter.sv` | round-robin arbiter of one output |
| `rtl/rian_buffer.sv` | bypassable FIFO for control or payload flits |
| `rtl/rian_alu.sv`, `rtl/rian_mul.sv`, `rtl/rian_regfile.sv` | node datapath |
