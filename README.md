# Packet-connected-circuit switching node for a mesh on-chip network

This is RTL for a small on-chip network router. It sets up a **circuit with a
packet**. A source sends one short routing request into a 2-D mesh. Each
switching node on the way buffers the request, picks an output towards the
destination and locks that output. The destination answers with an
acknowledgement, which travels back along the same route. After that the
payload streams through the locked outputs at one word per clock, with a fixed
delay of one cycle per node and no further arbitration. A final *cancel*
releases the locks hop by hop.

If a node finds every useful output taken, it does not wait. It answers with a
negative acknowledgement (NACK), every lock between it and the source is
dropped, and the source retries later. Nothing ever waits for a resource while
holding another, so the network cannot deadlock. A node only has to buffer
the one-word request, so it stays small.

The mesh top level is `ocn_mesh`, 2 x 2 nodes by default. Each node is a
`switching_node` with five ports: right, left, top, bottom and one local IP
port.

## The link and its protocol

Each link between two nodes, or between a node and an IP block, has 19 wires
in each direction (`ocn_pkg`):

| signal       | width | direction  | use |
|--------------|-------|------------|-----|
| `data`       | 16    | downstream | request word or payload |
| `fwd_ctrl`   | 1     | downstream | framing |
| reverse ctrl | 2     | upstream   | `REV_NONE` 00, `REV_ACK` 01, `REV_NACK` 10, one cycle each |

In RTL the downstream half is the packed struct `fwd_link_t` and the upstream
half is the enum `rev_ctrl_t`. Link widths come from the original design. The
encodings below are this implementation's own.

**Routing request.** The request is a single word with `fwd_ctrl = 1`, sent on
a port that currently owns no circuit:

```
 15            8 7      4 3      0
+---------------+--------+--------+
| local index   | dest x | dest y |
+---------------+--------+--------+
```

The local index picks the IP port at the destination node. It is 0 when the
node has one IP port. `make_request(x, y, idx)` in `ocn_pkg` builds the word.

**A transfer, seen from the source:**

1. Send the request for one cycle. Then wait, driving idle (`fwd_ctrl = 0`).
2. `REV_NACK` comes back: the route was blocked, or the destination refused.
   All locks are already released. Try again later.
3. `REV_ACK` comes back: the circuit is complete. Send the payload as one
   unbroken frame, with `fwd_ctrl = 1` on every word.
4. Drop `fwd_ctrl` to 0. This end of frame is the cancel. Each node forwards
   it and then frees its output. The port can send a new request in the very
   next cycle.

**A transfer, seen from the destination.** A framed word on an idle port is a
request. Answer with `REV_ACK` or `REV_NACK` on the reverse wires (the test
model answers one cycle later). After an ACK, collect the framed words until
the frame ends.

The payload frame must not pause: any unframed word after the frame has begun
ends the circuit. An IP that cannot stream its data must buffer it first.

## Inside a switching node

```
 link_in[0..4] -> input_fsm x5 -> priority_encoder -> address_decode -> s3 register
                                                                            |
 link_out[0..4] <- output_fsm x5 <- send/locks <- arbiter_fsm <-------------+
 rev_out[0..4]  <---------------------------------- arbiter_fsm <- rev_in[0..4]
```

| block | job |
|-------|-----|
| `input_fsm` (one per port) | Waits for `fwd_ctrl = 1` on a port that owns no circuit. Stores the word and raises `flag` until the node takes it. |
| `priority_encoder` | Fixed priority: the lowest-numbered flagged port wins (port 0 highest). Output is one-hot. |
| `address_decode` | Compares each 4-bit coordinate of the destination with the node's own. Gives `right`, `left`, `top`, `bottom` or `ip_core`. |
| `arbiter_fsm` | Owns the lock table. Picks an output, sends NACK when none is free, passes ACK/NACK back towards the source, and frees locks. |
| `output_fsm` (one per port) | Sends the request on. Then copies the owning input to the output, one register later, and watches for the end of the frame. |

**One request at a time.** A new request enters the priority encoder only when
the s3 register and the arbiter are both empty. Requests that arrive together
wait at their input FSMs and go through in port order. This keeps the
arbitration race-free: only one request can claim outputs at any moment.

**Request pipeline.** Edge *t* is the clock edge at which the node samples the
request. Registers sit after the input FSMs, after the address decoder and
after the arbiter. The priority encoder and the decoder share one
combinational stage.

| edge | what happens |
|------|--------------|
| t    | `input_fsm` stores the request and raises its flag |
| t+1  | priority encoder and address decoder: the s3 register loads the port, the word and the directions |
| t+2  | arbiter `S_IDLE` takes the request |
| t+3  | arbiter `S_CHOOSE` forms the first and second choice |
| t+4  | arbiter `S_SELECT` locks an output and pulses `send`, or registers NACK towards the input |
| t+5  | `output_fsm` registers the request on `link_out` |
| t+6  | the next node samples it |

So a request costs **6 cycles per node**. A NACK from a blocked node is seen
upstream at t+5. ACK and NACK coming back cross a node in **1 cycle**. A
payload word crosses a node in **1 cycle**, the single register in each
output FSM. These are the per-switch latencies the original design states.

**Locks.** Each output is in one of three states:

- `L_FREE`
- `L_TEMP`: the request has gone out and no answer has come back yet.
- `L_PERM`: ACK has come back.

A NACK arriving on the output's reverse wires frees it from either state, and
so does the owner's end of frame. The reverse wires of a locked output are
passed to the owning input's `rev_out` through one register. An input owns at
most one output, and an assertion checks this.

## Routing

Routing is minimal-path. `address_decode` reports every direction that brings
the request closer. The destination x is the upper nibble, and x grows to the
right. The destination y is the lower nibble, and y grows downwards. A node
at (2,2) asked for (3,3) therefore reports right and bottom.

The arbiter tries the x direction first and the y direction second. It uses
the second choice only when the first is locked, and answers NACK when
neither is free. A request for the node's own address goes to local port
`4 + local index`. It is refused if that port does not exist or is locked.

In a 2 x 2 mesh with one IP per node, the second choice can never be needed.
A node's x output can only be locked by its own IP, and that port is already
busy with its own circuit. Larger meshes do use the second choice.

## The mesh

Node (x, y) sits in column x and row y, with row 0 at the top. Its address is
`{x[3:0], y[3:0]}`, so the mesh can have up to 16 x 16 nodes. Neighbours are
wired port to opposite port: right to left, top to bottom. On the mesh
boundary, the outward links carry nothing inwards, and their reverse wires
are tied to NACK. A request addressed outside the mesh is therefore refused
instead of hanging.

The local ports come out as arrays. Element `(y*COLS + x)*NUM_LOCAL + k` is
local port k of node (x, y):

- `loc_in`: request and payload coming from the IP.
- `loc_rev_out`: ACK/NACK going to the IP as a source.
- `loc_out`: traffic going to the IP as a destination.
- `loc_rev_in`: the IP's answer as a destination.

## Latency and throughput

For a route through S switches, the source sees its ACK 7·S + 1 cycles after
the first node sampled the request:

- 6·S cycles for the request to reach the destination.
- 1 cycle for the destination to answer.
- S cycles for the ACK to come back.

The payload arrives S cycles after it entered. One 16-bit word per cycle per
link gives 19.2 Gb/s at the 1.2 GHz network clock the original design
targeted. Once a circuit stands, its latency and throughput do not depend on
other traffic. Only the setup can fail, and it is then retried.

## Choices made in this implementation

The original design describes the blocks, the link widths, the routing rule,
the priority table, the pipeline cuts and the per-switch latencies. These
points are this implementation's own:

- **Encodings.** The reverse-control code values, and the request bits above
  the 8-bit destination (used as the local port index).
- **The cancel.** The cancel is the end of the payload frame, not a separate
  word. With this rule, framing alone tells a receiver which words are
  payload.
- **Axes.** Which nibble is x, and that y grows downwards. This matches the
  (2,2) → (3,3) example.
- **Choice order.** x is tried first and y second.
- **Held requests.** An input FSM keeps its request until the node takes it.
- **Arbiter timing.** The three arbiter states, which fill the 6-cycle budget.
- **Edges and reset.** The NACK on mesh edges, and the synchronous
  active-low reset.
- **Node size.** `N > 5` adds local IP ports (the original speaks of adding
  input and output FSMs). 3- or 4-port nodes are not supported, because
  which ports such a node keeps is not specified.
- **One clock.** The whole mesh runs on one clock. The original links are
  mesochronous: same frequency, unknown phase, with a retiming circuit that is
  not specified. Here that is reduced to the one register per hop.

## What is not here

These parts of the original network are not included:

- **Wrappers.** They adapt an IP block to a local port: transactions, width,
  endianness, buffering and clock crossing. They were never specified. For
  simulation, `tb/ocn_endpoint.sv` models their network side.
- **IP cores.**
- **Mesochronous retiming.**
- **Link drivers.** The original proposes optimized drivers and
  transmission-line wires.

## Files

| file | content |
|------|---------|
| `rtl/ocn_pkg.sv` | widths, port numbers, `fwd_link_t`, `rev_ctrl_t`, `route_dir_t`, request helpers |
| `rtl/input_fsm.sv`, `priority_encoder.sv`, `address_decode.sv`, `arbiter_fsm.sv`, `output_fsm.sv` | node blocks |
| `rtl/switching_node.sv` | one node, parameters `N` (ports, default 5) and `NODE_ADDR` |
| `rtl/ocn_mesh.sv` | the mesh, parameters `ROWS`, `COLS` (default 2), `NUM_LOCAL` (default 1) |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/ocn_endpoint.sv` | behavioural IP/wrapper model: request, retry after NACK, framed payload, ACK/NACK as destination |
| `tb/tb_ocn_mesh.sv` | 3 x 3 mesh: latencies, refusal and retry, second choice, mid-route NACK, simultaneous requests, random traffic. Counts each mechanism. |
| `tb/tb_switching_node_ports.sv` | 5-, 6- and 7-port nodes: routing to every local port, refusal of a busy or missing local port |
| `tb/tb_ocn_mesh_full.sv` | default 2 x 2 mesh: latency check, then an all-to-all exchange |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. From the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ocn_pkg.sv \
          tb/tb_ocn_mesh_full.sv --top-module tb_ocn_mesh_full -Mdir obj_full
./obj_full/Vtb_ocn_mesh_full
```

Replace `tb_ocn_mesh_full` with any other testbench name. `ocn_pkg.sv` must
come first, and the others are found through `-y`. Every testbench runs in
well under a second.
