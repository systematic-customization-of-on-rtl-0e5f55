# Partial crossbar: a crossbar cut down to an application's task graph

A full N-port crossbar gives every output an N-way multiplexor, so its wiring
grows with N² even though a streaming application (a Kahn process network of
a few processors talking over FIFOs) uses only a handful of the N² possible
connections. This design builds a crossbar whose physical links are exactly
the logical links of the application: the topology is a compile-time
parameter, each multiplexor has only as many ways as its port has links, and
a small central traffic controller switches circuits on and off at run time.
Once a circuit is up, a processor reads a remote FIFO through plain
combinational multiplexors: no packets, no headers, no buffering in the
network, one word per clock.

The default configuration is a 4-port, 32-bit network for an MJPEG encoder
mapped onto four processors: Video in/out on port 0, DCT on port 1, Q on
port 2, VLE on port 3, connected in a ring (0→1→2→3→0) with a self loop on
port 0.

```
               FIFO side                          processor side
  (communication controller + FIFOs)             (reading processor)
                 ┌───────────────────────────────────────┐
  fifo_data[k] ─►│   switch_module: 3 muxes per port     │─► proc_data[p]
  fifo_empty[k]─►│   Data'/Empty' muxes  (CTRL_FIFO[p])  │─► proc_empty[p]
  fifo_read[k] ◄─│   Read mux            (CTRL_PROC[k])  │◄─ proc_read[p]
                 └──────────────▲────────────▲───────────┘
                                │ ctrl_fifo  │ ctrl_proc
  fifo_sel[k]  ◄─┌──────────────┴────────────┴───────────┐◄─ req_kind/port/fifo[p]
  fifo_empty[k]─►│ traffic_controller  (+ rr_scheduler)  │─► req_ack[p], linked[p]
                 └───────────────────────────────────────┘
```

## Describing a topology: `IN_MASK`

The topology is one parameter, `IN_MASK`, of `N_PORTS*N_PORTS` bits:

    IN_MASK[p*N_PORTS + s] = 1   ⇔   processor at port p may read FIFOs of port s

Row p is port p's input-link table; column s is port s's output-link table
(the processors that read it). The 4-port MJPEG default is `16'h4219`:

| port | reads FIFOs of | read by |
|------|----------------|---------|
| 0 (Video in/out) | 0, 3 | 0, 1 |
| 1 (DCT) | 0 | 2 |
| 2 (Q)   | 1 | 3 |
| 3 (VLE) | 2 | 0 |

Ports should be numbered in topological order of the task graph (sources
first), because that is the order of the round-robin scan. A port with an
all-zero row (a pure source such as a "Video in" node) never reads and is
removed from the scan.

With an all-ones mask the switch is a full crossbar; the traffic controller is
the same either way.

To target another application, set `N_PORTS`, `IN_MASK` and `FIFO_IDX_W`
(enough bits to address the FIFOs at the busiest port). `tb/tb_mjpeg_topologies.sv`
shows a 5-port and a 6-port network built from link lists.

## Select codes

Both kinds of circuit select use the same code, `$clog2(N_PORTS+1)` bits wide:
0 means no circuit, k means port k-1.

* `ctrl_fifo[p]`, one per processor port, chooses which FIFO port feeds
  processor p's Data' and Empty'.
* `ctrl_proc[k]`, one per FIFO port, chooses which processor's Read' strobe
  reaches FIFO port k.

An established circuit p←k always has `ctrl_fifo[p] = k+1` and
`ctrl_proc[k] = p+1`. The controller holds assertions for this pairing and
for every circuit following a link of `IN_MASK`.

## How a circuit is made (traffic controller)

The controller handles one request at a time, but circuits already set up stay
up, so as many circuits can be live at once as there are disjoint
processor/FIFO port pairs.

Each processor port p presents a request: `req_kind[p]` (`REQ_READ` or
`REQ_CLEAR`), `req_port[p]` (target FIFO port) and `req_fifo[p]` (which FIFO
at that port). A round-robin scheduler (`rr_scheduler`) offers the next
pending request after the one checked last. The state machine
(`tc_state_e`) is:

| state | what happens |
|-------|--------------|
| `TC_INIT` | after reset; checks requests |
| `TC_VALIDATE` | `fifo_sel[target]` holds the requested FIFO index; the target's communication controller answers on `fifo_empty[target]` |
| `TC_ESTABLISH` | entered when that FIFO was not empty: both selects were written; checks the next request |
| `TC_CLEAR` | entered on a clear request (both selects reset) or when the FIFO was empty (no circuit made); checks the next request |

In the three checking states, the offered request is handled like this:

* **read, target idle, link exists, requester has no circuit:** register it,
  drive `fifo_sel[target]`, go to `TC_VALIDATE`.
* **read, target port busy** (some circuit already uses it): skip it. There is
  no acknowledge. The scheduler moves on and the request comes round again.
* **read along a link not in `IN_MASK`, or from a port that already holds a
  circuit:** acknowledge at once, no circuit.
* **clear:** release the requester's circuit (if any), acknowledge, go to
  `TC_CLEAR`.

The scheduler pointer moves past every request it offers, whether it was
served or skipped, so a processor waiting on a busy port does not hold up the
others.

### Timing

```
edge e0 : read request accepted            → TC_VALIDATE, fifo_sel[target] set
edge e1 : fifo_empty[target] sampled low   → TC_ESTABLISH, ctrl_fifo/ctrl_proc set,
                                              req_ack[p]=1, linked[p]=1
after e1: proc_data/proc_empty show the remote FIFO combinationally
```

A circuit is therefore up two clock edges after its request is accepted.
Over an established circuit one `DATA_W`-bit word moves per cycle, so a
32-bit link at 119 MHz carries about 3.8 Gbit/s. A
refusal for a missing link is acknowledged one edge after acceptance; a
refusal for an empty FIFO comes two edges after. Clearing takes one edge.

### Requester protocol

1. Drive a request and hold it until `req_ack[p]` is high (a one-cycle pulse).
2. In the cycle `req_ack[p]` is high, withdraw or change the request. The
   controller ignores port p's request during that cycle.
3. After a read request, `linked[p]` tells you whether the circuit is up. If
   it is, pulse `proc_read[p]` once per word while `proc_empty[p]` is low. Each
   pulse pops the remote FIFO at the clock edge, so you can read one word per
   cycle.
4. Send `REQ_CLEAR` when done. The circuit is not torn down on its own, even
   if the FIFO runs empty. Until it is cleared, the target port is unavailable
   to other readers.

## Switch module

`switch_module` instantiates three `topology_mux` per port, 3·N in all:

* a `DATA_W`-bit Data' mux and a 1-bit Empty' mux, both selected by
  `ctrl_fifo[p]`, whose ways are the ports in row p of `IN_MASK`;
* a 1-bit Read mux selected by `ctrl_proc[k]`, whose ways are the processors
  in column k.

`topology_mux` passes `in[sel-1]` if that input is in its link list, and
otherwise outputs its clear value. Unlisted inputs never reach the output, so
synthesis builds a mux with only the listed ways. The clear value is 0 for
Data' and Read. For Empty' it is 1, so a processor with no circuit sees an
empty FIFO.

## Interface the FIFO side must provide

For each port, the FIFO-side communication controller and its FIFOs (not part
of this RTL) must:

* show, for the FIFO chosen by `fifo_sel[k]`, its empty flag on
  `fifo_empty[k]` and its head word on `fifo_data[k]` (first-word
  fall-through);
* pop that FIFO at a clock edge where `fifo_read[k]` is high.

`tb/tb_fifo_port.sv` is a behavioural model of this interface.

## Files

| file | contents |
|------|----------|
| `rtl/xbar_pkg.sv` | request kind and state enums, default MJPEG mask |
| `rtl/topology_mux.sv` | variable-way multiplexor |
| `rtl/switch_module.sv` | 3·N topology muxes |
| `rtl/rr_scheduler.sv` | circular round robin with static eligibility mask |
| `rtl/traffic_controller.sv` | request handling state machine, select registers |
| `rtl/partial_crossbar.sv` | top: controller + switch |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the models and workloads below |

Parameters of `partial_crossbar`: `N_PORTS` (4), `DATA_W` (32),
`FIFO_IDX_W` (2), `IN_MASK` (MJPEG ring). The reset, `rst_n`, is asynchronous
and active low.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a cycle-count watchdog.

* `tb_topology_mux`: every select code, including unlinked and out-of-range
  codes, against the link list.
* `tb_switch_module`: all select combinations on the MJPEG topology, checked
  against a link table written out by hand.
* `tb_rr_scheduler`: the circular order, and exclusion of an ineligible port,
  under random requests.
* `tb_traffic_controller`: the two-edge set-up latency, `fifo_sel` during
  validation, refusal for an empty FIFO and for a missing link, waiting on a
  busy port, clear, three circuits at once, and round-robin service order.
* `tb_partial_crossbar`: end-to-end at the default parameters. Four
  processes act as the MJPEG processors and stream 48 tokens around the ring
  and the self loop. Each processor transforms every token, and the result is
  checked when it returns to port 0. The testbench counts how often each
  mechanism occurs: circuit set up, the two refusal kinds, busy wait, self
  loop, concurrent circuits, competing requests, multi-word bursts and
  clears. A mechanism that never occurs counts as a failure. It also checks
  the two-edge latency and one word per cycle over a circuit.
* `tb_mjpeg_topologies`: the 4-, 5- and 6-node MJPEG task graphs (5, 7 and 14
  links) on networks of matching size. Every link carries 16 words; order and
  values are checked. In the 6-node graph, the source node must never hold a
  circuit.

To run one with plain Verilator (the package first; `-y` finds the modules
by file name), for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/xbar_pkg.sv tb/tb_partial_crossbar.sv --top-module tb_partial_crossbar
./obj_dir/Vtb_partial_crossbar
```

Only 2-state simulation has been used. The testbenches reset or initialise
everything they read.

## Where this RTL makes its own choices

The overall organisation is as described for this kind of network: one
traffic controller and one switch module, three variable-way multiplexors per
port, and the 0 = clear / k = port k select table. So are the four controller
states and their actions, round-robin arbitration in topological order with
source nodes excluded, the FIFO-select/empty handshake with the target port,
and the two-cycle circuit set-up. These parts are this design's own:

* The `req_ack` / `linked` acknowledge. A request/acknowledge handshake is
  called for, but no signal is defined for it.
* Refusing reads along a missing link, and reads from a port that already
  holds a circuit.
* Skipping a request for a busy target rather than holding the controller.
* Empty' reading 1 rather than 0 when no circuit is up. The reference
  multiplexor grounds its cleared input.
* No automatic teardown of a circuit whose FIFO runs empty. Clearing is
  always by request.
* The FIFO index width (4 FIFOs per port by default) and the asynchronous
  reset.
* The `tc_state` observation output.

## Not covered

* The communication controllers, FIFOs and processors of the tiles. They are
  only modelled in the testbenches.
* The design-flow steps that produce `IN_MASK`: topological sorting of the
  task graph and extraction of the link tables. These are software.
* The FPGA results (slice counts of full versus partial networks, and clock
  frequency) are properties of a particular FPGA implementation, not of this
  RTL, and have not been reproduced. Nine further application graphs (5 to
  25 nodes) were used in that area comparison. Only their node and link
  counts are known, not their link lists, so they are not included as masks.
