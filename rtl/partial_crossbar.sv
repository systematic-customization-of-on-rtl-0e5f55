// partial_crossbar: customized crossbar interconnect for a given task graph.
//
// The network links N processor tiles so that the physical connections are
// exactly the logical links of the application. IN_MASK is the topology
// (bit [p*N + s]: processor port p reads FIFOs of port s). A traffic
// controller arbitrates the processors' requests round robin and sets the
// circuit selects CTRL_FIFO (per processor port) and CTRL_PROC (per FIFO
// port); a switch module of 3*N variable-way multiplexors then connects
// Data/Empty of the target FIFO port to the processor and the processor's
// Read strobe back to the FIFO port. Data moves point to point with no
// packet header and no buffer inside the network.
//
// Ports per crossbar port i:
//   processor side: req_kind/req_port/req_fifo (request), req_ack (one-cycle
//     pulse when handled), linked (circuit up), proc_read (Read'),
//     proc_data (Data'), proc_empty (Empty').
//   FIFO side: fifo_sel (FIFO index chosen by the controller), fifo_empty
//     (Empty of the selected FIFO), fifo_read (Read), fifo_data (Data).
// Timing: a read request is accepted by the controller, its FIFO is selected
// and checked in the next cycle, and the circuit is up two clock edges after
// acceptance. Over an established circuit the path is combinational: the
// FIFO-side communication controller must present first-word-fall-through
// data and pop on Read.
//
// The defaults are the 4-port, 32-bit MJPEG network (Video in/out, DCT, Q,
// VLE). FIFO_IDX_W (up to 4 FIFOs per port) is a choice of this design.
module partial_crossbar import xbar_pkg::*; #(
  parameter int unsigned                 N_PORTS    = 4,
  parameter int unsigned                 DATA_W     = 32,
  parameter int unsigned                 FIFO_IDX_W = 2,
  parameter logic [N_PORTS*N_PORTS-1:0]  IN_MASK    = MJPEG4_IN_MASK,
  localparam int unsigned                IDX_W      = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned                CTRL_W     = $clog2(N_PORTS + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // processor side
  input  req_kind_e                          req_kind [N_PORTS],
  input  logic [N_PORTS-1:0][IDX_W-1:0]      req_port,
  input  logic [N_PORTS-1:0][FIFO_IDX_W-1:0] req_fifo,
  output logic [N_PORTS-1:0]                 req_ack,
  output logic [N_PORTS-1:0]                 linked,
  input  logic [N_PORTS-1:0]                 proc_read,
  output logic [N_PORTS-1:0][DATA_W-1:0]     proc_data,
  output logic [N_PORTS-1:0]                 proc_empty,
  // FIFO side
  output logic [N_PORTS-1:0][FIFO_IDX_W-1:0] fifo_sel,
  input  logic [N_PORTS-1:0]                 fifo_empty,
  output logic [N_PORTS-1:0]                 fifo_read,
  input  logic [N_PORTS-1:0][DATA_W-1:0]     fifo_data,
  // controller state, for observation
  output tc_state_e                          tc_state
);

  logic [N_PORTS-1:0][CTRL_W-1:0] ctrl_fifo;
  logic [N_PORTS-1:0][CTRL_W-1:0] ctrl_proc;

  traffic_controller #(
    .N_PORTS(N_PORTS), .FIFO_IDX_W(FIFO_IDX_W), .IN_MASK(IN_MASK)
  ) u_tc (
    .clk, .rst_n,
    .req_kind, .req_port, .req_fifo, .req_ack, .linked,
    .fifo_sel, .fifo_empty,
    .ctrl_fifo, .ctrl_proc,
    .state(tc_state)
  );

  switch_module #(
    .N_PORTS(N_PORTS), .DATA_W(DATA_W), .IN_MASK(IN_MASK)
  ) u_sw (
    .fifo_data, .fifo_empty, .fifo_read,
    .proc_read, .proc_data, .proc_empty,
    .ctrl_fifo, .ctrl_proc
  );

endmodule
