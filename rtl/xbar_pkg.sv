// xbar_pkg: types and constants shared by the partial crossbar network.
//
// The network connects N crossbar ports. Each port has a FIFO side (the
// channel FIFOs of one processor tile, reached through that tile's
// communication controller) and a processor side (the processor that reads
// remote FIFOs). The logical topology of the application is given as an
// input-link mask: bit [p*N + s] is set when processor port p may read from
// the FIFOs of port s. The output-link table of each port is the transpose of
// this mask, so only the input-link form is passed around.
//
// Circuit select codes (CTRL_FIFO per processor port, CTRL_PROC per FIFO
// port) use 0 for "no circuit" and k for port k-1, following the select
// table of the switch module (0 = clear, 1..N = P1..PN).
package xbar_pkg;

  // Kind of request a processor port places towards the traffic controller.
  // The request also carries a target port and a target FIFO index.
  typedef enum logic [1:0] {
    REQ_NONE  = 2'd0,
    REQ_READ  = 2'd1,   // open a circuit to a FIFO of the target port
    REQ_CLEAR = 2'd2    // release the circuit this port holds
  } req_kind_e;

  // Traffic controller states (names follow the controller's state diagram).
  typedef enum logic [1:0] {
    TC_INIT      = 2'd0,  // Initialize
    TC_VALIDATE  = 2'd1,  // Request Validate: select target FIFO, look at its Empty
    TC_ESTABLISH = 2'd2,  // Circuit Establish: CTRL_FIFO / CTRL_PROC set, check next request
    TC_CLEAR     = 2'd3   // Circuit Clear: CTRL_FIFO / CTRL_PROC reset, check next request
  } tc_state_e;

  // Input links of the 4-port MJPEG task graph (Video in/out, DCT, Q, VLE on
  // ports 0..3): P1 reads P1 and P4, P2 reads P1, P3 reads P2, P4 reads P3.
  localparam logic [15:0] MJPEG4_IN_MASK = 16'h4219;

endpackage
