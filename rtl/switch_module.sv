// switch_module: topology-specific switch of the partial crossbar.
//
// Every crossbar port gets exactly three multiplexors:
//   - processor side, Data'(p):  FIFO data of the port selected by CTRL_FIFO(p)
//   - processor side, Empty'(p): FIFO empty flag of that same port
//   - FIFO side, Read(k):        read strobe of the processor selected by CTRL_PROC(k)
// so an N-port switch holds 3*N multiplexors. The ways of each multiplexor
// are only the links of the application topology: the processor-side muxes
// of port p have one way per set bit of IN_MASK[p*N +: N] (input-link table),
// and the FIFO-side mux of port k has one way per processor that reads port k
// (output-link table, the transpose of the input-link table). With an
// all-to-all mask this is a full crossbar.
//
// Select codes: 0 = cleared, k = port k-1 (see xbar_pkg). When cleared,
// Data' and Read are driven 0 (grounded input). Empty' is driven 1 when
// cleared, so a processor without a circuit sees an empty FIFO and a
// blocking read waits; that cleared value is a choice of this design.
//
// The module is purely combinational: once the traffic controller has set
// the selects, a remote FIFO is seen by the processor as if it were local.
module switch_module import xbar_pkg::*; #(
  parameter int unsigned                     N_PORTS = 4,
  parameter int unsigned                     DATA_W  = 32,
  parameter logic [N_PORTS*N_PORTS-1:0]      IN_MASK = MJPEG4_IN_MASK,
  localparam int unsigned                    CTRL_W  = $clog2(N_PORTS + 1)
) (
  // FIFO side (one communication controller per port)
  input  logic [N_PORTS-1:0][DATA_W-1:0]  fifo_data,
  input  logic [N_PORTS-1:0]              fifo_empty,
  output logic [N_PORTS-1:0]              fifo_read,
  // processor side
  input  logic [N_PORTS-1:0]              proc_read,
  output logic [N_PORTS-1:0][DATA_W-1:0]  proc_data,
  output logic [N_PORTS-1:0]              proc_empty,
  // circuit selects from the traffic controller
  input  logic [N_PORTS-1:0][CTRL_W-1:0]  ctrl_fifo,  // per processor port
  input  logic [N_PORTS-1:0][CTRL_W-1:0]  ctrl_proc   // per FIFO port
);

  // Output-link table of FIFO port k: which processor ports read from it.
  function automatic logic [N_PORTS-1:0] out_links(input int unsigned k);
    logic [N_PORTS-1:0] m;
    for (int unsigned p = 0; p < N_PORTS; p++) m[p] = IN_MASK[p*N_PORTS + k];
    return m;
  endfunction

  // Empty flags and read strobes as one-bit words for the generic mux.
  logic [N_PORTS-1:0][0:0] fifo_empty_w;
  logic [N_PORTS-1:0][0:0] proc_read_w;
  always_comb begin
    for (int unsigned i = 0; i < N_PORTS; i++) begin
      fifo_empty_w[i] = fifo_empty[i];
      proc_read_w[i]  = proc_read[i];
    end
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    localparam logic [N_PORTS-1:0] IN_LINKS  = IN_MASK[p*N_PORTS +: N_PORTS];
    localparam logic [N_PORTS-1:0] OUT_LINKS = out_links(p);

    // processor-side data multiplexor
    topology_mux #(
      .N_IN(N_PORTS), .WIDTH(DATA_W), .LINKS(IN_LINKS), .CLEAR_VALUE({DATA_W{1'b0}})
    ) u_data_mux (
      .sel(ctrl_fifo[p]), .in(fifo_data), .out(proc_data[p])
    );

    // processor-side empty-flag multiplexor
    topology_mux #(
      .N_IN(N_PORTS), .WIDTH(1), .LINKS(IN_LINKS), .CLEAR_VALUE(1'b1)
    ) u_empty_mux (
      .sel(ctrl_fifo[p]), .in(fifo_empty_w), .out(proc_empty[p])
    );

    // FIFO-side read-strobe multiplexor
    topology_mux #(
      .N_IN(N_PORTS), .WIDTH(1), .LINKS(OUT_LINKS), .CLEAR_VALUE(1'b0)
    ) u_read_mux (
      .sel(ctrl_proc[p]), .in(proc_read_w), .out(fifo_read[p])
    );
  end

endmodule
