// topology_mux: variable-way multiplexor of the partial crossbar.
//
// A full crossbar gives every output an N-way multiplexor. Here an output
// only gets the inputs that the application's topology actually links to it:
// LINKS[i] marks input i as a physical link, and inputs that are not linked
// are never wired to the output, so synthesis builds a mux with as many ways
// as there are set bits (plus the cleared value).
//
// Select encoding: sel = 0 clears the connection and drives CLEAR_VALUE;
// sel = k (1..N_IN) selects input k-1 when LINKS[k-1] is set. A select that
// names an unlinked input also yields CLEAR_VALUE. The choice is made by a
// priority scan over the link list, the way the switch generator described
// for this network walks its input list until the list entry equals the
// select code. Purely combinational; no clock.
//
// CLEAR_VALUE is zero by default (a grounded input); its value per use is a
// choice of the instantiating module.
module topology_mux #(
  parameter int unsigned       N_IN        = 4,
  parameter int unsigned       WIDTH       = 32,
  parameter logic [N_IN-1:0]   LINKS       = {N_IN{1'b1}},
  parameter logic [WIDTH-1:0]  CLEAR_VALUE = {WIDTH{1'b0}},
  localparam int unsigned      SEL_W       = $clog2(N_IN + 1)
) (
  input  logic [SEL_W-1:0]            sel,
  input  logic [N_IN-1:0][WIDTH-1:0]  in,
  output logic [WIDTH-1:0]            out
);

  always_comb begin
    out = CLEAR_VALUE;
    for (int unsigned i = 0; i < N_IN; i++) begin
      if (LINKS[i] && (sel == SEL_W'(i + 1))) begin
        out = in[i];
      end
    end
  end

endmodule
