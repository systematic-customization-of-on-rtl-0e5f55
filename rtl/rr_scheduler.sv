// rr_scheduler: circular round-robin pick of the next request to check.
//
// Ports are numbered in the topological order of the application's task
// graph, so a circular scan in port order is the prioritized round robin of
// the traffic controller. Ports with no incoming link (ELIGIBLE bit 0) never
// read remote data and are left out of the scan entirely.
//
// Interface: req is the per-port "has a pending request" vector. grant_valid
// and grant_idx are combinational: the first eligible requesting port after
// the last one checked, wrapping around. When the user asserts advance in a
// cycle with grant_valid, the pointer moves to grant_idx at the clock edge,
// so that port has lowest priority next time, whether or not its request was
// served. After reset the scan starts at port 0.
//
// The circular order and the exclusion of source ports follow the network's
// description; moving the pointer past skipped requests and the reset
// position are choices of this design.
module rr_scheduler import xbar_pkg::*; #(
  parameter int unsigned       N        = 4,
  parameter logic [N-1:0]      ELIGIBLE = {N{1'b1}},
  localparam int unsigned      IDX_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      req,
  input  logic              advance,
  output logic              grant_valid,
  output logic [IDX_W-1:0]  grant_idx
);

  logic [IDX_W-1:0] last_q;   // port checked most recently
  logic [N-1:0]     cand;

  assign cand = req & ELIGIBLE;

  always_comb begin
    logic [IDX_W-1:0] idx;
    grant_valid = 1'b0;
    grant_idx   = '0;
    // scan from last_q+1 up to last_q+N (which is last_q itself)
    for (int unsigned off = 1; off <= N; off++) begin
      idx = IDX_W'((int'(last_q) + off) % N);
      if (!grant_valid && cand[idx]) begin
        grant_valid = 1'b1;
        grant_idx   = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     last_q <= IDX_W'(N - 1);
    else if (advance && grant_valid) last_q <= grant_idx;
  end

endmodule
