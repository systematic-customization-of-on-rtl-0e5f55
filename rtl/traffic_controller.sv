// traffic_controller: sets up and tears down circuits in the partial crossbar.
//
// Each processor port p presents a request: a kind (read or clear), a target
// port and a FIFO index in that port. A round-robin scheduler picks the next
// pending request, and a four-state machine handles it:
//
//   INIT / ESTABLISH / CLEAR  ("request check" states)
//       A read request whose target port carries no circuit is registered,
//       the FIFO index is driven on FIFO_sel of the target port, and the
//       machine moves to VALIDATE. A read request whose target port is busy
//       is skipped and retried on a later round. A clear request releases
//       the circuit of port p and moves to CLEAR.
//   VALIDATE
//       The target port's communication controller answers with the Empty
//       flag of the selected FIFO. Not empty: CTRL_FIFO(p) = target+1 and
//       CTRL_PROC(target) = p+1 are written and the machine moves to
//       ESTABLISH. Empty: no circuit is made and the machine moves to CLEAR.
//
// A read request thus reaches an established circuit two clock edges after
// the edge at which it is accepted (one edge into VALIDATE, one into
// ESTABLISH). Several circuits may be up at once, one per processor port
// and one per FIFO port.
//
// Handshake: req_ack(p) pulses for one cycle when p's request has been
// handled (circuit made, refused, or cleared); linked(p) then tells whether
// p holds a circuit. A requester must withdraw or change its request in the
// cycle req_ack is high; requests of a port are ignored while its req_ack is
// high. A read request is refused (acknowledged without a circuit) when the
// topology has no link from the target port to p, when p already holds a
// circuit, or when the selected FIFO is empty. An established circuit stays
// up until its processor asks for it to be cleared.
//
// The state names, the two select signals and their encodings follow the
// controller's state diagram; the ack/linked handshake, the refusal rules
// and the busy-skip policy are this design's choices.
module traffic_controller import xbar_pkg::*; #(
  parameter int unsigned                 N_PORTS    = 4,
  parameter int unsigned                 FIFO_IDX_W = 2,
  parameter logic [N_PORTS*N_PORTS-1:0]  IN_MASK    = MJPEG4_IN_MASK,
  localparam int unsigned                IDX_W      = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned                CTRL_W     = $clog2(N_PORTS + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // requests from the processor-side communication controllers
  input  req_kind_e                          req_kind [N_PORTS],
  input  logic [N_PORTS-1:0][IDX_W-1:0]      req_port,
  input  logic [N_PORTS-1:0][FIFO_IDX_W-1:0] req_fifo,
  output logic [N_PORTS-1:0]                 req_ack,
  output logic [N_PORTS-1:0]                 linked,
  // FIFO-side handshake with the communication controllers
  output logic [N_PORTS-1:0][FIFO_IDX_W-1:0] fifo_sel,
  input  logic [N_PORTS-1:0]                 fifo_empty,
  // circuit selects to the switch module
  output logic [N_PORTS-1:0][CTRL_W-1:0]     ctrl_fifo,  // per processor port
  output logic [N_PORTS-1:0][CTRL_W-1:0]     ctrl_proc,  // per FIFO port
  output tc_state_e                          state
);

  // Ports without incoming links never request data.
  function automatic logic [N_PORTS-1:0] has_inputs();
    logic [N_PORTS-1:0] m;
    for (int unsigned p = 0; p < N_PORTS; p++) m[p] = |IN_MASK[p*N_PORTS +: N_PORTS];
    return m;
  endfunction
  localparam logic [N_PORTS-1:0] ELIGIBLE = has_inputs();

  tc_state_e        state_q, state_d;
  logic [IDX_W-1:0] cur_proc_q;    // requester being validated
  logic [IDX_W-1:0] cur_tgt_q;     // its target port

  logic [N_PORTS-1:0] pending;
  logic               grant_valid;
  logic [IDX_W-1:0]   grant_idx;
  logic               checking;

  always_comb begin
    for (int unsigned p = 0; p < N_PORTS; p++)
      pending[p] = (req_kind[p] != REQ_NONE) && !req_ack[p];
  end

  assign checking = (state_q != TC_VALIDATE);

  rr_scheduler #(.N(N_PORTS), .ELIGIBLE(ELIGIBLE)) u_rr (
    .clk, .rst_n,
    .req(pending),
    .advance(checking),
    .grant_valid,
    .grant_idx
  );

  // Decode of the granted request.
  req_kind_e         g_kind;
  logic [IDX_W-1:0]  g_tgt;
  logic              g_link_ok, g_tgt_busy;
  always_comb begin
    g_kind     = req_kind[grant_idx];
    g_tgt      = req_port[grant_idx];
    g_link_ok  = (int'(g_tgt) < N_PORTS) && IN_MASK[int'(grant_idx)*N_PORTS + int'(g_tgt)]
                 && !linked[grant_idx];
    g_tgt_busy = (int'(g_tgt) < N_PORTS) && (ctrl_proc[g_tgt] != '0);
  end

  always_comb begin
    state_d = state_q;
    if (state_q == TC_VALIDATE) begin
      state_d = fifo_empty[cur_tgt_q] ? TC_CLEAR : TC_ESTABLISH;
    end else if (grant_valid) begin
      if (g_kind == REQ_CLEAR)                           state_d = TC_CLEAR;
      else if (g_kind == REQ_READ && g_link_ok && !g_tgt_busy) state_d = TC_VALIDATE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= TC_INIT;
      cur_proc_q <= '0;
      cur_tgt_q  <= '0;
      req_ack    <= '0;
      fifo_sel   <= '0;
      ctrl_fifo  <= '0;
      ctrl_proc  <= '0;
    end else begin
      state_q <= state_d;
      req_ack <= '0;
      if (state_q == TC_VALIDATE) begin
        req_ack[cur_proc_q] <= 1'b1;
        if (!fifo_empty[cur_tgt_q]) begin
          ctrl_fifo[cur_proc_q] <= CTRL_W'(int'(cur_tgt_q) + 1);
          ctrl_proc[cur_tgt_q]  <= CTRL_W'(int'(cur_proc_q) + 1);
        end
      end else if (grant_valid) begin
        unique case (g_kind)
          REQ_CLEAR: begin
            req_ack[grant_idx] <= 1'b1;
            if (linked[grant_idx]) begin
              ctrl_fifo[grant_idx] <= '0;
              ctrl_proc[IDX_W'(ctrl_fifo[grant_idx] - 1'b1)] <= '0;
            end
          end
          REQ_READ: begin
            if (!g_link_ok) begin
              req_ack[grant_idx] <= 1'b1;          // refused: no such link
            end else if (!g_tgt_busy) begin
              cur_proc_q      <= grant_idx;
              cur_tgt_q       <= g_tgt;
              fifo_sel[g_tgt] <= req_fifo[grant_idx];
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < N_PORTS; p++) linked[p] = (ctrl_fifo[p] != '0);
  end

  assign state = state_q;

  // Every circuit is recorded on both ends and follows a topology link.
  for (genvar p = 0; p < N_PORTS; p++) begin : g_chk
    a_link_pair : assert property (@(posedge clk) disable iff (!rst_n)
      linked[p] |-> (ctrl_proc[ctrl_fifo[p] - 1'b1] == CTRL_W'(p + 1)));
    a_link_topo : assert property (@(posedge clk) disable iff (!rst_n)
      linked[p] |-> IN_MASK[p*N_PORTS + int'(ctrl_fifo[p]) - 1]);
  end

endmodule
