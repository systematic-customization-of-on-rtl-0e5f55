// tb_mjpeg_system: generic traffic harness for one partial crossbar network.
//
// For every link "processor port p reads FIFO port s" of IN_MASK, FIFO p of
// port s carries TOKENS words, value (s<<24 | p<<16 | i). One producer
// process per port fills its FIFOs; one reader process per port with input
// links visits its links in turn, opens a circuit, reads a burst of up to
// four words, clears the circuit and checks every word and its order.
// Ports without input links never request. done rises when all words have
// arrived; checks/failures/cycles report the result. FIFO indices are
// reader port numbers, so FW must cover N_PORTS.
module tb_mjpeg_system import xbar_pkg::*; #(
  parameter int unsigned            N_PORTS = 4,
  parameter int unsigned            FW      = 3,
  parameter logic [N_PORTS*N_PORTS-1:0] IN_MASK = MJPEG4_IN_MASK,
  parameter int unsigned            TOKENS  = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   circuits,
  output int   refusals,
  output int   max_concurrent
);
  localparam int unsigned W  = 32;
  localparam int unsigned IW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  req_kind_e                 req_kind [N_PORTS];
  logic [N_PORTS-1:0][IW-1:0] req_port;
  logic [N_PORTS-1:0][FW-1:0] req_fifo;
  logic [N_PORTS-1:0]        req_ack, linked, proc_read, proc_empty;
  logic [N_PORTS-1:0][W-1:0] proc_data;
  logic [N_PORTS-1:0][FW-1:0] fifo_sel;
  logic [N_PORTS-1:0]        fifo_empty, fifo_read;
  logic [N_PORTS-1:0][W-1:0] fifo_data;
  tc_state_e                 tc_state;
  logic [N_PORTS-1:0]        push, full;
  logic [N_PORTS-1:0][FW-1:0] push_fifo;
  logic [N_PORTS-1:0][W-1:0] push_data;
  logic [N_PORTS-1:0]        rd_done;

  partial_crossbar #(.N_PORTS(N_PORTS), .DATA_W(W), .FIFO_IDX_W(FW), .IN_MASK(IN_MASK)) dut (.*);

  for (genvar k = 0; k < N_PORTS; k++) begin : g_fifo
    tb_fifo_port #(.DATA_W(W), .FW(FW), .DEPTH(4)) u_port (
      .clk, .rst_n,
      .push(push[k]), .push_fifo(push_fifo[k]), .push_data(push_data[k]), .full(full[k]),
      .fifo_sel(fifo_sel[k]), .empty(fifo_empty[k]), .data(fifo_data[k]), .read(fifo_read[k])
    );
  end

  function automatic bit link(int p, int s);
    return IN_MASK[p*N_PORTS + s];
  endfunction

  function automatic logic [W-1:0] token(int s, int p, int i);
    return W'((s << 24) | (p << 16) | i);
  endfunction

  initial begin
    checks = 0; failures = 0; circuits = 0; refusals = 0; max_concurrent = 0;
    for (int p = 0; p < N_PORTS; p++) req_kind[p] = REQ_NONE;
    req_port = '0; req_fifo = '0; proc_read = '0; push = '0; push_fifo = '0; push_data = '0;
  end

  always @(posedge clk) if ($countones(linked) > max_concurrent) max_concurrent = $countones(linked);
  assign done = &rd_done;

  for (genvar s = 0; s < N_PORTS; s++) begin : g_prod
    initial begin
      @(posedge rst_n);
      for (int i = 0; i < TOKENS; i++)
        for (int p = 0; p < N_PORTS; p++)
          if (link(p, s)) begin
            @(negedge clk);
            while (full[s] && push_fifo[s] == FW'(p)) @(negedge clk);
            push_fifo[s] = FW'(p);
            while (full[s]) @(negedge clk);
            push[s] = 1'b1; push_data[s] = token(s, p, i);
            @(negedge clk);
            push[s] = 1'b0;
          end
    end
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_rd
    initial begin
      int got [N_PORTS];
      automatic int left = 0;
      rd_done[p] = 1'b0;
      for (int s = 0; s < N_PORTS; s++) begin got[s] = 0; if (link(p, s)) left += TOKENS; end
      @(posedge rst_n);
      while (left > 0) begin
        for (int s = 0; s < N_PORTS; s++) if (link(p, s) && got[s] < TOKENS) begin
          int n;
          n = 0;
          while (req_ack[p]) @(negedge clk);
          req_kind[p] = REQ_READ; req_port[p] = IW'(s); req_fifo[p] = FW'(p);
          do @(negedge clk); while (!req_ack[p]);
          req_kind[p] = REQ_NONE;
          if (!linked[p]) begin refusals++; continue; end
          circuits++;
          while (n < 4 && got[s] < TOKENS && !proc_empty[p]) begin
            checks++;
            if (proc_data[p] != token(s, p, got[s])) begin
              failures++;
              $display("FAIL port %0d from %0d word %0d: %h", p, s, got[s], proc_data[p]);
            end
            proc_read[p] = 1'b1;
            @(negedge clk);
            proc_read[p] = 1'b0;
            got[s]++; left--; n++;
          end
          while (req_ack[p]) @(negedge clk);
          req_kind[p] = REQ_CLEAR;
          do @(negedge clk); while (!req_ack[p]);
          req_kind[p] = REQ_NONE;
        end
      end
      rd_done[p] = 1'b1;
    end
  end
endmodule
