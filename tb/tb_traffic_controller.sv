// tb_traffic_controller: self-checking test of the traffic controller.
//
// 4-port MJPEG topology (P1 reads P1,P4; P2 reads P1; P3 reads P2; P4 reads
// P3; ports numbered 0..3). The FIFO side is modelled by a table of empty
// flags indexed by FIFO_sel. Directed cases check:
//   - a read request gives CTRL_FIFO/CTRL_PROC two clock edges after it is
//     accepted, with FIFO_sel of the target set in between,
//   - a request for an empty FIFO is acknowledged without a circuit,
//   - a request along a link the topology lacks is refused at once,
//   - a request for a busy target port waits until that port is cleared,
//   - clear requests reset both selects,
//   - three circuits can be up together,
//   - simultaneous requests are served in round-robin order.
// Stimulus changes on the falling edge; results are read on the falling edge.
module tb_traffic_controller;
  import xbar_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned FW = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  req_kind_e             req_kind [N];
  logic [N-1:0][1:0]     req_port;
  logic [N-1:0][FW-1:0]  req_fifo;
  logic [N-1:0]          req_ack, linked;
  logic [N-1:0][FW-1:0]  fifo_sel;
  logic [N-1:0]          fifo_empty;
  logic [N-1:0][2:0]     ctrl_fifo, ctrl_proc;
  tc_state_e             state;
  int checks = 0, failures = 0;

  logic [N-1:0][3:0] empty_tbl;   // empty_tbl[port][fifo]
  always_comb for (int k = 0; k < N; k++) fifo_empty[k] = empty_tbl[k][fifo_sel[k]];

  traffic_controller dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Place a request and wait for its acknowledge; returns edges taken.
  task automatic request(input int p, input req_kind_e k, input int tgt, input int f,
                         output int edges);
    while (req_ack[p]) @(negedge clk);   // the port's previous ack must be over
    req_kind[p] = k; req_port[p] = 2'(tgt); req_fifo[p] = FW'(f);
    edges = 0;
    do begin
      @(negedge clk);
      edges++;
    end while (!req_ack[p] && edges < 50);
    req_kind[p] = REQ_NONE;
  endtask

  initial begin
    int e;
    for (int p = 0; p < N; p++) req_kind[p] = REQ_NONE;
    req_port = '0; req_fifo = '0; empty_tbl = '0;
    #1 rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == TC_INIT && ctrl_fifo == '0 && ctrl_proc == '0, "reset state");

    // 1. P1 (port 0) reads FIFO 2 of port 3: accepted, validated, established
    req_kind[0] = REQ_READ; req_port[0] = 2'd3; req_fifo[0] = 2'd2;
    @(negedge clk);
    check(state == TC_VALIDATE, "validate after accept");
    check(fifo_sel[3] == 2'd2, "FIFO_sel of target port");
    check(ctrl_fifo[0] == 3'd0, "no circuit yet");
    @(negedge clk);
    check(state == TC_ESTABLISH, "establish on second edge");
    check(ctrl_fifo[0] == 3'd4 && ctrl_proc[3] == 3'd1, "CTRL_FIFO=4, CTRL_PROC=1");
    check(req_ack[0] && linked[0], "ack with circuit");
    req_kind[0] = REQ_NONE;
    @(negedge clk);
    check(!req_ack[0], "ack is one cycle");

    // 2. P2 (port 1) reads port 0 FIFO 1, which is empty: refused
    empty_tbl[0][1] = 1'b1;
    request(1, REQ_READ, 0, 1, e);
    check(e == 2 && !linked[1] && ctrl_proc[0] == '0, "empty FIFO refused after validate");
    check(state == TC_CLEAR, "empty goes to circuit clear");

    // 3. P2 reads port 2: no such link in the topology
    request(1, REQ_READ, 2, 0, e);
    check(e == 1 && !linked[1], "missing link refused at once");

    // 4. P3 (port 2) reads port 1, P4 (port 3) reads port 2: three circuits up
    request(2, REQ_READ, 1, 0, e);
    check(e == 2 && ctrl_fifo[2] == 3'd2 && ctrl_proc[1] == 3'd3, "P3 <- port 1");
    request(3, REQ_READ, 2, 3, e);
    check(e == 2 && ctrl_fifo[3] == 3'd3 && ctrl_proc[2] == 3'd4, "P4 <- port 2");
    check(linked == 4'b1101, "three circuits together");

    // 5. clear P1's circuit
    request(0, REQ_CLEAR, 0, 0, e);
    check(e == 1 && ctrl_fifo[0] == '0 && ctrl_proc[3] == '0, "clear resets both selects");
    check(state == TC_CLEAR, "clear state");

    // 6. busy target: P1 takes port 0 (self loop), P2 wants port 0 too
    request(0, REQ_READ, 0, 0, e);
    check(e == 2 && ctrl_fifo[0] == 3'd1 && ctrl_proc[0] == 3'd1, "self loop circuit");
    req_kind[1] = REQ_READ; req_port[1] = 2'd0; req_fifo[1] = 2'd0;
    repeat (6) begin
      @(negedge clk);
      check(!req_ack[1] && !linked[1], "busy target waits");
    end
    req_kind[0] = REQ_CLEAR;
    e = 0;
    do begin @(negedge clk); e++; if (req_ack[0]) req_kind[0] = REQ_NONE; end
    while (!req_ack[1] && e < 20);
    req_kind[1] = REQ_NONE;
    check(linked[1] && ctrl_fifo[1] == 3'd1 && ctrl_proc[0] == 3'd2, "waiting request served after clear");

    // 7. clear everything, then three simultaneous requests in round robin
    request(1, REQ_CLEAR, 0, 0, e);
    request(2, REQ_CLEAR, 0, 0, e);
    request(3, REQ_CLEAR, 0, 0, e);
    check(linked == '0 && ctrl_proc == '0, "all cleared");
    begin
      int order[$];
      req_kind[0] = REQ_READ; req_port[0] = 2'd3; req_fifo[0] = 2'd0;
      req_kind[2] = REQ_READ; req_port[2] = 2'd1; req_fifo[2] = 2'd0;
      req_kind[3] = REQ_READ; req_port[3] = 2'd2; req_fifo[3] = 2'd0;
      repeat (12) begin
        @(negedge clk);
        for (int p = 0; p < N; p++)
          if (req_ack[p]) begin order.push_back(p); req_kind[p] = REQ_NONE; end
      end
      // last port checked was 3 (clear of P4), so the scan starts at port 0
      check(order.size() == 3 && order[0] == 0 && order[1] == 2 && order[2] == 3, "round-robin order");
      check(linked == 4'b1101, "all three established");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
