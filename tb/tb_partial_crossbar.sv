// tb_partial_crossbar: end-to-end test of the partial crossbar network.
//
// The network is used at its default size: 4 ports, 32-bit data, the MJPEG
// task graph Video in/out (port 0) -> DCT (1) -> Q (2) -> VLE (3) -> Video
// in/out, plus the self loop of port 0. Each port's FIFO side is the
// behavioural tb_fifo_port model; the four processors are processes of this
// testbench that read remote FIFOs through the network with the
// request / acknowledge / read / clear protocol and write results into
// their own FIFOs:
//   P1 writes token v into FIFO 1 (to DCT) and v^5A5A5A5A into FIFO 0 (self loop)
//   P2 reads port 0 FIFO 1, writes v+1        into its FIFO 0
//   P3 reads port 1 FIFO 0, writes 3*x        into its FIFO 0
//   P4 reads port 2 FIFO 0, writes x^DEADBEEF into its FIFO 0
//   P1 reads its own FIFO 0 and port 3 FIFO 0 and checks every word.
// Expected values are computed here from the token number. Directed checks
// first measure the two-edge set-up latency, a refusal along a missing link
// and the one-word-per-cycle rate over a circuit. The run counts how often
// each mechanism occurred (circuit set up, refusal for an empty FIFO,
// refusal for a missing link, waiting on a busy port, self loop, several
// circuits at once, competing requests, multi-word burst, clear) and counts
// a failure for any that never occurred.
module tb_partial_crossbar;
  import xbar_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned W  = 32;
  localparam int unsigned FW = 2;
  localparam int unsigned T  = 48;      // tokens through the pipeline

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  req_kind_e            req_kind [N];
  logic [N-1:0][1:0]    req_port;
  logic [N-1:0][FW-1:0] req_fifo;
  logic [N-1:0]         req_ack, linked, proc_read, proc_empty;
  logic [N-1:0][W-1:0]  proc_data;
  logic [N-1:0][FW-1:0] fifo_sel;
  logic [N-1:0]         fifo_empty, fifo_read;
  logic [N-1:0][W-1:0]  fifo_data;
  tc_state_e            tc_state;

  logic [N-1:0]         push, full;
  logic [N-1:0][FW-1:0] push_fifo;
  logic [N-1:0][W-1:0]  push_data;

  partial_crossbar dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_fifo
    tb_fifo_port #(.DATA_W(W), .FW(FW), .DEPTH(8)) u_port (
      .clk, .rst_n,
      .push(push[k]), .push_fifo(push_fifo[k]), .push_data(push_data[k]), .full(full[k]),
      .fifo_sel(fifo_sel[k]), .empty(fifo_empty[k]), .data(fifo_data[k]), .read(fifo_read[k])
    );
  end

  int checks = 0, failures = 0;
  int n_established = 0, n_refused_empty = 0, n_refused_link = 0, n_busy = 0,
      n_selfloop = 0, n_concurrent = 0, n_contention = 0, n_burst = 0, n_clear = 0;
  logic [W-1:0] exp_tok;

  function automatic logic [W-1:0] src(int i);  return W'(i * 7 + 1); endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic finish();
    $display("mechanisms: established=%0d refused_empty=%0d refused_link=%0d busy=%0d selfloop=%0d concurrent=%0d contention=%0d burst=%0d clear=%0d",
             n_established, n_refused_empty, n_refused_link, n_busy, n_selfloop,
             n_concurrent, n_contention, n_burst, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end

  // mechanism monitors
  tc_state_e prev_state;
  always @(posedge clk) if (rst_n) begin
    int pend;
    prev_state <= tc_state;
    if (prev_state == TC_VALIDATE && tc_state == TC_CLEAR) n_refused_empty++;
    pend = 0;
    for (int p = 0; p < N; p++) begin
      if (req_kind[p] != REQ_NONE && !req_ack[p]) pend++;
      if (req_kind[p] == REQ_READ && !req_ack[p] && tc_state != TC_VALIDATE &&
          dut.ctrl_proc[req_port[p]] != '0) n_busy++;
      if (linked[p] && dut.ctrl_fifo[p] == 3'(p + 1) && req_ack[p]) n_selfloop++;
    end
    if (pend >= 2 && tc_state != TC_VALIDATE) n_contention++;
    if ($countones(linked) >= 2) n_concurrent++;
  end

  task automatic push_word(int k, int f, logic [W-1:0] d);
    @(negedge clk);
    while (full[k]) @(negedge clk);
    push[k] = 1'b1; push_fifo[k] = FW'(f); push_data[k] = d;
    @(negedge clk);
    push[k] = 1'b0;
  endtask

  task automatic wait_ack(int p);
    do @(negedge clk); while (!req_ack[p]);
    req_kind[p] = REQ_NONE;
  endtask

  // Open a circuit from processor p to FIFO f of port tgt, read up to maxn
  // words (at least one), clear the circuit.
  task automatic get_burst(int p, int tgt, int f, int maxn, ref logic [W-1:0] q[$]);
    int n;
    forever begin
      while (req_ack[p]) @(negedge clk);
      req_kind[p] = REQ_READ; req_port[p] = 2'(tgt); req_fifo[p] = FW'(f);
      wait_ack(p);
      if (linked[p]) break;
      repeat (1 + $urandom % 4) @(negedge clk);
    end
    n_established++;
    n = 0;
    while (n < maxn && !proc_empty[p]) begin
      q.push_back(proc_data[p]);
      proc_read[p] = 1'b1;
      @(negedge clk);
      proc_read[p] = 1'b0;
      n++;
    end
    if (n > 1) n_burst++;
    while (req_ack[p]) @(negedge clk);
    req_kind[p] = REQ_CLEAR;
    wait_ack(p);
    check(!linked[p], "circuit cleared");
    n_clear++;
  endtask

  // stage processors P2..P4: read from upstream port, transform, write own FIFO 0
  task automatic stage(int p, int up);
    logic [W-1:0] q[$];
    int done = 0;
    while (done < T) begin
      get_burst(p, up, (up == 0) ? 1 : 0, 1 + $urandom % 4, q);
      while (q.size() > 0) begin
        logic [W-1:0] x = q.pop_front();
        case (p)
          1: x = x + 1;
          2: x = x * 3;
          default: x = x ^ 32'hDEADBEEF;
        endcase
        push_word(p, 0, x);
        done++;
      end
    end
  endtask

  initial begin
    int e;
    logic [W-1:0] q[$];
    for (int p = 0; p < N; p++) req_kind[p] = REQ_NONE;
    req_port = '0; req_fifo = '0; proc_read = '0;
    push = '0; push_fifo = '0; push_data = '0;
    #1 rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;

    // --- directed: refusal along a missing link (P2 cannot read port 3)
    @(negedge clk);
    req_kind[1] = REQ_READ; req_port[1] = 2'd3; req_fifo[1] = '0;
    e = 0; do begin @(negedge clk); e++; end while (!req_ack[1] && e < 10);
    req_kind[1] = REQ_NONE;
    check(e == 1 && !linked[1], "missing link refused after one edge");
    if (e == 1 && !linked[1]) n_refused_link++;

    // --- directed: set-up latency and rate over the circuit P2 <- port 0 FIFO 1
    for (int i = 0; i < 3; i++) push_word(0, 1, 32'hC0DE_0000 + i);
    @(negedge clk);
    req_kind[1] = REQ_READ; req_port[1] = 2'd0; req_fifo[1] = 2'd1;
    e = 0; do begin @(negedge clk); e++; end while (!req_ack[1] && e < 10);
    req_kind[1] = REQ_NONE;
    check(e == 2 && linked[1], "circuit up two edges after acceptance");
    for (int i = 0; i < 3; i++) begin
      check(!proc_empty[1] && proc_data[1] == 32'hC0DE_0000 + i, "word over circuit, one per cycle");
      proc_read[1] = 1'b1;
      @(negedge clk);
    end
    proc_read[1] = 1'b0;
    check(proc_empty[1], "remote FIFO drained");
    req_kind[1] = REQ_CLEAR; wait_ack(1);
    check(!linked[1] && proc_empty[1], "cleared circuit shows empty");
    n_established++; n_burst++; n_clear++;

    // --- pipeline run
    fork
      begin : source
        for (int i = 0; i < T; i++) begin
          push_word(0, 1, src(i));
          push_word(0, 0, src(i) ^ 32'h5A5A5A5A);
        end
      end
      stage(1, 0);
      stage(2, 1);
      stage(3, 2);
      begin : sink
        automatic int got_self = 0, got_ret = 0;
        while (got_self < T || got_ret < T) begin
          if (got_self < T) begin
            q = {};
            get_burst(0, 0, 0, 1 + $urandom % 3, q);
            foreach (q[j]) begin
              check(q[j] == (src(got_self) ^ 32'h5A5A5A5A), "self-loop word");
              got_self++;
            end
          end
          if (got_ret < T) begin
            q = {};
            get_burst(0, 3, 0, 1 + $urandom % 3, q);
            foreach (q[j]) begin
              exp_tok = ((src(got_ret) + 1) * 3) ^ 32'hDEADBEEF;
              check(q[j] == exp_tok, "pipeline result word");
              got_ret++;
            end
          end
        end
      end
    join

    check(n_established > 0, "mechanism: circuit established");
    check(n_refused_empty > 0, "mechanism: refusal for empty FIFO");
    check(n_refused_link > 0, "mechanism: refusal for missing link");
    check(n_busy > 0, "mechanism: busy target waits");
    check(n_selfloop > 0, "mechanism: self loop");
    check(n_concurrent > 0, "mechanism: concurrent circuits");
    check(n_contention > 0, "mechanism: competing requests");
    check(n_burst > 0, "mechanism: multi-word burst");
    check(n_clear > 0, "mechanism: clear");
    finish();
  end
endmodule
