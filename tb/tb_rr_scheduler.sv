// tb_rr_scheduler: self-checking test of the round-robin scheduler.
//
// Five ports, port 2 not eligible (a node without incoming links). Random
// request vectors and random advance strobes are applied for many cycles; a
// reference pointer kept in the testbench predicts the grant. A directed
// phase with all ports requesting checks the circular order 0,1,3,4,0,...
module tb_rr_scheduler;
  localparam int unsigned N = 5;
  localparam logic [N-1:0] ELIG = 5'b11011;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0] req;
  logic         advance;
  logic         grant_valid;
  logic [2:0]   grant_idx;
  int checks = 0, failures = 0;
  int ref_last;

  rr_scheduler #(.N(N), .ELIGIBLE(ELIG)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_grant();
    int exp = -1;
    int k = ref_last;
    for (int n = 0; n < N; n++) begin
      k = (k == N - 1) ? 0 : k + 1;
      if (exp < 0 && req[k] && ELIG[k]) exp = k;
    end
    checks++;
    if ((exp < 0 && grant_valid) || (exp >= 0 && (!grant_valid || int'(grant_idx) != exp))) begin
      failures++;
      $display("FAIL req=%b last=%0d grant=%0d/%0d exp=%0d", req, ref_last, grant_valid, grant_idx, exp);
    end
    if (advance && exp >= 0) ref_last = exp;
  endtask

  initial begin
    automatic int order[8] = '{0, 1, 3, 4, 0, 1, 3, 4};
    req = '0; advance = 1'b0; ref_last = N - 1;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed: all request, always advance
    req = '1; advance = 1'b1;
    for (int i = 0; i < 8; i++) begin
      #1;
      checks++;
      if (!grant_valid || int'(grant_idx) != order[i]) begin
        failures++;
        $display("FAIL order step %0d grant=%0d exp=%0d", i, grant_idx, order[i]);
      end
      check_grant();
      @(negedge clk);
    end
    // random
    for (int i = 0; i < 2000; i++) begin
      req = N'($urandom);
      advance = 1'($urandom);
      #1;
      check_grant();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
