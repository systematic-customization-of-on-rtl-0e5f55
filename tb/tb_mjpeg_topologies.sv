// tb_mjpeg_topologies: the three MJPEG task graphs on customized networks.
//
// Builds one partial crossbar per task graph, with ports in topological
// order, and runs all-links traffic through each (tb_mjpeg_system):
//   4 nodes, 5 links:  Video in/out, DCT, Q, VLE in a ring plus a self loop
//   5 nodes, 7 links:  Video in feeds DCT, Q, VLE and Video out; DCT->Q->VLE->Video out
//   6 nodes, 14 links: Video in feeds four DCT/Q nodes and VLE/Video out; each
//                      DCT/Q node has a self loop and feeds VLE/Video out,
//                      which also has a self loop
// The masks are built here from link lists; the number of links of each is
// checked. Every word must arrive in order, and in the 6-node network the
// Video in node (no input links) must never hold a circuit.
module tb_mjpeg_topologies;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // link list entries: {reader, source}
  function automatic logic [24:0] mask5();
    int l [7][2] = '{'{1,0}, '{2,0}, '{2,1}, '{3,0}, '{3,2}, '{4,0}, '{4,3}};
    logic [24:0] m = '0;
    foreach (l[i]) m[l[i][0]*5 + l[i][1]] = 1'b1;
    return m;
  endfunction
  function automatic logic [35:0] mask6();
    logic [35:0] m = '0;
    for (int d = 1; d <= 4; d++) begin
      m[d*6 + 0] = 1'b1;   // Video in -> DCT/Q d
      m[d*6 + d] = 1'b1;   // self loop
      m[5*6 + d] = 1'b1;   // DCT/Q d -> VLE/Video out
    end
    m[5*6 + 0] = 1'b1;     // Video in -> VLE/Video out
    m[5*6 + 5] = 1'b1;     // self loop
    return m;
  endfunction
  localparam logic [24:0] M5 = mask5();
  localparam logic [35:0] M6 = mask6();

  logic d4, d5, d6;
  int c4, f4, k4, r4, x4, c5, f5, k5, r5, x5, c6, f6, k6, r6, x6;

  tb_mjpeg_system #(.N_PORTS(4), .FW(2), .TOKENS(16)) s4 (
    .clk, .rst_n, .done(d4), .checks(c4), .failures(f4), .circuits(k4), .refusals(r4), .max_concurrent(x4));
  tb_mjpeg_system #(.N_PORTS(5), .FW(3), .IN_MASK(M5), .TOKENS(16)) s5 (
    .clk, .rst_n, .done(d5), .checks(c5), .failures(f5), .circuits(k5), .refusals(r5), .max_concurrent(x5));
  tb_mjpeg_system #(.N_PORTS(6), .FW(3), .IN_MASK(M6), .TOKENS(16)) s6 (
    .clk, .rst_n, .done(d6), .checks(c6), .failures(f6), .circuits(k6), .refusals(r6), .max_concurrent(x6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && s6.linked[0]) begin
    failures++;
    $display("FAIL Video in node of the 6-node graph holds a circuit");
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int cyc = 0;
    check($countones(xbar_pkg::MJPEG4_IN_MASK) == 5, "4-node graph has 5 links");
    check($countones(M5) == 7, "5-node graph has 7 links");
    check($countones(M6) == 14, "6-node graph has 14 links");
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!(d4 && d5 && d6)) begin @(posedge clk); cyc++; end
    repeat (2) @(posedge clk);
    $display("4 nodes: words=%0d circuits=%0d refusals=%0d max concurrent=%0d", c4, k4, r4, x4);
    $display("5 nodes: words=%0d circuits=%0d refusals=%0d max concurrent=%0d", c5, k5, r5, x5);
    $display("6 nodes: words=%0d circuits=%0d refusals=%0d max concurrent=%0d", c6, k6, r6, x6);
    $display("all done after %0d cycles", cyc);
    check(c4 == 5 * 16 && f4 == 0, "4-node network delivered every word");
    check(c5 == 7 * 16 && f5 == 0, "5-node network delivered every word");
    check(c6 == 14 * 16 && f6 == 0, "6-node network delivered every word");
    check(x4 >= 2 && x5 >= 2 && x6 >= 2, "several circuits at once in each network");
    checks += c4 + c5 + c6;
    failures += f4 + f5 + f6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
