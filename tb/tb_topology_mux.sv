// tb_topology_mux: self-checking test of the variable-way multiplexor.
//
// A 5-input, 8-bit mux with links only on inputs 0, 2 and 4 and clear value
// 8'hA5 is driven with every select code (including unlinked and out-of-range
// codes) over many random input sets. The expected output is worked out from
// the link list: the selected input if the select names a linked input,
// otherwise the clear value.
module tb_topology_mux;
  localparam int unsigned N_IN  = 5;
  localparam int unsigned WIDTH = 8;
  localparam logic [N_IN-1:0] LINKS = 5'b10101;
  localparam logic [WIDTH-1:0] CLR = 8'hA5;
  localparam int unsigned SEL_W = $clog2(N_IN + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [SEL_W-1:0]           sel;
  logic [N_IN-1:0][WIDTH-1:0] in;
  logic [WIDTH-1:0]           out;
  int checks = 0, failures = 0;

  topology_mux #(.N_IN(N_IN), .WIDTH(WIDTH), .LINKS(LINKS), .CLEAR_VALUE(CLR)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp;
    for (int trial = 0; trial < 50; trial++) begin
      for (int i = 0; i < N_IN; i++) in[i] = WIDTH'($urandom);
      for (int s = 0; s < (1 << SEL_W); s++) begin
        sel = SEL_W'(s);
        @(posedge clk);
        case (s)
          1: exp = in[0];
          3: exp = in[2];
          5: exp = in[4];
          default: exp = CLR;
        endcase
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL sel=%0d out=%h exp=%h", s, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
