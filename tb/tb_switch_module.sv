// tb_switch_module: self-checking test of the topology-specific switch.
//
// Uses the 4-port MJPEG topology (P1 reads P1,P4; P2 reads P1; P3 reads P2;
// P4 reads P3). For random FIFO data, empty flags and read strobes, every
// combination of CTRL_FIFO and CTRL_PROC codes is applied per port and the
// three multiplexor outputs are compared with a reference built from the
// link table written out below by hand (not derived from the mask).
module tb_switch_module;
  import xbar_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned W = 32;
  localparam int unsigned CW = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0][W-1:0]  fifo_data;
  logic [N-1:0]         fifo_empty;
  logic [N-1:0]         fifo_read;
  logic [N-1:0]         proc_read;
  logic [N-1:0][W-1:0]  proc_data;
  logic [N-1:0]         proc_empty;
  logic [N-1:0][CW-1:0] ctrl_fifo;
  logic [N-1:0][CW-1:0] ctrl_proc;
  int checks = 0, failures = 0;

  switch_module dut (.*);

  // reference link table: reads[p][s] = processor p reads FIFO port s
  function automatic bit reads(int p, int s);
    case (p)
      0: return (s == 0) || (s == 3);
      1: return (s == 0);
      2: return (s == 1);
      3: return (s == 2);
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      for (int i = 0; i < N; i++) fifo_data[i] = $urandom;
      fifo_empty = N'($urandom);
      proc_read  = N'($urandom);
      for (int c = 0; c < 8; c++) begin
        for (int i = 0; i < N; i++) begin
          ctrl_fifo[i] = CW'((c + i) % 8);
          ctrl_proc[i] = CW'((c + 3 * i + trial) % 8);
        end
        @(posedge clk);
        for (int p = 0; p < N; p++) begin
          int s;
          logic [W-1:0] ed;
          logic ee, er;
          s  = int'(ctrl_fifo[p]) - 1;
          ed = (s >= 0 && s < N && reads(p, s)) ? fifo_data[s] : '0;
          ee = (s >= 0 && s < N && reads(p, s)) ? fifo_empty[s] : 1'b1;
          s  = int'(ctrl_proc[p]) - 1;   // processor reading FIFO port p
          er = (s >= 0 && s < N && reads(s, p)) ? proc_read[s] : 1'b0;
          checks += 3;
          if (proc_data[p] !== ed) begin failures++; $display("FAIL data p=%0d sel=%0d got=%h exp=%h", p, ctrl_fifo[p], proc_data[p], ed); end
          if (proc_empty[p] !== ee) begin failures++; $display("FAIL empty p=%0d sel=%0d", p, ctrl_fifo[p]); end
          if (fifo_read[p] !== er) begin failures++; $display("FAIL read k=%0d sel=%0d", p, ctrl_proc[p]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
