// tb_fifo_port: behavioural model of the FIFO side of one crossbar port.
//
// Stands for the communication controller and the channel FIFOs of one
// processor tile, which lie outside the network. It holds NF FIFOs of
// DEPTH words. The local processor writes with push/push_fifo/push_data.
// Towards the crossbar, fifo_sel chooses one FIFO; empty and data show that
// FIFO's state and head word at once (first-word fall-through), and read
// pops it at the clock edge. full reports the FIFO addressed by push_fifo.
// Not synthesizable intent; testbench use only.
module tb_fifo_port #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned FW     = 2,
  parameter int unsigned DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [FW-1:0]     push_fifo,
  input  logic [DATA_W-1:0] push_data,
  output logic              full,
  input  logic [FW-1:0]     fifo_sel,
  output logic              empty,
  output logic [DATA_W-1:0] data,
  input  logic              read
);
  localparam int unsigned NF = 1 << FW;

  logic [DATA_W-1:0] mem [NF][DEPTH];
  int unsigned       rd_ptr [NF];
  int unsigned       count  [NF];

  assign empty = (count[fifo_sel] == 0);
  assign data  = mem[fifo_sel][rd_ptr[fifo_sel]];
  assign full  = (count[push_fifo] == DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NF; f++) begin
        rd_ptr[f] <= 0;
        count[f]  <= 0;
        for (int i = 0; i < DEPTH; i++) mem[f][i] <= '0;
      end
    end else begin
      for (int f = 0; f < NF; f++) begin
        automatic bit do_rd = read && (fifo_sel == FW'(f)) && (count[f] != 0);
        automatic bit do_wr = push && (push_fifo == FW'(f)) && (count[f] != DEPTH);
        if (do_wr) mem[f][(rd_ptr[f] + count[f]) % DEPTH] <= push_data;
        if (do_rd) rd_ptr[f] <= (rd_ptr[f] + 1) % DEPTH;
        count[f] <= count[f] + (do_wr ? 1 : 0) - (do_rd ? 1 : 0);
      end
    end
  end

  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) read |-> !empty);
endmodule
