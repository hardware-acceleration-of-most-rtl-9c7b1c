// chan_fifo: a channel between two kernels of the accelerator, built as a
// synchronous first-in first-out queue.
//
// Kernels of the design talk only through such channels, so a full channel
// stalls the writer and an empty one stalls the reader; the queue depth is what
// lets the reader keep working while the writer waits on memory. That channels
// are FIFOs comes from the design; depth, width and the valid/ready handshake
// are this design's choices.
//
// Interface: in_valid/in_ready/in_data on the write side, out_valid/out_ready/
// out_data on the read side. A word moves when valid and ready are both high
// at a rising clock edge. out_data shows the oldest word while out_valid is
// high (first-word fall-through), so a word written at edge n can be read at
// edge n+1. Reset is active low and
// empties the queue.
module chan_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;
  logic [$clog2(DEPTH+1)-1:0] count;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid  && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A writer must hold its word until the channel takes it.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid && !in_ready |=> in_valid && $stable(in_data));
endmodule
