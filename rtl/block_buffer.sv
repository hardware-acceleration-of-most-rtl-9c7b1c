// block_buffer: the local memory of the computation kernel, holding the 256
// pixels of a block for every image so that the block can be read a second
// time (deviations from the mean) without going back to global memory.
//
// The memory has two banks of 16 rows; a row word holds the 16 pixels of one
// block row of each of the NUM_IMG images. One bank is filled while the other
// is read, so loading block n+1 overlaps the second pass over block n. That the
// kernel keeps the 256 elements of the current block in local memory follows
// the design; the two banks and the row-wide word are this design's choices.
//
// Ports: a write port (we, wbank, wrow, wdata) and a read port (rbank, rrow,
// rdata) that work in the same cycle. The read is registered: rdata shows the
// addressed row one clock after the address. No reset; a row is read only
// after it has been written.
module block_buffer
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG = 2
) (
  input  logic                                   clk,
  input  logic                                   we,
  input  logic                                   wbank,
  input  logic [3:0]                             wrow,
  input  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] wdata,
  input  logic                                   rbank,
  input  logic [3:0]                             rrow,
  output logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] rdata
);
  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] mem [2*BLK];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, wrow}] <= wdata;
    rdata <= mem[{rbank, rrow}];
  end
endmodule
