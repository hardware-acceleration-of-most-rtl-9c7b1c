// write_data: the write-back kernel. It takes block results from the result
// channel and writes them to global memory at the block's output index
// ix*P + iy, where P (cfg_p) is the number of block positions per image side;
// each write carries the std, skw and krt of every image. Keeping the writes
// in a kernel of their own, so the computation kernel never waits on global
// memory, follows the design; the write port and the completion count are
// this design's choices.
//
// Interface: result channel in_valid/in_ready with descriptor and NUM_IMG
// result sets; memory write port wr_valid/wr_ready/wr_idx/wr_data, one word per
// accepted handshake. start clears the count of writes; done pulses for one
// cycle when cfg_p*cfg_p writes have been accepted since start. The in_range
// bit of the descriptor is not needed here (it is left unread): out-of-range
// blocks arrive with zero results and are written like the others.
//
// Timing: one register stage; one write per cycle when memory accepts.
module write_data
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [IDX_W-1:0]       cfg_p,
  output logic                   done,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  blk_hdr_t               in_hdr,
  input  stats_t [NUM_IMG-1:0]   in_stats,
  output logic                   wr_valid,
  input  logic                   wr_ready,
  output logic [OIDX_W-1:0]      wr_idx,
  output stats_t [NUM_IMG-1:0]   wr_data
);
  logic [OIDX_W:0] n_written, total;

  assign in_ready = !wr_valid || wr_ready;
  assign total    = (OIDX_W + 1)'(cfg_p) * (OIDX_W + 1)'(cfg_p);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid  <= 1'b0;
      wr_idx    <= '0;
      wr_data   <= '0;
      n_written <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr_valid && wr_ready) begin
        wr_valid <= 1'b0;
        if (n_written + 1'b1 == total) done <= 1'b1;
        n_written <= n_written + 1'b1;
      end
      if (start) n_written <= '0;
      if (in_valid && in_ready) begin
        wr_valid <= 1'b1;
        wr_idx   <= OIDX_W'(OIDX_W'(in_hdr.ix) * OIDX_W'(cfg_p) + OIDX_W'(in_hdr.iy));
        wr_data  <= in_stats;
      end
    end
  end

  a_hold_write: assert property (@(posedge clk) disable iff (!rst_n)
                                 wr_valid && !wr_ready |=> wr_valid && $stable(wr_idx));
endmodule
