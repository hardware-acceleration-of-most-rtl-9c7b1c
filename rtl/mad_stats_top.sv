// mad_stats_top: accelerator for the statistics step of the appearance-based
// stage of the Most Apparent Distortion (MAD) image quality index. For every
// 16x16 block of an image, taken every 4 pixels in both directions, it
// computes the standard deviation, skewness and kurtosis of the block; it does
// this for NUM_IMG images at once (by default two, e.g. the reference and the
// distorted version of a log-Gabor-filtered image).
//
// Three kernels joined by channels (FIFOs), as in the design:
//   control_loop      walks the block positions, reads each block's rows from
//                     global memory, sends a descriptor and the rows
//   stats_appearance  the computation kernel (sum, deviation moments, std/skw/krt)
//   write_data        writes each block's results back to global memory
// Global memory itself is outside: the read port returns one 16-pixel row of
// every image per request, in order; the write port takes one result word
// (all images) per output index.
//
// Use: set cfg_p (P, block positions per side; the images are 4P x 4P pixels
// stored row-major at pixel address row*4P+col), pulse start, wait for done.
// Output index ix*P+iy gets the results of the block at pixel row 4*ix,
// column 4*iy; blocks that would cross the image edge give zeros. cfg_p may
// be anything from 4 to MAX_P (1024, a 4096x4096 image).
//
// Timing: with memory that keeps up, one in-range block per 17 cycles (one
// descriptor cycle and 16 rows in each kernel; an out-of-range position costs
// a few cycles); channel depths (HDR_DEPTH, DATA_DEPTH rows,
// RES_DEPTH) let the kernels run ahead of each other by that much.
//
// The two images are computed side by side by parallel datapaths that share
// the control; the data channel carries a row of both. Reset is asynchronous
// in every flop; lint also sees rst_n in the assertions' disable conditions
// and reports it as used synchronously there, which is harmless. The
// control loop's own done is not used: the run ends when the last result has
// been written.
module mad_stats_top
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG    = 2,
  parameter int unsigned HDR_DEPTH  = 4,
  parameter int unsigned DATA_DEPTH = 32,
  parameter int unsigned RES_DEPTH  = 4,
  parameter int unsigned STEPS      = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  input  logic [IDX_W-1:0]                       cfg_p,
  output logic                                   busy,
  output logic                                   done,
  // global memory read port
  output logic                                   rd_valid,
  input  logic                                   rd_ready,
  output logic [ADDR_W-1:0]                      rd_addr,
  input  logic                                   rsp_valid,
  input  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] rsp_data,
  // global memory write port
  output logic                                   wr_valid,
  input  logic                                   wr_ready,
  output logic [OIDX_W-1:0]                      wr_idx,
  output stats_t [NUM_IMG-1:0]                   wr_data
);
  localparam int unsigned ROW_W = NUM_IMG * BLK * PIX_W;
  localparam int unsigned RES_W = $bits(blk_hdr_t) + NUM_IMG * $bits(stats_t);

  logic ctl_busy, ctl_done, run;

  // descriptor channel
  logic     h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  blk_hdr_t h_in, h_out;
  // data channel
  logic     d_in_valid, d_in_ready, d_out_valid, d_out_ready;
  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] d_in, d_out;
  // result channel
  logic     r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  blk_hdr_t             r_in_hdr, r_out_hdr;
  stats_t [NUM_IMG-1:0] r_in_stats, r_out_stats;

  control_loop #(.NUM_IMG(NUM_IMG), .DATA_DEPTH(DATA_DEPTH)) u_ctl (
    .clk, .rst_n, .start, .cfg_p, .busy(ctl_busy), .done(ctl_done),
    .hdr_valid(h_in_valid), .hdr_ready(h_in_ready), .hdr(h_in),
    .rd_valid, .rd_ready, .rd_addr, .rsp_valid, .rsp_data,
    .dat_valid(d_in_valid), .dat_ready(d_in_ready), .dat_data(d_in),
    .data_pop(d_out_valid && d_out_ready));

  chan_fifo #(.WIDTH($bits(blk_hdr_t)), .DEPTH(HDR_DEPTH)) u_hdr_ch (
    .clk, .rst_n,
    .in_valid(h_in_valid), .in_ready(h_in_ready), .in_data(h_in),
    .out_valid(h_out_valid), .out_ready(h_out_ready), .out_data(h_out));

  chan_fifo #(.WIDTH(ROW_W), .DEPTH(DATA_DEPTH)) u_dat_ch (
    .clk, .rst_n,
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_data(d_in),
    .out_valid(d_out_valid), .out_ready(d_out_ready), .out_data(d_out));

  stats_appearance #(.NUM_IMG(NUM_IMG), .STEPS(STEPS)) u_stats (
    .clk, .rst_n,
    .hdr_valid(h_out_valid), .hdr_ready(h_out_ready), .hdr(h_out),
    .dat_valid(d_out_valid), .dat_ready(d_out_ready), .dat_data(d_out),
    .res_valid(r_in_valid), .res_ready(r_in_ready), .res_hdr(r_in_hdr),
    .res_stats(r_in_stats));

  chan_fifo #(.WIDTH(RES_W), .DEPTH(RES_DEPTH)) u_res_ch (
    .clk, .rst_n,
    .in_valid(r_in_valid), .in_ready(r_in_ready), .in_data({r_in_hdr, r_in_stats}),
    .out_valid(r_out_valid), .out_ready(r_out_ready), .out_data({r_out_hdr, r_out_stats}));

  write_data #(.NUM_IMG(NUM_IMG)) u_wr (
    .clk, .rst_n, .start, .cfg_p, .done,
    .in_valid(r_out_valid), .in_ready(r_out_ready), .in_hdr(r_out_hdr),
    .in_stats(r_out_stats),
    .wr_valid, .wr_ready, .wr_idx, .wr_data);

  // busy from start until the last result has been written
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    run <= 1'b0;
    else if (start) run <= 1'b1;
    else if (done)  run <= 1'b0;
  end
  assign busy = run || ctl_busy;

  logic unused_ok;
  assign unused_ok = ctl_done;
endmodule
