// stats_appearance: the computation kernel. For each block descriptor from the
// descriptor channel it takes the block's 16 rows of every image from the data
// channel and produces the standard deviation, skewness and kurtosis of the
// block in each of the NUM_IMG images (two by default: the kernel works on two
// images side by side).
//
// Structure, a three-stage pipeline with one block in each stage:
//   block_sum      reads the rows into one bank of block_buffer and sums them
//   (sum queue)    a SUM_DEPTH-deep chan_fifo of descriptors, banks and sums
//   stats_moments  reads the bank back and sums powers of the deviations
//   stats_finalize turns the sums into std, skw and krt
// The pass structure (sum, mean, deviation moments, normalisation) follows the
// design; the stage split, the two-bank local memory and the handshakes are
// this design's choices. The sum queue lets out-of-range descriptors (which
// carry no rows) wait for the second pass without holding up the loading of
// the next in-range block; the two banks still limit the in-range blocks
// between the passes to two.
//
// Interface: descriptor channel (hdr_*), data channel (dat_*), result
// register (res_valid/res_ready with the descriptor and NUM_IMG result sets).
// All handshakes move a word when valid and ready are high at a clock edge.
//
// Timing: a new in-range block can start every 17 cycles (one descriptor
// cycle and 16 rows in both passes; the released bank is refilled from the
// cycle after the second pass's last read); latency from the first row to the result is about 50 cycles.
module stats_appearance
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG   = 2,
  parameter int unsigned STEPS     = 8,
  parameter int unsigned SUM_DEPTH = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   hdr_valid,
  output logic                                   hdr_ready,
  input  blk_hdr_t                               hdr,
  input  logic                                   dat_valid,
  output logic                                   dat_ready,
  input  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] dat_data,
  output logic                                   res_valid,
  input  logic                                   res_ready,
  output blk_hdr_t                               res_hdr,
  output stats_t [NUM_IMG-1:0]                   res_stats
);
  localparam int unsigned Q_W = $bits(blk_hdr_t) + 1 + NUM_IMG * SUM_W;
  // block_sum -> sum queue -> stats_moments
  logic                          s_valid, s_ready, s_bank, q_valid, q_ready, q_bank;
  blk_hdr_t                      s_hdr, q_hdr;
  logic [NUM_IMG-1:0][SUM_W-1:0] s_sum, q_sum;
  // stats_moments -> stats_finalize
  logic                          m_valid, m_ready;
  blk_hdr_t                      m_hdr;
  moments_t [NUM_IMG-1:0]        m_mom;
  // local memory
  logic                          we, wbank, rbank, rel_valid, rel_bank;
  logic [3:0]                    wrow, rrow;
  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] wdata, rdata;

  block_sum #(.NUM_IMG(NUM_IMG)) u_sum (
    .clk, .rst_n,
    .hdr_valid, .hdr_ready, .hdr,
    .dat_valid, .dat_ready, .dat_data,
    .buf_we(we), .buf_wbank(wbank), .buf_wrow(wrow), .buf_wdata(wdata),
    .rel_valid, .rel_bank,
    .o_valid(s_valid), .o_ready(s_ready), .o_hdr(s_hdr), .o_bank(s_bank), .o_sum(s_sum));

  block_buffer #(.NUM_IMG(NUM_IMG)) u_buf (
    .clk, .we, .wbank, .wrow, .wdata, .rbank, .rrow, .rdata);

  chan_fifo #(.WIDTH(Q_W), .DEPTH(SUM_DEPTH)) u_sumq (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_data({s_hdr, s_bank, s_sum}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data({q_hdr, q_bank, q_sum}));

  stats_moments #(.NUM_IMG(NUM_IMG)) u_mom (
    .clk, .rst_n,
    .i_valid(q_valid), .i_ready(q_ready), .i_hdr(q_hdr), .i_bank(q_bank), .i_sum(q_sum),
    .buf_rbank(rbank), .buf_rrow(rrow), .buf_rdata(rdata),
    .rel_valid, .rel_bank,
    .o_valid(m_valid), .o_ready(m_ready), .o_hdr(m_hdr), .o_mom(m_mom));

  stats_finalize #(.NUM_IMG(NUM_IMG), .STEPS(STEPS)) u_fin (
    .clk, .rst_n,
    .i_valid(m_valid), .i_ready(m_ready), .i_hdr(m_hdr), .i_mom(m_mom),
    .o_valid(res_valid), .o_ready(res_ready), .o_hdr(res_hdr), .o_stats(res_stats));
endmodule
