// stats_moments: second pass of the computation kernel ("calculate mean" and
// the moment loop that feeds "calculate std, skw and krt"). It reads the block
// back from the local buffer one row per cycle and sums, over the 256 pixels,
// the 2nd, 3rd and 4th powers of each pixel's deviation from the block mean.
//
// The mean is sum/256. To stay exact in integers, the deviation is scaled by
// 256: d = 256*x - sum, so a2 = sum(d^2), a3 = sum(d^3), a4 = sum(d^4) are
// 256^2, 256^3 and 256^4 times the central moment sums of the algorithm. The
// 16 pixels of a row are handled in parallel and added into per-row partial
// sums first (stdev1/skw1/krt1 of the algorithm), which are then added into
// the block totals. Pass structure, row partial sums and the row-per-cycle rate
// follow the design; the exact integer arithmetic is this design's choice (the
// algorithm uses single-precision float).
//
// Interface: input register handshake i_valid/i_ready with descriptor, buffer
// bank and NUM_IMG block sums from block_sum; block buffer read port
// (buf_rbank, buf_rrow, buf_rdata one cycle later); rel_valid/rel_bank free the
// bank in the cycle its 16th row read is issued (combinational); output register o_valid/o_ready with the
// descriptor and the moments of every image. An out-of-range descriptor gives
// zero moments without reading the buffer.
//
// Timing: 1 cycle to accept, 16 row reads, 1 cycle for the last row; the
// next in-range block can be accepted in that last cycle, so blocks follow
// every 17 cycles when the output is drained.
module stats_moments
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   i_valid,
  output logic                                   i_ready,
  input  blk_hdr_t                               i_hdr,
  input  logic                                   i_bank,
  input  logic [NUM_IMG-1:0][SUM_W-1:0]          i_sum,
  output logic                                   buf_rbank,
  output logic [3:0]                             buf_rrow,
  input  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] buf_rdata,
  output logic                                   rel_valid,
  output logic                                   rel_bank,
  output logic                                   o_valid,
  input  logic                                   o_ready,
  output blk_hdr_t                               o_hdr,
  output moments_t [NUM_IMG-1:0]                 o_mom
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;

  state_e                        state;
  blk_hdr_t                      cur_hdr;
  logic                          bank;
  logic [NUM_IMG-1:0][SUM_W-1:0] sum;
  logic [3:0]                    rrow;
  logic                          v1;        // buf_rdata holds a row to add
  moments_t [NUM_IMG-1:0]        acc, acc_next;
  logic                          slot_free;

  assign slot_free = !o_valid || o_ready;
  // A new in-range block is also taken in the finishing cycle of the previous
  // one, as its result leaves, so that its first read follows the last read
  // of the previous block after one cycle.
  assign i_ready   = ((state == S_IDLE) && (i_hdr.in_range || slot_free)) ||
                     ((state == S_FIN) && slot_free && i_hdr.in_range);
  assign buf_rbank = bank;
  // The last read of the block is issued (and its data registered) at the end
  // of this cycle, so the bank may be refilled from the next one on.
  assign rel_valid = (state == S_RUN) && (rrow == 4'(BLK - 1));
  assign rel_bank  = bank;
  assign buf_rrow  = rrow;

  // Deviation powers of the 16 pixels of the row just read, row partial sums,
  // then block totals.
  always_comb begin
    for (int m = 0; m < NUM_IMG; m++) begin
      logic signed [DEV_W-1:0]   d;
      logic signed [2*DEV_W-1:0] d2;
      logic        [2*DEV_W-1:0] u2;
      logic signed [A3_W-1:0]    d3, r3;
      logic        [A2_W-1:0]    r2;
      logic        [A4_W-1:0]    r4;
      r2 = '0;
      r3 = '0;
      r4 = '0;
      for (int k = 0; k < BLK; k++) begin
        d  = $signed({1'b0, buf_rdata[m][k], 8'b0}) - $signed({1'b0, sum[m]});
        d2 = d * d;
        u2 = d2;
        d3 = A3_W'(d2) * A3_W'(d);
        r2 += A2_W'(u2);
        r3 += d3;
        r4 += A4_W'(u2) * A4_W'(u2);
      end
      acc_next[m].a2 = acc[m].a2 + r2;
      acc_next[m].a3 = acc[m].a3 + r3;
      acc_next[m].a4 = acc[m].a4 + r4;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_hdr   <= '0;
      bank      <= 1'b0;
      sum       <= '0;
      rrow      <= '0;
      v1        <= 1'b0;
      acc       <= '0;
      o_valid   <= 1'b0;
      o_hdr     <= '0;
      o_mom     <= '0;
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      if (v1) acc <= acc_next;
      v1 <= 1'b0;
      unique case (state)
        S_IDLE: if (i_valid && i_ready) begin
          if (i_hdr.in_range) begin
            cur_hdr <= i_hdr;
            bank    <= i_bank;
            sum     <= i_sum;
            rrow    <= '0;
            acc     <= '0;
            state   <= S_RUN;
          end else begin
            o_valid <= 1'b1;
            o_hdr   <= i_hdr;
            o_mom   <= '0;
          end
        end
        S_RUN: begin
          v1   <= 1'b1;
          rrow <= rrow + 1'b1;
          if (rrow == 4'(BLK - 1)) state <= S_FIN;
        end
        S_FIN: if (slot_free) begin
          o_valid   <= 1'b1;
          o_hdr     <= cur_hdr;
          o_mom     <= v1 ? acc_next : acc;
          if (i_valid && i_hdr.in_range) begin
            cur_hdr <= i_hdr;
            bank    <= i_bank;
            sum     <= i_sum;
            rrow    <= '0;
            acc     <= '0;
            state   <= S_RUN;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
