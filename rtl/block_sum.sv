// block_sum: first pass of the computation kernel ("read data and calculate
// sum"). It takes a block descriptor from the descriptor channel and, for a
// block inside the image, its 16 rows from the data channel, one row of 16
// pixels per image each cycle. Each row is written, as it arrives and
// unregistered, into a free bank of the local block buffer, and its 16 pixels
// are added (the fully unrolled inner loop of the algorithm) to the running
// block sum of that image.
//
// After the 16th row the descriptor, the bank number and the NUM_IMG block
// sums go to the output register (o_valid/o_ready) for the second pass, and
// the bank stays reserved until the second pass releases it (rel_valid,
// rel_bank; a release counts in the cycle it is signalled, so the next
// descriptor can be taken then). An out-of-range descriptor goes to the output at once with zero
// sums and reserves no bank.
//
// Timing: one cycle to take the descriptor, then one row per cycle, so a block
// takes 17 cycles when the data channel keeps up. The last row is accepted
// only when the output register is free. The row-per-cycle rate follows the
// design; the bank reservation and handshakes are this design's choices.
module block_sum
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // descriptor channel
  input  logic                                   hdr_valid,
  output logic                                   hdr_ready,
  input  blk_hdr_t                               hdr,
  // data channel
  input  logic                                   dat_valid,
  output logic                                   dat_ready,
  input  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] dat_data,
  // block buffer write port
  output logic                                   buf_we,
  output logic                                   buf_wbank,
  output logic [3:0]                             buf_wrow,
  output logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] buf_wdata,
  // bank release from the second pass
  input  logic                                   rel_valid,
  input  logic                                   rel_bank,
  // to the second pass
  output logic                                   o_valid,
  input  logic                                   o_ready,
  output blk_hdr_t                               o_hdr,
  output logic                                   o_bank,
  output logic [NUM_IMG-1:0][SUM_W-1:0]          o_sum
);
  typedef enum logic {S_IDLE, S_LOAD} state_e;

  state_e                       state;
  blk_hdr_t                     cur_hdr;
  logic [3:0]                   row;
  logic                         wb;
  logic [1:0]                   bank_full;
  logic [NUM_IMG-1:0][SUM_W-1:0] acc, acc_next;
  logic                         slot_free, bank_free, hdr_fire, dat_fire, last_row;

  assign slot_free = !o_valid || o_ready;
  // a bank being released in this cycle counts as free: its first row is
  // written one cycle later
  assign bank_free = !bank_full[wb] || (rel_valid && (rel_bank == wb));
  assign last_row  = (row == 4'(BLK - 1));

  always_comb begin
    hdr_ready = 1'b0;
    if (state == S_IDLE)
      hdr_ready = hdr.in_range ? bank_free : slot_free;
  end
  assign dat_ready = (state == S_LOAD) && (!last_row || slot_free);
  assign hdr_fire  = hdr_valid && hdr_ready;
  assign dat_fire  = dat_valid && dat_ready;

  // Row sum of each image (unrolled over the 16 pixels) added to the block sum.
  always_comb begin
    for (int m = 0; m < NUM_IMG; m++) begin
      logic [SUM_W-1:0] rs;
      rs = '0;
      for (int k = 0; k < BLK; k++) rs += SUM_W'(dat_data[m][k]);
      acc_next[m] = acc[m] + rs;
    end
  end

  assign buf_we    = dat_fire;
  assign buf_wbank = wb;
  assign buf_wrow  = row;
  assign buf_wdata = dat_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_hdr   <= '0;
      row       <= '0;
      wb        <= 1'b0;
      bank_full <= '0;
      acc       <= '0;
      o_valid   <= 1'b0;
      o_hdr     <= '0;
      o_bank    <= 1'b0;
      o_sum     <= '0;
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      if (rel_valid) bank_full[rel_bank] <= 1'b0;
      unique case (state)
        S_IDLE: if (hdr_fire) begin
          if (hdr.in_range) begin
            cur_hdr <= hdr;
            row     <= '0;
            acc     <= '0;
            state   <= S_LOAD;
          end else begin
            o_valid <= 1'b1;
            o_hdr   <= hdr;
            o_bank  <= wb;
            o_sum   <= '0;
          end
        end
        S_LOAD: if (dat_fire) begin
          acc <= acc_next;
          row <= row + 1'b1;
          if (last_row) begin
            o_valid       <= 1'b1;
            o_hdr         <= cur_hdr;
            o_bank        <= wb;
            o_sum         <= acc_next;
            bank_full[wb] <= 1'b1;
            wb            <= !wb;
            state         <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_reuse: assert property (@(posedge clk) disable iff (!rst_n)
                               buf_we |-> !bank_full[buf_wbank]);
endmodule
