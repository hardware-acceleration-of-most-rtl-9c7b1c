// tb_block_sum: sends 60 block descriptors (every fifth out of range) with
// random pixel rows to the first pass, drains its output with random
// back-pressure and releases each bank a random time after its block left,
// as the second pass would. Checks: the block sums of both images, the
// descriptor and that out-of-range blocks take no rows and give zero sums; the
// 16 rows of each block written in order to the bank the output names, and no
// write to a bank still held; with data always available and the output free,
// the 16 rows of a block accepted in 16 consecutive cycles.
module tb_block_sum;
  import mad_pkg::*;

  localparam int NUM_IMG = 2, NBLK = 60;
  typedef logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] beat_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hdr_valid, hdr_ready, dat_valid, dat_ready;
  blk_hdr_t hdr, o_hdr;
  beat_t dat_data, buf_wdata;
  logic buf_we, buf_wbank, rel_valid, rel_bank, o_valid, o_ready, o_bank;
  logic [3:0] buf_wrow;
  logic [NUM_IMG-1:0][SUM_W-1:0] o_sum;

  int checks = 0, failures = 0, cycle = 0;
  bit held [2];
  beat_t wr_log [2][BLK];
  int    wr_cnt [2];

  block_sum #(.NUM_IMG(NUM_IMG)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: descriptors and rows
  blk_hdr_t hdr_q [$];
  beat_t    rows_q [$];
  int unsigned exp_sum [NBLK][NUM_IMG];
  bit          fast [NBLK];
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      blk_hdr_t h;
      h.in_range = (b % 5) != 4;
      h.ix = IDX_W'(b);
      h.iy = IDX_W'(3 * b);
      hdr_q.push_back(h);
      fast[b] = (b < 20);
      foreach (exp_sum[b][m]) exp_sum[b][m] = 0;
      if (h.in_range)
        for (int r = 0; r < BLK; r++) begin
          beat_t x;
          for (int m = 0; m < NUM_IMG; m++)
            for (int k = 0; k < BLK; k++) begin
              x[m][k] = PIX_W'($urandom);
              exp_sum[b][m] += x[m][k];
            end
          rows_q.push_back(x);
        end
    end
  end

  // descriptor and data sources; fast for the first 20 blocks, random after
  int hdr_sent = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      hdr_valid <= (hdr_q.size() > 0) && (hdr_sent < 20 || $urandom_range(1, 0) == 1);
      hdr       <= (hdr_q.size() > 0) ? hdr_q[0] : '0;
      dat_valid <= (rows_q.size() > 0) && (hdr_sent <= 20 || $urandom_range(3, 0) != 0);
      dat_data  <= (rows_q.size() > 0) ? rows_q[0] : '0;
    end
  end
  always @(posedge clk) begin
    if (hdr_valid && hdr_ready) begin
      void'(hdr_q.pop_front());
      hdr_sent++;
    end
    if (dat_valid && dat_ready) void'(rows_q.pop_front());
  end

  // buffer writes
  always @(posedge clk) begin
    if (buf_we) begin
      checks++;
      if (held[buf_wbank]) begin
        failures++;
        $display("cycle %0d: write to held bank %0d", cycle, buf_wbank);
      end
      if (buf_wrow != 4'(wr_cnt[buf_wbank])) begin
        failures++;
        $display("cycle %0d: row %0d written, expected %0d", cycle, buf_wrow, wr_cnt[buf_wbank]);
      end
      wr_log[buf_wbank][buf_wrow] = buf_wdata;
      wr_cnt[buf_wbank] = (wr_cnt[buf_wbank] + 1) % BLK;
    end
  end

  // consecutive-cycle row acceptance in the fast phase
  int run_len = 0, best_run = 0;
  always @(posedge clk) begin
    if (dat_valid && dat_ready) run_len++;
    else run_len = 0;
    if (run_len > best_run) best_run = run_len;
  end

  // output sink with bank release
  int nb = 0;
  int rel_at [$];
  bit rel_b  [$];
  initial begin
    o_ready = 1'b0;
    rel_valid = 1'b0;
    rel_bank = 1'b0;
    hdr_valid = 1'b0;
    dat_valid = 1'b0;
    hdr = '0;
    dat_data = '0;
    held[0] = 0; held[1] = 0; wr_cnt[0] = 0; wr_cnt[1] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (nb < NBLK) begin
      @(negedge clk);
      o_ready   = fast[nb] ? 1'b1 : ($urandom_range(2, 0) != 0);
      rel_valid = (rel_at.size() > 0) && (rel_at[0] <= cycle);
      rel_bank  = rel_valid ? rel_b[0] : 1'b0;
      #1;
      if (o_valid && o_ready) begin
        checks += 1 + NUM_IMG;
        if (o_hdr != hdr_qcopy(nb)) begin
          failures++;
          $display("block %0d: descriptor mismatch", nb);
        end
        for (int m = 0; m < NUM_IMG; m++)
          if (o_sum[m] != SUM_W'(exp_sum[nb][m])) begin
            failures++;
            $display("block %0d img %0d: sum %0d expected %0d", nb, m, o_sum[m], exp_sum[nb][m]);
          end
        if (o_hdr.in_range) begin
          held[o_bank] = 1'b1;
          rel_at.push_back(cycle + (fast[nb] ? 1 : $urandom_range(20, 1)));
          rel_b.push_back(o_bank);
        end
        nb++;
      end
      @(posedge clk);
      if (rel_valid) begin
        held[rel_bank] = 1'b0;
        void'(rel_at.pop_front());
        void'(rel_b.pop_front());
      end
    end
    checks++;
    if (best_run < BLK) begin
      failures++;
      $display("longest run of back-to-back rows %0d", best_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_hdr_t hdr_qcopy(input int b);
    blk_hdr_t h;
    h.in_range = (b % 5) != 4;
    h.ix = IDX_W'(b);
    h.iy = IDX_W'(3 * b);
    return h;
  endfunction
endmodule
