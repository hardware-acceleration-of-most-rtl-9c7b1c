// tb_stats_appearance: the whole computation kernel on 120 blocks of two
// images (every eighth out of range), blocks of all the kinds the reference
// package makes. Phase 1 (first 60 blocks) keeps the descriptor and data
// channels full and the output always ready, and checks that results come out
// at one in-range block per 17 cycles; phase 2 adds random gaps on the inputs and
// random back-pressure on the output. Every result is compared with the
// double-precision reference, in order, descriptor included.
module tb_stats_appearance;
  import mad_pkg::*;
  import tb_ref_pkg::*;

  localparam int NUM_IMG = 2, NBLK = 120, NFAST = 60;
  typedef logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] beat_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hdr_valid, hdr_ready, dat_valid, dat_ready, res_valid, res_ready;
  blk_hdr_t hdr, res_hdr;
  beat_t dat_data;
  stats_t [NUM_IMG-1:0] res_stats;

  int checks = 0, failures = 0, cycle = 0;

  stats_appearance #(.NUM_IMG(NUM_IMG)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk_hdr_t   hdr_q [$];
  beat_t      rows_q [$];
  blk_hdr_t   exp_hdr [NBLK];
  ref_stats_t exp_st [NBLK][NUM_IMG];
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      blk_px_t px [NUM_IMG];
      blk_hdr_t h;
      h = '{in_range: (b % 8) != 7, ix: IDX_W'(b / 11), iy: IDX_W'(b % 11)};
      hdr_q.push_back(h);
      exp_hdr[b] = h;
      for (int m = 0; m < NUM_IMG; m++) begin
        px[m] = fill_block((b + m) % 6);
        exp_st[b][m] = ref_stats(px[m]);
      end
      if (h.in_range)
        for (int r = 0; r < BLK; r++) begin
          beat_t x;
          for (int m = 0; m < NUM_IMG; m++)
            for (int k = 0; k < BLK; k++) x[m][k] = PIX_W'(px[m][r * BLK + k]);
          rows_q.push_back(x);
        end
    end
  end

  int nres = 0;
  bit slow = 1'b0;
  always @(negedge clk) begin
    if (rst_n) begin
      hdr_valid <= (hdr_q.size() > 0) && (!slow || $urandom_range(2, 0) != 0);
      hdr       <= (hdr_q.size() > 0) ? hdr_q[0] : '0;
      dat_valid <= (rows_q.size() > 0) && (!slow || $urandom_range(4, 0) != 0);
      dat_data  <= (rows_q.size() > 0) ? rows_q[0] : '0;
      res_ready <= !slow || $urandom_range(2, 0) != 0;
    end
  end
  always @(posedge clk) begin
    if (rst_n && hdr_valid && hdr_ready) void'(hdr_q.pop_front());
    if (rst_n && dat_valid && dat_ready) void'(rows_q.pop_front());
  end

  // results
  int t_first_in = -1, t_last_fast = -1;
  always @(posedge clk) begin
    if (rst_n && res_valid && res_ready) begin
      checks++;
      if (res_hdr != exp_hdr[nres]) begin
        failures++;
        $display("result %0d: descriptor mismatch", nres);
      end
      for (int m = 0; m < NUM_IMG; m++) begin
        if (exp_hdr[nres].in_range) begin
          checks += 3;
          failures += stats_errors(res_stats[m], exp_st[nres][m],
                                   $sformatf("block %0d img %0d", nres, m));
        end else begin
          checks++;
          if (res_stats[m] != '0) begin
            failures++;
            $display("block %0d: out-of-range result not zero", nres);
          end
        end
      end
      if (nres == 0) t_first_in = cycle;
      if (nres == NFAST - 1) t_last_fast = cycle;
      nres++;
      if (nres == NFAST) slow = 1'b1;
    end
  end

  initial begin
    int n_in;
    hdr_valid = 1'b0; dat_valid = 1'b0; res_ready = 1'b0; hdr = '0; dat_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (nres < NBLK) @(negedge clk);
    // at most 17 cycles per in-range block once the pipeline is full, and 3
    // per out-of-range block
    n_in = 0;
    for (int b = 1; b < NFAST; b++) n_in += exp_hdr[b].in_range;
    checks++;
    if (t_last_fast - t_first_in > 17 * n_in + 3 * (NFAST - 1 - n_in)) begin
      failures++;
      $display("%0d cycles for %0d blocks", t_last_fast - t_first_in, NFAST - 1);
    end
    $display("phase 1: %0d cycles for %0d blocks", t_last_fast - t_first_in, NFAST - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
