// tb_stats_moments: puts random blocks of several kinds into a model of the
// two-bank block memory, hands them with their sums to the second pass and
// compares the three moment sums of both images with an exact wide-integer
// computation from the pixels. Also checks that out-of-range blocks give zero
// moments, that each in-range block releases its bank exactly once, and that
// with blocks presented back to back and the output free, in-range blocks are
// accepted every 17 cycles (the next block is taken while the previous one's
// result leaves). The second half adds random input gaps and output stalls.
module tb_stats_moments;
  import mad_pkg::*;
  import tb_ref_pkg::*;

  localparam int NUM_IMG = 2, NBLK = 80;
  typedef logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] beat_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid, i_ready, i_bank, buf_rbank, rel_valid, rel_bank, o_valid, o_ready;
  blk_hdr_t i_hdr, o_hdr;
  logic [NUM_IMG-1:0][SUM_W-1:0] i_sum;
  logic [3:0] buf_rrow;
  beat_t buf_rdata;
  moments_t [NUM_IMG-1:0] o_mom;

  int checks = 0, failures = 0, cycle = 0;
  beat_t mem [2][BLK];
  int    n_rel [2];

  stats_moments #(.NUM_IMG(NUM_IMG)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) buf_rdata <= mem[buf_rbank][buf_rrow];
  always @(posedge clk) if (rst_n && rel_valid) n_rel[rel_bank]++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in order
  blk_hdr_t               exp_hdr [$];
  moments_t [NUM_IMG-1:0] exp_mom [$];
  int n_out = 0;
  bit slow = 1'b0;
  always @(negedge clk) o_ready <= !slow || ($urandom_range(2, 0) != 0);
  always @(posedge clk) begin
    if (rst_n && o_valid && o_ready) begin
      checks += 1 + 3 * NUM_IMG;
      if (exp_hdr.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        blk_hdr_t h;
        moments_t [NUM_IMG-1:0] e;
        h = exp_hdr.pop_front();
        e = exp_mom.pop_front();
        if (o_hdr != h) begin failures++; $display("result %0d: descriptor mismatch", n_out); end
        for (int m = 0; m < NUM_IMG; m++) begin
          if (o_mom[m].a2 != e[m].a2) begin failures++; $display("result %0d img %0d a2", n_out, m); end
          if (o_mom[m].a3 != e[m].a3) begin failures++; $display("result %0d img %0d a3", n_out, m); end
          if (o_mom[m].a4 != e[m].a4) begin failures++; $display("result %0d img %0d a4", n_out, m); end
        end
      end
      n_out++;
    end
  end

  initial begin
    blk_px_t px [NUM_IMG];
    logic [55:0] a2;
    logic signed [80:0] a3;
    logic [103:0] a4;
    moments_t [NUM_IMG-1:0] expm;
    int last_acc, t_acc, n_gap;
    int exp_rel [2];
    i_valid = 1'b0; i_hdr = '0; i_bank = 1'b0; i_sum = '0; o_ready = 1'b1;
    n_rel[0] = 0; n_rel[1] = 0; exp_rel[0] = 0; exp_rel[1] = 0;
    last_acc = -1;
    n_gap = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      bit inr, bk, fast;
      inr  = (b % 7) != 6;
      bk   = b[0];
      fast = (b < 30);
      slow = !fast;
      for (int m = 0; m < NUM_IMG; m++) begin
        int unsigned s;
        px[m] = fill_block((b + 2 * m) % 6);
        s = 0;
        foreach (px[m][k]) s += px[m][k];
        i_sum[m] = SUM_W'(s);
        exact_moments(px[m], a2, a3, a4);
        expm[m].a2 = inr ? a2 : '0;
        expm[m].a3 = inr ? a3 : '0;
        expm[m].a4 = inr ? a4 : '0;
        // the bank of the previous block is still being read: use the other
        for (int k = 0; k < 256; k++) mem[bk][k / 16][m][k % 16] = PIX_W'(px[m][k]);
      end
      i_hdr = '{in_range: inr, ix: IDX_W'(b), iy: IDX_W'(b + 5)};
      i_bank = bk;
      if (!fast) repeat ($urandom_range(3, 0)) @(negedge clk);
      i_valid = 1'b1;
      #1;
      while (!i_ready) begin
        @(negedge clk);
        #1;
      end
      exp_hdr.push_back(i_hdr);
      exp_mom.push_back(expm);
      @(posedge clk);
      t_acc = int'($time / 10);
      // with the input kept full and the output free, in-range blocks are
      // accepted every 17 cycles
      if (fast && inr && last_acc >= 0) begin
        checks++;
        n_gap++;
        if (t_acc - last_acc != 17) begin
          failures++;
          $display("block %0d accepted %0d cycles after the previous one", b, t_acc - last_acc);
        end
      end
      last_acc = inr ? t_acc : -1;
      @(negedge clk);
      i_valid = 1'b0;
      if (inr) exp_rel[bk]++;
    end
    while (n_out < NBLK) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (n_rel[k] != exp_rel[k]) begin
        failures++;
        $display("bank %0d released %0d times, expected %0d", k, n_rel[k], exp_rel[k]);
      end
    end
    checks++;
    if (n_gap < 20) begin failures++; $display("only %0d back-to-back blocks timed", n_gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
