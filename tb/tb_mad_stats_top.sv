// tb_mad_stats_top: end-to-end test of the whole accelerator on a
// 48x48-pixel image pair (P = 12 block positions per side), run twice, with
// small channels (HDR_DEPTH 2, DATA_DEPTH 8, RES_DEPTH 2) so that they fill.
//
// A behavioural global memory serves the read port: it holds NUM_IMG images
// of 4P x 4P 16-bit pixels made by a fixed formula (with a flat corner, so
// some blocks have zero variance, and a different pattern per image), accepts
// row requests (randomly refusing some in the stalled run), and answers them in
// order after a random latency. A write sink takes the results, randomly
// refusing some in the stalled run. Every written result is compared with a
// double-precision reference computed from the same pixels (zeros for the
// blocks that cross the image edge); every output index must be written once,
// and done must pulse once, after the last write.
//
// Run 1 (random stalls) must make each mechanism of the design happen at
// least once; each is counted and a failure is counted for any that never
// did: in-range and out-of-range blocks, zero-variance blocks, a memory read
// stall, the control loop waiting for data-channel credits, a full descriptor
// channel, a block loaded into one buffer bank while the other is held, a refused result
// write and back-pressure into the computation kernel. Run 2 (nothing stalls)
// checks the rate: 17 cycles per in-range block, plus at most 5 per
// out-of-range position.
module tb_mad_stats_top;
  import mad_pkg::*;
  import tb_ref_pkg::*;

  localparam int NUM_IMG = 2, P = 12;
  typedef logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] beat_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready;
  logic [IDX_W-1:0] cfg_p;
  logic [ADDR_W-1:0] rd_addr;
  beat_t rsp_data;
  logic [OIDX_W-1:0] wr_idx;
  stats_t [NUM_IMG-1:0] wr_data;

  int checks = 0, failures = 0, cycle = 0;
  bit stall_mode = 1'b0;

  mad_stats_top #(.HDR_DEPTH(2), .DATA_DEPTH(8), .RES_DEPTH(2)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel of image m at (row, col)
  function automatic int unsigned pix(input int m, input int r, input int c);
    int unsigned h;
    if (r < 20 && c < 20) return 1000 + 7 * m;  // flat corner
    h = r * 2654435 + c * 40503 + m * 977 + (r * c) * 13;
    h = h ^ (h >> 7);
    if (m == 1) h = h * 3 + 11;
    // mix of wide and narrow ranges across the image
    return (((r / 16) + (c / 16)) % 3 == 0) ? (h & 32'hffff) : (h & 32'h00ff) + 300;
  endfunction

  function automatic beat_t row_at(input int unsigned addr);
    beat_t b;
    int r, c;
    r = addr / (4 * P);
    c = addr % (4 * P);
    for (int m = 0; m < NUM_IMG; m++)
      for (int k = 0; k < BLK; k++) b[m][k] = PIX_W'(pix(m, r, c + k));
    return b;
  endfunction

  // global memory read port
  int unsigned req_q [$];
  int          due_q [$];
  always @(negedge clk) rd_ready <= stall_mode ? ($urandom_range(99, 0) < 70) : 1'b1;
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (rst_n && rd_valid && rd_ready) begin
      int due;
      due = cycle + (stall_mode ? $urandom_range(12, 1) : 2);
      if (due_q.size() > 0 && due < due_q[$]) due = due_q[$];
      req_q.push_back(32'(rd_addr));
      due_q.push_back(due);
    end
    if (due_q.size() > 0 && due_q[0] <= cycle) begin
      rsp_valid <= 1'b1;
      rsp_data  <= row_at(req_q.pop_front());
      void'(due_q.pop_front());
    end
  end

  // mechanisms
  int n_in = 0, n_out = 0, n_flat = 0, n_rd_stall = 0, n_credit = 0, n_hdr_full = 0;
  int n_both_banks = 0, n_wr_stall = 0, n_res_bp = 0, n_done = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_valid && !rd_ready) n_rd_stall++;
      if (dut.u_ctl.busy && dut.u_ctl.credits == '0) n_credit++;
      if (dut.h_in_valid && !dut.h_in_ready) n_hdr_full++;
      if (dut.u_stats.we && dut.u_stats.u_sum.bank_full[!dut.u_stats.wbank]) n_both_banks++;
      if (wr_valid && !wr_ready) n_wr_stall++;
      if (dut.r_in_valid && !dut.r_in_ready) n_res_bp++;
      if (done) n_done++;
    end
  end

  // write sink and result check
  int written [P * P];
  int n_wr = 0;
  always @(negedge clk) wr_ready <= stall_mode ? ($urandom_range(99, 0) < 40) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      int ix, iy;
      bit inr;
      ix = int'(wr_idx) / P;
      iy = int'(wr_idx) % P;
      checks++;
      if (wr_idx >= OIDX_W'(P * P) || written[int'(wr_idx)] != 0) begin
        failures++;
        $display("bad or repeated output index %0d", wr_idx);
      end else begin
        written[int'(wr_idx)]++;
        if (n_done != 0) begin
          failures++;
          $display("write after done");
        end
        inr = (4 * ix < 4 * P - 15) && (4 * iy < 4 * P - 15);
        if (inr) begin
          bit flat;
          n_in++;
          flat = 1'b0;
          for (int m = 0; m < NUM_IMG; m++) begin
            blk_px_t px;
            for (int k = 0; k < 256; k++) px[k] = pix(m, 4 * ix + k / 16, 4 * iy + k % 16);
            if (m == 0) begin
              flat = 1'b1;
              for (int k = 1; k < 256; k++) if (px[k] != px[0]) flat = 1'b0;
            end
            checks += 3;
            failures += stats_errors(wr_data[m], ref_stats(px),
                                     $sformatf("block (%0d,%0d) img %0d", ix, iy, m));
          end
          if (flat) n_flat++;
        end else begin
          n_out++;
          checks++;
          if (wr_data != '0) begin
            failures++;
            $display("block (%0d,%0d): out-of-range result not zero", ix, iy);
          end
        end
      end
      n_wr++;
    end
  end

  task automatic check_count(input string what, input int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  task automatic one_run(input bit stalls, output int cycles);
    int t0;
    stall_mode = stalls;
    foreach (written[k]) written[k] = 0;
    n_wr = 0; n_done = 0;
    @(negedge clk);
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (n_done == 0) @(negedge clk);
    cycles = cycle - t0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (n_wr != P * P) begin failures++; $display("%0d writes, expected %0d", n_wr, P * P); end
    if (n_done != 1) begin failures++; $display("%0d done pulses", n_done); end
    if (busy) begin failures++; $display("still busy after done"); end
  endtask

  initial begin
    int cyc, n_in_run, n_out_run, limit;
    start = 1'b0; cfg_p = IDX_W'(P); rsp_valid = 1'b0; rsp_data = '0;
    rd_ready = 1'b1; wr_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // run 1: random stalls everywhere
    one_run(1'b1, cyc);
    $display("run 1 (stalls): %0d cycles for %0d blocks; mechanisms:", cyc, P * P);
    check_count("in-range blocks", n_in);
    check_count("out-of-range blocks", n_out);
    check_count("zero-variance blocks", n_flat);
    check_count("memory read stall cycles", n_rd_stall);
    check_count("cycles waiting for data-channel credit", n_credit);
    check_count("cycles with descriptor channel full", n_hdr_full);
    check_count("rows loaded while the other bank is held", n_both_banks);
    check_count("refused result writes", n_wr_stall);
    check_count("result channel back-pressure cycles", n_res_bp);
    // run 2: nothing stalls; one in-range block per 17 cycles
    n_in_run = n_in; n_out_run = n_out;
    one_run(1'b0, cyc);
    n_in_run = n_in - n_in_run; n_out_run = n_out - n_out_run;
    limit = 17 * n_in_run + 5 * n_out_run + 60;
    $display("run 2 (no stalls): %0d cycles for %0d in-range and %0d out-of-range blocks (limit %0d)",
             cyc, n_in_run, n_out_run, limit);
    checks++;
    if (cyc > limit) begin failures++; $display("run 2 too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
