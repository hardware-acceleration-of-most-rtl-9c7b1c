// tb_mad_stats_top_sizes: the whole accelerator at its default parameters on
// the larger image pairs of the evaluation: 1024x1024, 2048x2048 and
// 4096x4096 pixels (P = 256, 512 and 1024 block positions per side), one
// complete operation each, back to back on the same instance.
//
// The memory model, the result check and the cycle budget are those of
// tb_mad_stats_top_full: pixels from a fixed formula (with a flat corner and a
// different pattern per image), memory and write port that never stall, every
// result compared with a double-precision reference (zeros past the image
// edge), every output index written once, one done pulse per run, and at most
// 17 cycles per in-range block plus 5 per out-of-range position.
module tb_mad_stats_top_sizes;
  import mad_pkg::*;
  import tb_ref_pkg::*;

  localparam int NUM_IMG = 2;
  int P = 256;
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

  mad_stats_top dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (30000000) @(posedge clk);
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
  int written [];
  int n_wr = 0;
  always @(negedge clk) wr_ready <= stall_mode ? ($urandom_range(99, 0) < 40) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      int ix, iy, id;
      bit inr;
      id = int'(wr_idx);
      ix = id / P;
      iy = id % P;
      checks++;
      if (id >= P * P || written[id] != 0) begin
        failures++;
        $display("bad or repeated output index %0d", wr_idx);
      end else begin
        written[id]++;
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
    written = new[P * P];
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
    int sizes [3] = '{256, 512, 1024};
    start = 1'b0; cfg_p = IDX_W'(P); rsp_valid = 1'b0; rsp_data = '0;
    rd_ready = 1'b1; wr_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    foreach (sizes[n]) begin
      int in0, out0;
      P = sizes[n];
      cfg_p = IDX_W'(P);
      in0 = n_in; out0 = n_out;
      one_run(1'b0, cyc);
      n_in_run = n_in - in0; n_out_run = n_out - out0;
      limit = 17 * n_in_run + 5 * n_out_run + 60;
      $display("%0dx%0d: %0d cycles for %0d in-range and %0d out-of-range blocks (limit %0d)",
               4 * P, 4 * P, cyc, n_in_run, n_out_run, limit);
      checks += 2;
      if (cyc > limit) begin failures++; $display("too slow"); end
      if (n_in_run != (P - 3) * (P - 3)) begin failures++; $display("wrong in-range count"); end
    end
    check_count("zero-variance blocks", n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
