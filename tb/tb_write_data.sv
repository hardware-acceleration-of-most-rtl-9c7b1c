// tb_write_data: feeds the write-back kernel the results of every block
// position of a P = 7 image pair in a shuffled order, with random gaps on its
// input and random stalls on the memory write port. Checks that each result
// is written once, at index ix*P + iy, with its data unchanged, that a stalled
// write holds its word, and that done pulses once, after the last write.
module tb_write_data;
  import mad_pkg::*;

  localparam int NUM_IMG = 2, P = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, done, in_valid, in_ready, wr_valid, wr_ready;
  logic [IDX_W-1:0] cfg_p;
  blk_hdr_t in_hdr;
  stats_t [NUM_IMG-1:0] in_stats, wr_data;
  logic [OIDX_W-1:0] wr_idx;

  int checks = 0, failures = 0, n_done = 0, n_wr = 0, n_stall = 0;
  stats_t [NUM_IMG-1:0] exp_data [P * P];
  int written [P * P];

  write_data #(.NUM_IMG(NUM_IMG)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory write port
  always @(negedge clk) wr_ready <= ($urandom_range(99, 0) < 60);
  always @(posedge clk) begin
    if (rst_n && done) n_done++;
    if (rst_n && wr_valid && !wr_ready) n_stall++;
    if (rst_n && wr_valid && wr_ready) begin
      checks += 2;
      if (wr_idx >= OIDX_W'(P * P) || written[int'(wr_idx)] != 0) begin
        failures++;
        $display("bad or repeated index %0d", wr_idx);
      end else begin
        written[int'(wr_idx)]++;
        if (wr_data != exp_data[int'(wr_idx)]) begin
          failures++;
          $display("index %0d: wrong data", wr_idx);
        end
      end
      n_wr++;
    end
  end

  initial begin
    int order [P * P];
    in_valid = 1'b0; in_hdr = '0; in_stats = '0; start = 1'b0; cfg_p = IDX_W'(P);
    wr_ready = 1'b0;
    foreach (order[k]) begin
      order[k] = k;
      written[k] = 0;
      for (int m = 0; m < NUM_IMG; m++) exp_data[k][m] = {32'($urandom), 32'($urandom), 32'($urandom)};
    end
    order.shuffle();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    foreach (order[k]) begin
      int id;
      id = order[k];
      repeat ($urandom_range(2, 0)) @(negedge clk);
      in_valid = 1'b1;
      in_hdr   = '{in_range: 1'b1, ix: IDX_W'(id / P), iy: IDX_W'(id % P)};
      in_stats = exp_data[id];
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (n_done != 0) begin
        failures++;
        $display("done before the last write");
      end
    end
    repeat (30) @(negedge clk);
    checks += 3;
    if (n_wr != P * P) begin failures++; $display("%0d writes", n_wr); end
    if (n_done != 1) begin failures++; $display("%0d done pulses", n_done); end
    if (n_stall == 0) begin failures++; $display("write port never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
