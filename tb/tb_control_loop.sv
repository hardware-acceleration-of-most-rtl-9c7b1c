// tb_control_loop: runs the control kernel over a 6x6-position (24x24-pixel)
// image pair twice, first with a memory and a reader that never stall, then
// with random memory stalls, random read latency and a slow reader.
// Checks: descriptors in row-major order with the right in-range flag (the
// 4*i < 4P-15 limit), 16 read requests per in-range block at the right pixel
// addresses, the returned rows passed on in order, the data channel never
// holding more than DATA_DEPTH rows, one done pulse at the end, and, in the
// stall-free run, 17 cycles between the descriptors of consecutive blocks that
// follow an in-range block (one descriptor cycle plus one row per cycle).
module tb_control_loop;
  import mad_pkg::*;

  localparam int NUM_IMG = 2, DEPTH = 8, P = 6;
  typedef logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] beat_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [IDX_W-1:0] cfg_p;
  logic hdr_valid, hdr_ready, rd_valid, rd_ready, rsp_valid, dat_valid, dat_ready, data_pop;
  blk_hdr_t hdr;
  logic [ADDR_W-1:0] rd_addr;
  beat_t rsp_data, dat_data;

  int checks = 0, failures = 0;
  int cycle = 0;
  bit stall_mode;

  control_loop #(.NUM_IMG(NUM_IMG), .DATA_DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  function automatic beat_t row_at(input int unsigned addr);
    beat_t b;
    for (int m = 0; m < NUM_IMG; m++)
      for (int k = 0; k < BLK; k++)
        b[m][k] = PIX_W'((addr + k) * 7 + m * 13 + 5);
    return b;
  endfunction

  // memory: in-order responses after a latency; random stalls in stall mode
  int unsigned req_q [$];
  int          due_q [$];
  always @(negedge clk) begin
    rd_ready <= stall_mode ? ($urandom_range(99, 0) < 60) : 1'b1;
  end
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (rst_n && rd_valid && rd_ready) begin
      req_q.push_back(rd_addr);
      due_q.push_back(cycle + (stall_mode ? $urandom_range(8, 1) : 2));
    end
    if (due_q.size() > 0 && due_q[0] <= cycle) begin
      rsp_valid <= 1'b1;
      rsp_data  <= row_at(req_q.pop_front());
      void'(due_q.pop_front());
    end
  end

  // data channel model and reader
  beat_t chan [$];
  always @(negedge clk) begin
    data_pop <= (chan.size() > 0) && (stall_mode ? ($urandom_range(99, 0) < 30) : 1'b1);
  end
  always @(posedge clk) begin
    if (data_pop) void'(chan.pop_front());
    if (dat_valid) chan.push_back(dat_data);
    if (chan.size() > DEPTH) begin
      failures++;
      $display("data channel overflow: %0d rows", chan.size());
    end
  end
  assign dat_ready = 1'b1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected rows, in order
  beat_t exp_rows [$];
  always @(posedge clk) begin
    if (dat_valid) begin
      checks++;
      if (exp_rows.size() == 0 || dat_data != exp_rows[0]) begin
        failures++;
        $display("cycle %0d: unexpected row", cycle);
      end
      if (exp_rows.size() > 0) void'(exp_rows.pop_front());
    end
  end

  initial begin
    int n_done, last_hdr, prev_in;
    start = 1'b0;
    cfg_p = IDX_W'(P);
    hdr_ready = 1'b1;
    stall_mode = 1'b0;
    rd_ready = 1'b1;
    rsp_valid = 1'b0;
    data_pop = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      stall_mode = (run == 1);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n_done = 0;
      last_hdr = -1;
      prev_in = 0;
      for (int ix = 0; ix < P; ix++) begin
        for (int iy = 0; iy < P; iy++) begin
          bit exp_in;
          exp_in = (4 * ix < 4 * P - 15) && (4 * iy < 4 * P - 15);
          // wait for the descriptor
          hdr_ready = stall_mode ? ($urandom_range(1, 0) == 1) : 1'b1;
          #1;
          while (!(hdr_valid && hdr_ready)) begin
            @(negedge clk);
            if (done) n_done++;
            hdr_ready = stall_mode ? ($urandom_range(1, 0) == 1) : 1'b1;
            #1;
          end
          checks += 3;
          if (hdr.ix != IDX_W'(ix) || hdr.iy != IDX_W'(iy)) begin
            failures++;
            $display("descriptor (%0d,%0d) expected (%0d,%0d)", hdr.ix, hdr.iy, ix, iy);
          end
          if (hdr.in_range != exp_in) begin
            failures++;
            $display("descriptor (%0d,%0d) in_range %0b", ix, iy, hdr.in_range);
          end
          if (!stall_mode && prev_in != 0 && last_hdr >= 0 && cycle - last_hdr != 17) begin
            failures++;
            $display("block (%0d,%0d) issued %0d cycles after the previous one", ix, iy,
                     cycle - last_hdr);
          end
          last_hdr = cycle;
          prev_in = exp_in;
          if (exp_in)
            for (int r = 0; r < BLK; r++)
              exp_rows.push_back(row_at((4 * ix + r) * 4 * P + 4 * iy));
          // check the 16 request addresses of an in-range block
          if (exp_in) begin
            for (int r = 0; r < BLK; r++) begin
              @(negedge clk);
              if (done) n_done++;
              #1;
              while (!(rd_valid && rd_ready)) begin
                @(negedge clk);
                if (done) n_done++;
                #1;
              end
              checks++;
              if (rd_addr != ADDR_W'((4 * ix + r) * 4 * P + 4 * iy)) begin
                failures++;
                $display("block (%0d,%0d) row %0d address %0d", ix, iy, r, rd_addr);
              end
            end
          end
          @(negedge clk);
          if (done) n_done++;
        end
      end
      repeat (40) begin
        @(negedge clk);
        if (done) n_done++;
      end
      checks += 2;
      if (n_done != 1) begin
        failures++;
        $display("run %0d: %0d done pulses", run, n_done);
      end
      if (exp_rows.size() != 0) begin
        failures++;
        $display("run %0d: %0d rows never arrived", run, exp_rows.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
