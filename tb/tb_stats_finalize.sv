// tb_stats_finalize: checks the std/skw/krt finaliser against a double-precision
// reference. Each test builds one random block per image (several kinds:
// full-range, narrow, constant, spiky, dipping, two-level), feeds the exact
// moment sums, and compares the three results of each image with the
// reference computed from the pixels. Out-of-range descriptors must give zeros.
// The output is drained with random back-pressure; the cycles from accept to
// result are checked against a 15-cycle budget that lets the finaliser keep
// up with the 17-cycle second pass.
module tb_stats_finalize;
  import mad_pkg::*;
  import tb_ref_pkg::*;

  localparam int NUM_IMG = 2;
  localparam int NTEST   = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid, i_ready, o_valid, o_ready;
  blk_hdr_t i_hdr, o_hdr;
  moments_t [NUM_IMG-1:0] i_mom;
  stats_t   [NUM_IMG-1:0] o_stats;
  int checks = 0, failures = 0;
  int cycle = 0;

  stats_finalize #(.NUM_IMG(NUM_IMG)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_px_t    px [NUM_IMG];
    ref_stats_t r  [NUM_IMG];
    int t0, lat;
    i_valid = 1'b0;
    i_hdr   = '0;
    i_mom   = '0;
    o_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTEST; t++) begin
      bit in_rng;
      in_rng = (t % 10) != 9;
      for (int m = 0; m < NUM_IMG; m++) begin
        px[m] = fill_block((t + m) % 6);
        r[m]  = ref_stats(px[m]);
        exact_moments(px[m], i_mom[m].a2, i_mom[m].a3, i_mom[m].a4);
      end
      i_hdr = '{in_range: in_rng, ix: IDX_W'(t), iy: IDX_W'(t + 1)};
      @(negedge clk);
      i_valid = 1'b1;
      #1;
      while (!i_ready) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      t0 = int'($time / 10);
      @(negedge clk);
      i_valid = 1'b0;
      // random back-pressure on the output for some tests
      o_ready = (t % 3 != 0);
      while (!o_valid) begin
        @(negedge clk);
        if (o_valid) break;
      end
      lat = int'($time / 10) - t0;
      checks++;
      if (in_rng && t % 3 != 0 && lat > 15) begin
        failures++;
        $display("test %0d: latency %0d cycles", t, lat);
      end
      repeat (t % 3 == 0 ? 2 : 0) @(negedge clk);
      checks++;
      if (!o_valid || o_hdr != i_hdr) begin
        failures++;
        $display("test %0d: descriptor mismatch", t);
      end
      for (int m = 0; m < NUM_IMG; m++) begin
        if (in_rng) begin
          checks += 3;
          failures += stats_errors(o_stats[m], r[m], $sformatf("test %0d img %0d kind %0d", t, m, (t + m) % 6));
        end else begin
          checks++;
          if (o_stats[m] != '0) begin
            failures++;
            $display("test %0d: out-of-range block not zero", t);
          end
        end
      end
      o_ready = 1'b1;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
