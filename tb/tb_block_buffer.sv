// tb_block_buffer: fills both banks of the local block memory with random rows
// while reading, and checks that every read returns, one clock after its
// address, the last row written to that bank and row; also reads one bank in
// the same cycles as the other is written.
module tb_block_buffer;
  import mad_pkg::*;

  localparam int NUM_IMG = 2;
  typedef logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] beat_t;

  logic clk = 1'b0;
  logic we, wbank, rbank;
  logic [3:0] wrow, rrow;
  beat_t wdata, rdata;
  beat_t model [2][BLK];
  bit    known [2][BLK];
  int checks = 0, failures = 0;

  block_buffer #(.NUM_IMG(NUM_IMG)) dut (.*);

  always #5 clk = !clk;

  function automatic beat_t rnd_beat();
    beat_t b;
    for (int m = 0; m < NUM_IMG; m++)
      for (int k = 0; k < BLK; k++) b[m][k] = PIX_W'($urandom);
    return b;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    beat_t exp_r;
    bit    exp_known;
    we = 1'b0; wbank = 1'b0; wrow = '0; wdata = '0; rbank = 1'b0; rrow = '0;
    foreach (known[b, r]) known[b][r] = 1'b0;
    exp_known = 1'b0;
    exp_r = '0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (exp_known) begin
        checks++;
        if (rdata != exp_r) begin
          failures++;
          $display("cycle %0d: read mismatch", c);
        end
      end
      we    = (c < 64) ? 1'b1 : ($urandom_range(1, 0) == 1);
      wbank = (c < 64) ? c[4] : 1'($urandom);
      wrow  = (c < 64) ? c[3:0] : 4'($urandom);
      wdata = rnd_beat();
      rbank = (c < 64) ? !c[4] : 1'($urandom);
      rrow  = 4'($urandom);
      // a read sees the contents before this cycle's write
      exp_known = known[rbank][rrow];
      exp_r     = model[rbank][rrow];
      @(posedge clk);
      if (we) begin
        model[wbank][wrow] = wdata;
        known[wbank][wrow] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
