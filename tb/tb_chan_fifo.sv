// tb_chan_fifo: random writes and reads on a 4-deep channel, checked against a
// queue model: every read word must be the oldest written word, in_ready must
// be low exactly when 4 words are held and out_valid low exactly when none is.
// Counts how often the channel was seen full and empty; both must happen.
module tb_chan_fifo;
  localparam int W = 12, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  bit push, pop;

  chan_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    out_ready = 1'b0;
    in_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // hold a refused word, otherwise decide afresh
      if (!(in_valid && !push)) begin
        in_valid = ($urandom_range(99, 0) < ((c / 500) % 2 != 0 ? 80 : 35));
        in_data  = W'($urandom);
      end
      out_ready = ($urandom_range(99, 0) < ((c / 500) % 2 != 0 ? 35 : 80));
      #1;
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      checks += 2;
      if (in_ready != (model.size() < D)) begin
        failures++;
        $display("cycle %0d: in_ready %0b with %0d words", c, in_ready, model.size());
      end
      if (out_valid != (model.size() > 0)) begin
        failures++;
        $display("cycle %0d: out_valid %0b with %0d words", c, out_valid, model.size());
      end
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) begin
          failures++;
          $display("cycle %0d: read %h expected %h", c, out_data, model[0]);
        end
      end
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    checks += 2;
    if (n_full == 0) begin failures++; $display("never full"); end
    if (n_empty == 0) begin failures++; $display("never empty"); end
    $display("full %0d empty %0d cycles", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
