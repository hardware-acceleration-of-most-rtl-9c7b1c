// isqrt_iter: iterative integer square root, used by the statistics finaliser.
//
// It computes root = floor(sqrt(x)) for a W-bit unsigned x (W even) by the
// digit-by-digit method: each step brings down the next two bits of x and
// decides one root bit, most significant first, STEPS root bits per clock.
//
// Interface and timing: a start pulse loads x; done is high for one cycle
// ceil(W/2/STEPS) clocks later, with root valid from then until the next
// start. A start while busy restarts it.
module isqrt_iter #(
  parameter int unsigned W     = 32,
  parameter int unsigned STEPS = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   x,
  output logic           done,
  output logic [W/2-1:0] root
);
  localparam int unsigned RW = W / 2;
  localparam int unsigned KW = $clog2(RW + 1);

  logic [W-1:0]    xs, xs_n;      // bits of x not yet brought down, MSB first
  logic [RW+1:0]   rem, rem_n;
  logic [RW-1:0]   root_n;
  logic [KW-1:0]   k, k_n;
  logic            busy;

  always_comb begin
    logic [RW+1:0] trial;
    trial  = '0;
    xs_n   = xs;
    rem_n  = rem;
    root_n = root;
    k_n    = k;
    for (int s = 0; s < STEPS; s++) begin
      if (k_n != '0) begin
        k_n   = k_n - 1'b1;
        rem_n = {rem_n[RW-1:0], xs_n[W-1:W-2]};
        xs_n  = xs_n << 2;
        trial = {root_n, 2'b01};
        if (rem_n >= trial) begin
          rem_n  = rem_n - trial;
          root_n = {root_n[RW-2:0], 1'b1};
        end else begin
          root_n = {root_n[RW-2:0], 1'b0};
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs   <= '0;
      rem  <= '0;
      root <= '0;
      k    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xs   <= x;
        rem  <= '0;
        root <= '0;
        k    <= KW'(RW);
        busy <= 1'b1;
      end else if (busy) begin
        xs   <= xs_n;
        rem  <= rem_n;
        root <= root_n;
        k    <= k_n;
        if (k_n == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
