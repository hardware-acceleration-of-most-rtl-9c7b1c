// div_iter: iterative unsigned divider with a bounded quotient, used by the
// statistics finaliser.
//
// It computes quo = floor(num / den) when that quotient fits in QW bits, by
// restoring long division from quotient bit QW-1 down to bit 0, STEPS bits per
// clock. When den is zero or the quotient does not fit, quo is all ones and
// ovf is set.
//
// Interface and timing: a start pulse loads num and den; done is high for one
// cycle ceil(QW/STEPS) clocks later (one clock when ovf), with quo and ovf
// valid from then until the next start. A start while busy restarts it.
module div_iter #(
  parameter int unsigned NW    = 64,
  parameter int unsigned DW    = 32,
  parameter int unsigned QW    = 16,
  parameter int unsigned STEPS = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          done,
  output logic [QW-1:0] quo,
  output logic          ovf
);
  localparam int unsigned XW = ((NW > DW + QW) ? NW : DW + QW) + 1;
  localparam int unsigned KW = $clog2(QW + 1);

  logic [XW-1:0] rem, rem_n, dsr;
  logic [QW-1:0] q_n;
  logic [KW-1:0] k, k_n;      // number of quotient bits still to produce
  logic          busy;

  always_comb begin
    rem_n = rem;
    q_n   = quo;
    k_n   = k;
    for (int s = 0; s < STEPS; s++) begin
      if (k_n != '0) begin
        k_n = k_n - 1'b1;
        if (rem_n >= (dsr << k_n)) begin
          rem_n      = rem_n - (dsr << k_n);
          q_n        = q_n | (QW'(1) << k_n);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dsr  <= '0;
      k    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
      ovf  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem <= XW'(num);
        dsr <= XW'(den);
        quo <= '0;
        if (den == '0 || XW'(num) >= (XW'(den) << QW)) begin
          quo  <= '1;
          ovf  <= 1'b1;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          ovf  <= 1'b0;
          k    <= KW'(QW);
          busy <= 1'b1;
        end
      end else if (busy) begin
        rem <= rem_n;
        quo <= q_n;
        k   <= k_n;
        if (k_n == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
