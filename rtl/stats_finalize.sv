// stats_finalize: last step of the computation kernel ("calculate std, skw
// and krt"). From the moment sums of a block it computes, for every image,
//   std = sqrt(M2 / 255)                       (sample standard deviation)
//   skw = (M3 / 256) / s^3,  s = sqrt(M2 / 256)
//   krt = (M4 / 256) / s^4
// where Mk is the sum over the 256 pixels of (x - mean)^k; skw and krt are
// zero when s is zero. These formulas, including the 255 and 256 divisors and
// the zero case, follow the design.
//
// With a2, a3, a4 = 256^2*M2, 256^3*M3, 256^4*M4 (see stats_moments) the
// results reduce to integer operations:
//   std_v = floor(sqrt(floor(a2 / 255)))          = std * 2^8 (exact floor)
//   skw   = (|a3| << 28) / (a2 * r),  r = isqrt(a2 << 16) ~ sqrt(a2) * 2^8,
//           negated when a3 < 0                     = skw * 2^16
//   krt   = (a4 << 24) / a2^2                      = krt * 2^16 (exact floor)
// Only skw is approximate: r is sqrt(a2) to 16 fractional bits of relative
// precision or better. Out-of-range formats and the iterative dividers and
// root units are this design's choices; the algorithm uses float.
//
// Interface: i_valid/i_ready take a descriptor and NUM_IMG moment sets when
// idle; o_valid/o_ready hold the descriptor and NUM_IMG result sets. An
// out-of-range descriptor gives zero results.
//
// Timing: phase 1 runs a2/255, the root of a2<<16 and the kurtosis division
// side by side; phase 2 runs the root for std and the skewness division. With
// STEPS result bits per clock (default 8) a block takes 15 cycles from accept
// to output, which keeps up with the 17-cycle second pass.
module stats_finalize
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG = 2,
  parameter int unsigned STEPS   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   i_valid,
  output logic                   i_ready,
  input  blk_hdr_t               i_hdr,
  input  moments_t [NUM_IMG-1:0] i_mom,
  output logic                   o_valid,
  input  logic                   o_ready,
  output blk_hdr_t               o_hdr,
  output stats_t [NUM_IMG-1:0]   o_stats
);
  localparam int unsigned G_SH   = 8;                       // fraction bits of r
  localparam int unsigned DV_QW  = A2_W - 8;                // a2/255 < 2^48
  localparam int unsigned SG_W   = A2_W + 2 * G_SH;         // 72
  localparam int unsigned SD_W   = DV_QW;                   // 48
  localparam int unsigned KR_NW  = A4_W + 8 + KRT_FRAC;     // 128
  localparam int unsigned KR_DW  = 2 * A2_W;                // 112
  localparam int unsigned KR_QW  = 9 + KRT_FRAC;            // krt < 2^9
  localparam int unsigned SK_SH  = 4 + SKW_FRAC + G_SH;     // 28
  localparam int unsigned SK_NW  = (A3_W - 1) + SK_SH;      // 108
  localparam int unsigned SK_DW  = A2_W + SG_W / 2;         // 92
  localparam int unsigned SK_QW  = 5 + SKW_FRAC;            // |skw| < 2^5

  typedef enum logic [2:0] {S_IDLE, S_P1S, S_P1W, S_P2S, S_P2W, S_OUT} state_e;

  state_e                 state;
  blk_hdr_t               hdr_q;
  moments_t [NUM_IMG-1:0] mom_q;
  logic                   start1, start2;
  logic [NUM_IMG-1:0]     dv_done, sg_done, kr_done, sd_done, sk_done;
  logic [NUM_IMG-1:0]     dv_seen, sg_seen, kr_seen, sd_seen, sk_seen;
  logic [NUM_IMG-1:0]     all1, all2;
  stats_t [NUM_IMG-1:0]   res;

  assign i_ready = (state == S_IDLE);
  assign start1  = (state == S_P1S);
  assign start2  = (state == S_P2S);
  assign all1    = (dv_seen | dv_done) & (sg_seen | sg_done) & (kr_seen | kr_done);
  assign all2    = (sd_seen | sd_done) & (sk_seen | sk_done);

  for (genvar m = 0; m < NUM_IMG; m++) begin : g_img
    logic [DV_QW-1:0]   dv_q;
    logic               dv_ovf, kr_ovf, sk_ovf;
    logic [SG_W/2-1:0]  sg_r;
    logic [KR_QW-1:0]   kr_q;
    logic [SD_W/2-1:0]  sd_r;
    logic [SK_QW-1:0]   sk_q;
    logic               neg, zero;
    logic [A3_W-2:0]    a3_mag;   // |a3| < 2^80

    assign neg    = mom_q[m].a3[A3_W-1];
    assign a3_mag = (A3_W-1)'(neg ? -mom_q[m].a3 : mom_q[m].a3);
    assign zero   = (mom_q[m].a2 == '0);

    div_iter #(.NW(A2_W), .DW(8), .QW(DV_QW), .STEPS(STEPS)) u_dv (
      .clk, .rst_n, .start(start1), .num(mom_q[m].a2), .den(8'd255),
      .done(dv_done[m]), .quo(dv_q), .ovf(dv_ovf));

    isqrt_iter #(.W(SG_W), .STEPS(STEPS)) u_sg (
      .clk, .rst_n, .start(start1), .x({mom_q[m].a2, {(2*G_SH){1'b0}}}),
      .done(sg_done[m]), .root(sg_r));

    div_iter #(.NW(KR_NW), .DW(KR_DW), .QW(KR_QW), .STEPS(STEPS)) u_kr (
      .clk, .rst_n, .start(start1),
      .num({mom_q[m].a4, {(8 + KRT_FRAC){1'b0}}}),
      .den(KR_DW'(mom_q[m].a2) * KR_DW'(mom_q[m].a2)),
      .done(kr_done[m]), .quo(kr_q), .ovf(kr_ovf));

    isqrt_iter #(.W(SD_W), .STEPS(STEPS)) u_sd (
      .clk, .rst_n, .start(start2), .x(dv_q),
      .done(sd_done[m]), .root(sd_r));

    div_iter #(.NW(SK_NW), .DW(SK_DW), .QW(SK_QW), .STEPS(STEPS)) u_sk (
      .clk, .rst_n, .start(start2),
      .num({a3_mag, {SK_SH{1'b0}}}),
      .den(SK_DW'(mom_q[m].a2) * SK_DW'(sg_r)),
      .done(sk_done[m]), .quo(sk_q), .ovf(sk_ovf));

    // A quotient that does not fit saturates to the largest code. For blocks of
    // 256 pixels none can (|skw| < 16, krt < 256), so this only guards the
    // formats.
    always_comb begin
      res[m].std_v = dv_ovf ? '1 : STAT_W'(sd_r);
      res[m].krt   = zero ? '0 : (kr_ovf ? '1 : STAT_W'(kr_q));
      if (zero)
        res[m].skw = '0;
      else if (sk_ovf)
        res[m].skw = neg ? {1'b1, {(STAT_W-1){1'b0}}} : {1'b0, {(STAT_W-1){1'b1}}};
      else
        res[m].skw = neg ? -STAT_W'(sk_q) : STAT_W'(sk_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      hdr_q   <= '0;
      mom_q   <= '0;
      {dv_seen, sg_seen, kr_seen, sd_seen, sk_seen} <= '0;
      o_valid <= 1'b0;
      o_hdr   <= '0;
      o_stats <= '0;
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (i_valid) begin
          hdr_q <= i_hdr;
          mom_q <= i_mom;
          state <= i_hdr.in_range ? S_P1S : S_OUT;
        end
        S_P1S: begin
          {dv_seen, sg_seen, kr_seen} <= '0;
          state <= S_P1W;
        end
        S_P1W: begin
          dv_seen <= dv_seen | dv_done;
          sg_seen <= sg_seen | sg_done;
          kr_seen <= kr_seen | kr_done;
          if (&all1) state <= S_P2S;
        end
        S_P2S: begin
          {sd_seen, sk_seen} <= '0;
          state <= S_P2W;
        end
        S_P2W: begin
          sd_seen <= sd_seen | sd_done;
          sk_seen <= sk_seen | sk_done;
          if (&all2) state <= S_OUT;
        end
        S_OUT: if (!o_valid || o_ready) begin
          o_valid <= 1'b1;
          o_hdr   <= hdr_q;
          o_stats <= hdr_q.in_range ? res : '0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
