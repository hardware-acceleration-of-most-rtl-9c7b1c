// tb_ref_pkg: reference model and stimulus helpers shared by the testbenches.
//
// ref_stats() computes the block statistics in double precision straight from
// the definition (mean, then sums of powers of the deviations, then
// std = sqrt(M2/255), s = sqrt(M2/256), skw = M3/256/s^3, krt = M4/256/s^4,
// skw = krt = 0 when s = 0), independently of the fixed-point hardware.
// exact_moments() computes the scaled integer moment sums the hardware
// carries between its stages. fill_block() makes test blocks of several kinds.
package tb_ref_pkg;

  typedef int unsigned blk_px_t [256];

  typedef struct {
    real std_v;
    real skw;
    real krt;
  } ref_stats_t;

  function automatic ref_stats_t ref_stats(input blk_px_t px);
    ref_stats_t r;
    real mean, t, m2, m3, m4, s;
    mean = 0.0;
    foreach (px[k]) mean += real'(px[k]);
    mean = mean / 256.0;
    m2 = 0.0; m3 = 0.0; m4 = 0.0;
    foreach (px[k]) begin
      t  = real'(px[k]) - mean;
      m2 += t * t;
      m3 += t * t * t;
      m4 += t * t * t * t;
    end
    r.std_v = $sqrt(m2 / 255.0);
    s = $sqrt(m2 / 256.0);
    if (s != 0.0) begin
      r.skw = (m3 / 256.0) / (s * s * s);
      r.krt = (m4 / 256.0) / (s * s * s * s);
    end else begin
      r.skw = 0.0;
      r.krt = 0.0;
    end
    return r;
  endfunction

  // Sums of d^2, d^3, d^4 with d = 256*x - sum(x), in wide integers.
  function automatic void exact_moments(input blk_px_t px,
                                        output logic [55:0] a2,
                                        output logic signed [80:0] a3,
                                        output logic [103:0] a4);
    logic signed [127:0] s, d, acc2, acc3, acc4;
    s = 0;
    foreach (px[k]) s += 128'(px[k]);
    acc2 = 0; acc3 = 0; acc4 = 0;
    foreach (px[k]) begin
      d = 128'(px[k]) * 256 - s;
      acc2 += d * d;
      acc3 += d * d * d;
      acc4 += d * d * d * d;
    end
    a2 = acc2[55:0];
    a3 = acc3[80:0];
    a4 = acc4[103:0];
  endfunction

  // kind 0: full-range random, 1: narrow random around a level, 2: constant,
  // 3: mostly low with a few spikes (large skewness and kurtosis),
  // 4: mostly high with a few dips (negative skewness), 5: two levels.
  function automatic blk_px_t fill_block(input int kind);
    blk_px_t px;
    int unsigned base;
    base = $urandom_range(60000, 0);
    foreach (px[k]) begin
      unique case (kind)
        0: px[k] = $urandom_range(65535, 0);
        1: px[k] = base + $urandom_range(300, 0);
        2: px[k] = base;
        3: px[k] = ($urandom_range(99, 0) < 3) ? 60000 + $urandom_range(5000, 0)
                                                 : $urandom_range(200, 0);
        4: px[k] = ($urandom_range(99, 0) < 5) ? $urandom_range(1000, 0)
                                                 : 65000 + $urandom_range(535, 0);
        default: px[k] = ($urandom_range(1, 0) == 1) ? base : base + 1;
      endcase
    end
    return px;
  endfunction

  function automatic bit near(input real got, input real expv, input real abs_tol,
                              input real rel_tol);
    real diff, lim;
    diff = got - expv;
    if (diff < 0.0) diff = -diff;
    lim = abs_tol + rel_tol * ((expv < 0.0) ? -expv : expv);
    return diff <= lim;
  endfunction

  // Compares one hardware result set with the reference; returns the number
  // of the three values that are off (0..3) and reports them.
  function automatic int stats_errors(input mad_pkg::stats_t g, input ref_stats_t r,
                                      input string tag);
    real g_std, g_skw, g_krt;
    int  n;
    n = 0;
    g_std = real'(g.std_v) / 256.0;
    g_skw = real'(g.skw) / 65536.0;
    g_krt = real'(g.krt) / 65536.0;
    if (!near(g_std, r.std_v, 1.0 / 256.0 + 1e-9, 1e-9)) begin
      n++;
      $display("%s std got %f exp %f", tag, g_std, r.std_v);
    end
    if (!near(g_skw, r.skw, 2.0 / 65536.0, 1e-4)) begin
      n++;
      $display("%s skw got %f exp %f", tag, g_skw, r.skw);
    end
    if (!near(g_krt, r.krt, 1.0 / 65536.0 + 1e-9, 1e-6)) begin
      n++;
      $display("%s krt got %f exp %f", tag, g_krt, r.krt);
    end
    return n;
  endfunction

endpackage
