// amo_ref_pkg: reference models and table generation for the testbenches.
//
// It holds, in floating point, the ideal functions the PWL units approximate,
// the per-interval least-squares fit that turns each function into {b, k, s}
// table entries, a bit-exact integer model of the PWL datapath, and a list of
// bus writes that loads a complete working configuration (PWL tables,
// thresholds, c1/c2 constants, compensator LUT and filter coefficients).
//
// Fit of one interval i (N2 = 2^(IN_W-7) points x2 = 0..N2-1):
//   1. least squares line y ~ kr*x2 + br over the exact function values
//   2. b  = floor(br + 1/2)        (the datapath floors the low term)
//   3. s  = (b - br - 1/2) * 16 * 2^KF / k   (offset recovering the lost fraction)
//   4. k  = round(kr * 2^KF)
// If k is 0 or s would not fit 16 bits, b is rounded and s is 0.
package amo_ref_pkg;
  import amo_pkg::*;

  localparam real PI = 3.14159265358979323846;

  typedef enum int { FN_RECIP, FN_ATAN, FN_SQRT, FN_RSQRT, FN_ACOS, FN_FTAN } fn_e;

  // supply levels V1..V4 (normalised to full-scale I/Q = 1)
  function automatic real vlev(input int n);
    case (n)
      0: return 0.12;
      1: return 0.22;
      2: return 0.32;
      default: return 0.42;
    endcase
  endfunction

  function automatic int fn_in_w(input fn_e f);
    case (f)
      FN_RECIP: return RECIP_IN_W;
      FN_ATAN:  return ATAN_IN_W;
      FN_SQRT:  return SQRT_IN_W;
      FN_RSQRT: return RSQ_IN_W;
      FN_ACOS:  return ACOS_IN_W;
      default:  return FTAN_IN_W;
    endcase
  endfunction
  function automatic int fn_out_w(input fn_e f);
    case (f)
      FN_RECIP: return RECIP_OUT_W;
      FN_ATAN:  return ATAN_OUT_W;
      FN_SQRT:  return SQRT_OUT_W;
      FN_RSQRT: return RSQ_OUT_W;
      FN_ACOS:  return ACOS_OUT_W;
      default:  return FTAN_OUT_W;
    endcase
  endfunction
  function automatic int fn_kf(input fn_e f);
    case (f)
      FN_RECIP: return RECIP_KF;
      FN_ATAN:  return ATAN_KF;
      FN_SQRT:  return SQRT_KF;
      FN_RSQRT: return RSQ_KF;
      FN_ACOS:  return ACOS_KF;
      default:  return FTAN_KF;
    endcase
  endfunction

  // Exact function value, in output LSBs, for input code c.
  function automatic real fn_val(input fn_e f, input int c);
    real x, y;
    case (f)
      FN_RECIP: begin x = (2048.0 + c) / 2048.0; y = 32768.0 / x; end
      FN_ATAN:  begin x = c / 32768.0; y = $atan(x) * 32768.0 / (2.0 * PI); end
      FN_SQRT:  begin x = c / 65536.0; y = $sqrt(x) * 65536.0; end
      FN_RSQRT: begin x = (c < 1 ? 0.5 : c) / 65536.0; y = 16384.0 / $sqrt(x); end
      FN_ACOS:  begin x = c / 4096.0; y = $acos(x) * 32768.0 / (2.0 * PI); end
      default:  begin x = c * 2.0 * PI / 32768.0; y = 1024.0 / (1.0 + $tan(x)); end
    endcase
    if (y > 2.0 ** fn_out_w(f) - 1.0) y = 2.0 ** fn_out_w(f) - 1.0;
    return y;
  endfunction

  function automatic pwl_entry_t fit_entry(input fn_e f, input int i);
    int n2, kf;
    real sx, sy, sxx, sxy, xm, ym, kr, br, bt, sr;
    longint b, k, s, bmax;
    pwl_entry_t e;
    n2 = 1 << (fn_in_w(f) - PWL_ADDR_W);
    kf = fn_kf(f);
    bmax = (longint'(1) << fn_out_w(f)) - 1;
    sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int j = 0; j < n2; j++) begin
      real yv;
      yv = fn_val(f, i * n2 + j);
      sx += j; sy += yv; sxx += real'(j) * j; sxy += real'(j) * yv;
    end
    xm = sx / n2; ym = sy / n2;
    kr = (sxy - n2 * xm * ym) / (sxx - n2 * xm * xm);
    br = ym - kr * xm;
    k = longint'($floor(kr * (2.0 ** kf) + 0.5));
    if (k > 32767) k = 32767;
    if (k < -32767) k = -32767;
    bt = br + 0.5;
    b = longint'($floor(bt));
    s = 0;
    if (k != 0) begin
      sr = (real'(b) - bt) * 16.0 * (2.0 ** kf) / real'(k);
      if (sr > 32767.0 || sr < -32767.0) b = longint'($floor(bt + 0.5));
      else s = longint'($floor(sr + 0.5));
    end else b = longint'($floor(bt + 0.5));
    if (b < 0) b = 0;
    if (b > bmax) b = bmax;
    e.b = 16'(b);
    e.k = 16'(k);
    e.s = 16'(s);
    return e;
  endfunction

  // Bit-exact model of the PWL datapath.
  function automatic longint pwl_model(input fn_e f, input pwl_entry_t e, input int c);
    int x2w;
    longint x2, d, p, low, sum, bmax;
    x2w  = fn_in_w(f) - PWL_ADDR_W;
    x2   = c % (1 << x2w);
    d    = x2 * 16 - longint'(e.s);
    p    = longint'(e.k) * d;
    low  = p >>> (fn_kf(f) + PWL_S_FRAC);
    sum  = longint'(e.b) + low;
    bmax = (longint'(1) << fn_out_w(f)) - 1;
    if (sum < 0) sum = 0;
    if (sum > bmax) sum = bmax;
    return sum;
  endfunction

  // ---- c1 / c2 constants and thresholds ------------------------------------
  function automatic int c1_code(input int ai);
    return int'($floor(1024.0 / (2.0 * vlev(ai)) + 0.5));
  endfunction
  function automatic int c2_code(input int ai, input int aj);
    return int'($floor(2048.0 * (vlev(ai) ** 2 - vlev(aj) ** 2) / (2.0 * vlev(ai)) + 0.5));
  endfunction
  // thresholds of eq. (8) in A^2 code units (2^-18), saturated to 19 bits
  function automatic int th_code(input int n);
    real t;
    t = (vlev(n / 2) + vlev((n + 1) / 2)) ** 2 * 262144.0;
    if (t > 524287.0) t = 524287.0;
    return int'($floor(t));
  endfunction

  // ---- compensator LUT contents -------------------------------------------
  // address {sym_i, sym_q, prev_i[2:1], prev_q[2:1]}; levels (2s-7)*224 plus
  // a small correction from the previous symbol.
  function automatic int comp_level(input int s, input int pm);
    return (2 * s - 7) * 224 - (2 * pm - 3) * 8;
  endfunction
  function automatic logic [23:0] comp_word(input int a);
    int si, sq, pi_, pq;
    si = (a >> 7) & 7; sq = (a >> 4) & 7; pi_ = (a >> 2) & 3; pq = a & 3;
    return {12'(comp_level(si, pi_)), 12'(comp_level(sq, pq))};
  endfunction

  // ---- shaping filter coefficients (raised cosine, beta = 0.5) ---------------
  // ntap symbol spans, osr phases; coefficient n of 4*ntap
  function automatic int coef_code(input int n, input int osr, input int ntap);
    real t, h, den;
    if (n >= osr * ntap) return 0;
    t = (real'(n) - real'(osr * ntap / 2)) / osr;
    if (t == 0.0) h = 1.0;
    else h = $sin(PI * t) / (PI * t);
    den = 1.0 - (2.0 * 0.5 * t) ** 2;
    if (den < 1e-9 && den > -1e-9) h = h * PI / 4.0;
    else h = h * $cos(PI * 0.5 * t) / den;
    return int'($floor(h * 0.55 * 1024.0 + 0.5));
  endfunction

  // ---- full configuration as a list of bus writes ------------------------
  localparam int N_PWL_WR  = 6 * (1 << PWL_ADDR_W);
  localparam int N_TH_WR   = 7;
  localparam int N_C_WR    = 4 * N_PAIRS;
  localparam int N_COMP_WR = 1024;
  localparam int N_COEF_WR = 32;
  localparam int N_CFG_WR  = N_PWL_WR + N_TH_WR + N_C_WR + N_COMP_WR + N_COEF_WR;

  function automatic fn_e tgt_fn(input cfg_tgt_e t);
    case (t)
      TGT_RECIP: return FN_RECIP;
      TGT_ATAN:  return FN_ATAN;
      TGT_SQRT:  return FN_SQRT;
      TGT_RSQRT: return FN_RSQRT;
      TGT_ACOS:  return FN_ACOS;
      default:   return FN_FTAN;
    endcase
  endfunction

  // n-th write of the full configuration; osr selects the filter coefficient set
  function automatic cfg_wr_t cfg_word(input int n, input int osr);
    cfg_wr_t w;
    int m, p, c, ai, aj;
    w = '0;
    w.we = 1'b1;
    if (n < N_PWL_WR) begin
      w.tgt  = cfg_tgt_e'(n >> PWL_ADDR_W);
      w.idx  = CFG_IDX_W'(n % (1 << PWL_ADDR_W));
      w.data = fit_entry(tgt_fn(w.tgt), n % (1 << PWL_ADDR_W));
      return w;
    end
    m = n - N_PWL_WR;
    if (m < N_TH_WR) begin
      w.tgt = TGT_THRESH; w.idx = CFG_IDX_W'(m); w.data = 48'(th_code(m));
      return w;
    end
    m -= N_TH_WR;
    if (m < N_C_WR) begin
      p = m / 4; c = m % 4;
      ai = int'(pair_a1(p)); aj = int'(pair_a2(p));
      w.tgt = TGT_CONST; w.idx = CFG_IDX_W'(m);
      case (c)
        0: w.data = 48'(c1_code(ai));
        1: w.data = 48'(c2_code(ai, aj));
        2: w.data = 48'(c1_code(aj));
        default: w.data = 48'(c2_code(aj, ai));
      endcase
      w.data[47:13] = '0;
      return w;
    end
    m -= N_C_WR;
    if (m < N_COMP_WR) begin
      w.tgt = TGT_COMP; w.idx = CFG_IDX_W'(m); w.data = 48'(comp_word(m));
      return w;
    end
    m -= N_COMP_WR;
    w.tgt = TGT_COEF; w.idx = CFG_IDX_W'(m); w.data = 48'(12'(coef_code(m, osr, 8)));
    return w;
  endfunction

  // ---- ideal SCS reference ----------------------------------------------------
  function automatic int pair_of(input real a2);
    int p;
    p = 0;
    for (int n = 0; n < 6; n++) if (a2 > th_code(n) / 262144.0) p = n + 1;
    return p;
  endfunction

  // wrap an angle difference in units of 2^15 per turn into [-2^14, 2^14)
  function automatic real wrap(input real d);
    while (d >= 16384.0) d -= 32768.0;
    while (d < -16384.0) d += 32768.0;
    return d;
  endfunction

  // angle (2^15 per turn) carried by a quadrant code and an f(phi) code
  function automatic real phi_of(input int quad, input int fcode);
    real f;
    f = (fcode + 0.5) / 1024.0;
    if (f > 1.0) f = 1.0;
    return quad * 8192.0 + $atan((1.0 - f) / f) * 32768.0 / (2.0 * PI);
  endfunction

  // Check one separator output against floating-point math for input (ii, qq).
  // Returns 0 if it matches, 1 for a wrong supply pair, 2 for a phase off by
  // more than tol (LSB of 2*pi/2^15). region and err report what was seen;
  // err is -1 where the phase is not checked (|arccos argument| >= 0.95).
  function automatic int scs_check(input int ii, input int qq, input int a1, input int a2,
                                   input int quad1, input int f1, input int quad2, input int f2,
                                   input real tol, output int region, output real err);
    int ai_, aq_, mag, p, ai, aj;
    real amp, th, arg1, arg2, ph1, ph2, d1, d2;
    ai_ = ii < 0 ? -ii : ii; if (ai_ > 4095) ai_ = 4095;
    aq_ = qq < 0 ? -qq : qq; if (aq_ > 4095) aq_ = 4095;
    mag = (ai_ * ai_ + aq_ * aq_) >> 6;
    p = 0;
    for (int t = 0; t < 6; t++) if (mag > th_code(t)) p = t + 1;
    region = p;
    err = -1.0;
    ai = p / 2; aj = (p + 1) / 2;
    if (a1 != ai || a2 != aj) return 1;
    amp = $sqrt(real'(ii) ** 2 + real'(qq) ** 2) / 4096.0;
    if (amp <= 0.01) return 0;
    th = $atan2(real'(qq), real'(ii));
    arg1 = (vlev(ai) ** 2 + amp ** 2 - vlev(aj) ** 2) / (2.0 * amp * vlev(ai));
    arg2 = (vlev(aj) ** 2 + amp ** 2 - vlev(ai) ** 2) / (2.0 * amp * vlev(aj));
    if (!(arg1 > -0.95 && arg1 < 0.95 && arg2 > -0.95 && arg2 < 0.95)) return 0;
    ph1 = (th - $acos(arg1)) * 32768.0 / (2.0 * PI);
    ph2 = (th + $acos(arg2)) * 32768.0 / (2.0 * PI);
    d1 = wrap(phi_of(quad1, f1) - ph1);
    d2 = wrap(phi_of(quad2, f2) - ph2);
    if (d1 < 0) d1 = -d1;
    if (d2 < 0) d2 = -d2;
    err = d1 > d2 ? d1 : d2;
    return (err > tol) ? 2 : 0;
  endfunction

endpackage
