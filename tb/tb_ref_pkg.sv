// tb_ref_pkg -- reference model shared by the transform testbenches.
//
// Works the HEVC forward core transform out from first principles, without
// the RTL's tables: each matrix entry is 64*sqrt(2)*cos(pi*k*(2n+1)/(2N))
// (64 for k = 0) snapped to the nearest value of the HEVC integer coefficient
// set, and each coefficient is the plain dot product of that matrix row with
// the row of samples. Rounding is (sum + 2^(s-1)) >>> s with s = log2(N) - 1,
// then a limit to the signed output width.
package tb_ref_pkg;

  // Coefficient magnitudes in the order the shift-and-add unit outputs them.
  localparam int MAGS [29] = '{64, 80, 88, 89, 90, 87, 85, 82, 83, 78, 75, 73, 70, 67,
                               61, 57, 54, 50, 46, 43, 36, 38, 31, 25, 22, 18, 13, 9, 4};

  localparam int HSET [30] = '{0, 4, 9, 13, 18, 22, 25, 31, 36, 38, 43, 46, 50, 54, 57,
                               61, 64, 67, 70, 73, 75, 78, 80, 82, 83, 85, 87, 88, 89, 90};

  function automatic int snap(input real v);
    int best;
    real d, bd;
    best = 0;
    bd = 1.0e9;
    for (int i = 0; i < 30; i++) begin
      d = v - real'(HSET[i]);
      if (d < 0.0) d = -d;
      if (d < bd) begin bd = d; best = HSET[i]; end
    end
    return best;
  endfunction

  // Entry (k, n) of the N-point HEVC forward matrix.
  function automatic int hevc_c(input int npts, input int k, input int n);
    real v;
    if (k == 0) return 64;
    v = 64.0 * $sqrt(2.0) * $cos(3.14159265358979 * real'(k * (2 * n + 1)) / real'(2 * npts));
    if (v < 0.0) return -snap(-v);
    return snap(v);
  endfunction

  function automatic int mode_n(input int m);
    return 4 << m;
  endfunction

  // Unrounded coefficient for output lane j of bank b (0 even, 1 odd), mode m,
  // from the 32 input samples x.
  function automatic longint lane_sum(input int m, input int b, input int j, input int x [32]);
    int npts, half, r, k;
    longint s;
    npts = mode_n(m);
    half = npts / 2;
    r = j / half;
    k = 2 * (j % half) + b;
    s = 0;
    for (int n = 0; n < npts; n++)
      s += longint'(hevc_c(npts, k, n)) * longint'(x[r * npts + n]);
    return s;
  endfunction

  // Rounded and limited output; sat tells whether the limit applied.
  function automatic int round_lim(input int m, input longint s, input int out_w, output bit sat);
    int sh;
    longint t, mx, mn;
    sh = m + 1;
    t = (s + (longint'(1) << (sh - 1))) >>> sh;
    mx = (longint'(1) << (out_w - 1)) - 1;
    mn = -(longint'(1) << (out_w - 1));
    sat = 1'b0;
    if (t > mx) begin t = mx; sat = 1'b1; end
    if (t < mn) begin t = mn; sat = 1'b1; end
    return int'(t);
  endfunction

endpackage
