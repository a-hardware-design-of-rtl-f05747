// hevc_mt_pkg -- shared types, sizes and constant functions of the HEVC
// multi-mode forward transform.
//
// The datapath takes 32 samples per clock. In 32x32 mode they are one
// 32-point row; in 16x16, 8x8 and 4x4 mode they are 2, 4 or 8 independent
// rows laid side by side. The butterfly stage turns each N-point row into
// N/2 even (sum) and N/2 odd (difference) terms, so every mode produces 16
// even and 16 odd terms, which are the "e" and "o" lanes of all later stages.
//
// Constant multiplication uses the 29 coefficient magnitudes of the HEVC core
// transform, each formed by shifts and adds (see sft_unit). The functions below
// are evaluated at elaboration time only; they give each adder lane the signed
// coefficient it applies to each input lane in each mode.
//
// The mode encoding (0: 4x4, 1: 8x8, 2: 16x16, 3: 32x32) is the one printed on
// the mode selector of the design's shift-and-add unit. The rounding shift
// (log2(N) - 1 for 8-bit samples) follows the first forward stage of the HEVC
// standard and is a choice of this design.
package hevc_mt_pkg;

  localparam int NSAMP = 32;          // samples per clock
  localparam int NLANE = NSAMP / 2;   // even lanes = odd lanes = 16
  localparam int NMAG  = 29;          // distinct coefficient magnitudes

  typedef enum logic [1:0] {
    TU4  = 2'd0,
    TU8  = 2'd1,
    TU16 = 2'd2,
    TU32 = 2'd3
  } tu_mode_e;

  // Magnitude index -> coefficient value, in the order of the shift-and-add table.
  function automatic int mag_value(input int idx);
    case (idx)
      0:  return 64;  1:  return 80;  2:  return 88;  3:  return 89;
      4:  return 90;  5:  return 87;  6:  return 85;  7:  return 82;
      8:  return 83;  9:  return 78;  10: return 75;  11: return 73;
      12: return 70;  13: return 67;  14: return 61;  15: return 57;
      16: return 54;  17: return 50;  18: return 46;  19: return 43;
      20: return 36;  21: return 38;  22: return 31;  23: return 25;
      24: return 22;  25: return 18;  26: return 13;  27: return 9;
      28: return 4;
      default: return 0;
    endcase
  endfunction

  // Coefficient value -> magnitude index (-1 if the value is not a coefficient).
  function automatic int mag_index(input int val);
    for (int i = 0; i < NMAG; i++)
      if (mag_value(i) == val) return i;
    return -1;
  endfunction

  // HEVC integer approximation of 64*sqrt(2)*cos(i*pi/64), i = 1..31.
  function automatic int cos_mag(input int i);
    case (i)
      1: return 90;  2: return 90;  3: return 90;  4: return 89;
      5: return 88;  6: return 87;  7: return 85;  8: return 83;
      9: return 82;  10: return 80; 11: return 78; 12: return 75;
      13: return 73; 14: return 70; 15: return 67; 16: return 64;
      17: return 61; 18: return 57; 19: return 54; 20: return 50;
      21: return 46; 22: return 43; 23: return 38; 24: return 36;
      25: return 31; 26: return 25; 27: return 22; 28: return 18;
      29: return 13; 30: return 9;  31: return 4;
      default: return 0;
    endcase
  endfunction

  // Entry (k, n) of the 32-point HEVC core transform matrix.
  function automatic int coef32(input int k, input int n);
    int a;
    if (k == 0) return 64;
    a = (k * (2 * n + 1)) % 128;
    if (a > 64) a = 128 - a;               // cos(2pi - t) = cos(t)
    if (a < 32) return cos_mag(a);
    if (a == 32) return 0;
    return -cos_mag(64 - a);               // cos(pi - t) = -cos(t)
  endfunction

  // Points per row in a mode.
  function automatic int mode_points(input int m);
    return 4 << m;
  endfunction

  // Signed coefficient that output lane j of bank b (0 even, 1 odd) applies to
  // input lane i of the same bank in mode m; 0 when lane i belongs to another row.
  function automatic int lane_coef(input int m, input int b, input int j, input int i);
    int npts, half, k, n;
    npts = mode_points(m);
    half = npts / 2;
    if ((j / half) != (i / half)) return 0;
    k = 2 * (j % half) + b;                // coefficient index within the row
    n = i % half;                          // sample index within the half row
    return coef32(k * (32 / npts), n);
  endfunction

  // Right shift applied by the rounding stage in mode m: log2(N) - 1.
  function automatic int round_shift(input int m);
    return m + 1;
  endfunction

endpackage
