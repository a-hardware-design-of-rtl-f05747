// hevc_mt_top -- high-throughput multi-mode 1-D HEVC forward core transform.
//
// A four-stage pipeline that accepts 32 signed samples every clock and
// returns 32 transform coefficients every clock, for any of the four HEVC
// transform-unit sizes:
//
//   mode 3 (32x32): one 32-point row per clock
//   mode 2 (16x16): two 16-point rows per clock   (samples 0-15, 16-31)
//   mode 1 (8x8):   four 8-point rows per clock   (samples 8r .. 8r+7)
//   mode 0 (4x4):   eight 4-point rows per clock  (samples 4r .. 4r+3)
//
// Stages: pre_arith (even/odd butterfly) -> shifter (shift-and-add products
// of every lane with all 29 coefficient magnitudes) -> toadder (mode-selected
// signed sums) -> round_stage (rounding shift by log2(N)-1, limit to OUT_W).
// No multiplier is used.
//
// Output layout: for the row r of an N-point mode, coefficient 2k is on
// transout_e[r*N/2 + k] and coefficient 2k+1 on transout_o[r*N/2 + k]
// (k < N/2). In 32x32 mode that is simply e[k] = Y[2k], o[k] = Y[2k+1].
//
// Timing: the results of an input vector, with transout_valid, are on the
// outputs 4 cycles after the vector was presented (four register stages);
// one vector per clock, no stalls. When the 32 rows of a 32x32 block are fed
// on consecutive clocks, the last coefficients are out 35 cycles after the
// first row was presented (31 + 4). mode may change on any clock; it travels
// with its data. reset is synchronous and active high.
//
// The stage names, the port names transin / transout_e / transout_o, the 8-bit
// input and 14-bit output widths and the 35-cycle figure follow the design's
// block diagram and results. The mode port, the lane layout of the smaller
// TU sizes, the rounding shift and the output limiting are this design's own.
// sat_e / sat_o are extra status outputs that flag limited coefficients.
module hevc_mt_top
  import hevc_mt_pkg::*;
#(
  parameter int IN_W  = 8,
  parameter int OUT_W = 14
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   transin_valid,
  input  tu_mode_e               mode,
  input  logic signed [IN_W-1:0] transin [NSAMP],
  output logic                   transout_valid,
  output tu_mode_e               transout_mode,
  output logic signed [OUT_W-1:0] transout_e [NLANE],
  output logic signed [OUT_W-1:0] transout_o [NLANE],
  output logic [NLANE-1:0]       sat_e,
  output logic [NLANE-1:0]       sat_o
);

  localparam int PRE_W  = IN_W + 1;            // butterfly output
  localparam int PROD_W = PRE_W + 7;           // times a coefficient below 128
  localparam int ACC_W  = PROD_W + 4;          // sum of up to 16 products

  logic                    pre_valid, sft_valid, add_valid;
  tu_mode_e                pre_mode, sft_mode, add_mode;
  logic signed [PRE_W-1:0]  pre_e [NLANE];
  logic signed [PRE_W-1:0]  pre_o [NLANE];
  logic signed [PROD_W-1:0] sftout_e [NLANE][NMAG];
  logic signed [PROD_W-1:0] sftout_o [NLANE][NMAG];
  logic signed [ACC_W-1:0]  adderout_e [NLANE];
  logic signed [ACC_W-1:0]  adderout_o [NLANE];

  pre_arith #(.IN_W(IN_W)) u_pre_arith (
    .clk, .reset,
    .transin_valid, .mode, .transin,
    .out_valid(pre_valid), .mode_out(pre_mode), .pre_e, .pre_o
  );

  shifter #(.PRE_W(PRE_W)) u_shifter (
    .clk, .reset,
    .in_valid(pre_valid), .mode(pre_mode), .pre_e, .pre_o,
    .out_valid(sft_valid), .mode_out(sft_mode), .sftout_e, .sftout_o
  );

  toadder #(.PROD_W(PROD_W), .ACC_W(ACC_W)) u_toadder (
    .clk, .reset,
    .in_valid(sft_valid), .mode(sft_mode), .sftout_e, .sftout_o,
    .out_valid(add_valid), .mode_out(add_mode), .adderout_e, .adderout_o
  );

  round_stage #(.ACC_W(ACC_W), .OUT_W(OUT_W)) u_round (
    .clk, .reset,
    .in_valid(add_valid), .mode(add_mode), .adderout_e, .adderout_o,
    .transout_valid, .mode_out(transout_mode), .transout_e, .transout_o,
    .sat_e, .sat_o
  );

endmodule
