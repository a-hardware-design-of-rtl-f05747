// round_stage -- rounding and output stage of the multi-mode transform.
//
// Holds 32 radd units, one per lane. Each adds the rounding offset
// 2^(s-1) to its sum, shifts right arithmetically by s = log2(N) - 1
// (1, 2, 3, 4 for 4x4, 8x8, 16x16, 32x32) and limits the result to the
// signed OUT_W-bit output range. The shift amount is the first forward stage
// of the HEVC standard for 8-bit samples; the limiting to OUT_W bits (instead
// of dropping high bits) is this design's choice, needed because the 14-bit
// output width of the block diagram cannot hold every full-scale result.
// sat_e / sat_o flag the lanes that were limited.
//
// Timing: one register stage; transout_valid follows in_valid by one clock.
// reset is synchronous and active high.
module round_stage
  import hevc_mt_pkg::*;
#(
  parameter int ACC_W = 20,
  parameter int OUT_W = 14
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in_valid,
  input  tu_mode_e                mode,
  input  logic signed [ACC_W-1:0] adderout_e [NLANE],
  input  logic signed [ACC_W-1:0] adderout_o [NLANE],
  output logic                    transout_valid,
  output tu_mode_e                mode_out,
  output logic signed [OUT_W-1:0] transout_e [NLANE],
  output logic signed [OUT_W-1:0] transout_o [NLANE],
  output logic [NLANE-1:0]        sat_e,
  output logic [NLANE-1:0]        sat_o
);

  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W:0] MINV = -(ACC_W+1)'(1 << (OUT_W - 1));

  logic signed [OUT_W-1:0] r_e [NLANE];
  logic signed [OUT_W-1:0] r_o [NLANE];
  logic [NLANE-1:0]        c_e, c_o;

  // one radd unit: round, shift, limit
  function automatic logic signed [OUT_W:0] radd(input logic signed [ACC_W-1:0] a,
                                                 input tu_mode_e m);
    logic signed [ACC_W:0] t;
    int s;
    s = round_shift(int'(m));
    t = (ACC_W+1)'(a) + ((ACC_W+1)'(1) <<< (s - 1));
    t = t >>> s;
    if (t > MAXV) return {1'b1, OUT_W'(MAXV)};
    if (t < MINV) return {1'b1, OUT_W'(MINV)};
    return {1'b0, OUT_W'(t)};
  endfunction

  always_comb begin
    for (int j = 0; j < NLANE; j++) begin
      {c_e[j], r_e[j]} = radd(adderout_e[j], mode);
      {c_o[j], r_o[j]} = radd(adderout_o[j], mode);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      transout_valid <= 1'b0;
      mode_out       <= TU4;
      sat_e          <= '0;
      sat_o          <= '0;
      for (int j = 0; j < NLANE; j++) begin
        transout_e[j] <= '0;
        transout_o[j] <= '0;
      end
    end else begin
      transout_valid <= in_valid;
      mode_out       <= mode;
      sat_e          <= c_e;
      sat_o          <= c_o;
      transout_e     <= r_e;
      transout_o     <= r_o;
    end
  end

endmodule
