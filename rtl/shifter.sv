// shifter -- constant-multiplication stage of the multi-mode transform.
//
// Holds 32 sft units, one per butterfly lane (16 even, 16 odd). Each unit
// multiplies its lane by all 29 HEVC coefficient magnitudes with shifts and
// adds; this stage registers the results, so the adder stage that follows
// only has to pick and sum them. sftout_e[i][m] / sftout_o[i][m] is lane i
// times mag_value(m).
//
// Timing: one register stage; out_valid and mode_out follow in_valid and mode
// by one clock. reset is synchronous and active high.
//
// That the products of every lane are formed once, here, and then shared by
// all coefficients and modes is the design's own reading of the diagram; the
// product width (PRE_W + 7 bits) is chosen so no product overflows.
module shifter
  import hevc_mt_pkg::*;
#(
  parameter int PRE_W = 9
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in_valid,
  input  tu_mode_e                mode,
  input  logic signed [PRE_W-1:0] pre_e [NLANE],
  input  logic signed [PRE_W-1:0] pre_o [NLANE],
  output logic                    out_valid,
  output tu_mode_e                mode_out,
  output logic signed [PRE_W+6:0] sftout_e [NLANE][NMAG],
  output logic signed [PRE_W+6:0] sftout_o [NLANE][NMAG]
);

  logic signed [PRE_W+6:0] prod_e [NLANE][NMAG];
  logic signed [PRE_W+6:0] prod_o [NLANE][NMAG];

  for (genvar i = 0; i < NLANE; i++) begin : g_sft
    sft_unit #(.IN_W(PRE_W)) u_sft_e (.v(pre_e[i]), .prod(prod_e[i]));
    sft_unit #(.IN_W(PRE_W)) u_sft_o (.v(pre_o[i]), .prod(prod_o[i]));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      mode_out  <= TU4;
      for (int i = 0; i < NLANE; i++)
        for (int m = 0; m < NMAG; m++) begin
          sftout_e[i][m] <= '0;
          sftout_o[i][m] <= '0;
        end
    end else begin
      out_valid <= in_valid;
      mode_out  <= mode;
      sftout_e  <= prod_e;
      sftout_o  <= prod_o;
    end
  end

endmodule
