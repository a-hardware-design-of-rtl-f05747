// toadder -- coefficient summation stage of the multi-mode transform.
//
// Holds 32 adder units, one per output lane (16 even, 16 odd). In mode m the
// adder of even lane j, which belongs to row r = j / (N/2), forms coefficient
// 2*(j mod N/2) of that row as the sum over the row's even inputs of
// +/- (input * |c|), taking each product from the shifter stage; odd lanes do
// the same on the odd inputs for coefficients 2*(j mod N/2) + 1. Which product
// and which sign each adder takes is fixed at elaboration from the HEVC matrix
// (lane_coef); the TU mode picks one of four such sums, as the mode selector
// in the design's adder figure does.
//
// Timing: one register stage; out_valid and mode_out follow in_valid and mode
// by one clock. reset is synchronous and active high. The sum width ACC_W is
// wide enough for 16 full-scale products, so nothing overflows here.
module toadder
  import hevc_mt_pkg::*;
#(
  parameter int PROD_W = 16,
  parameter int ACC_W  = 20
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     in_valid,
  input  tu_mode_e                 mode,
  input  logic signed [PROD_W-1:0] sftout_e [NLANE][NMAG],
  input  logic signed [PROD_W-1:0] sftout_o [NLANE][NMAG],
  output logic                     out_valid,
  output tu_mode_e                 mode_out,
  output logic signed [ACC_W-1:0]  adderout_e [NLANE],
  output logic signed [ACC_W-1:0]  adderout_o [NLANE]
);

  // sum[b][j][m]: output lane j of bank b (0 even, 1 odd) in mode m
  logic signed [ACC_W-1:0] sum [2][NLANE][4];
  logic signed [ACC_W-1:0] sel [2][NLANE];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar j = 0; j < NLANE; j++) begin : g_adder
      for (genvar m = 0; m < 4; m++) begin : g_mode
        logic signed [ACC_W-1:0] term [NLANE];
        for (genvar i = 0; i < NLANE; i++) begin : g_term
          localparam int C  = lane_coef(m, b, j, i);
          localparam int MI = (C == 0) ? 0 : mag_index((C < 0) ? -C : C);
          if (C == 0) begin : g_zero
            assign term[i] = '0;
          end else begin : g_nz
            logic signed [PROD_W-1:0] p;
            assign p = (b == 0) ? sftout_e[i][MI] : sftout_o[i][MI];
            assign term[i] = (C > 0) ? ACC_W'(p) : -ACC_W'(p);
          end
        end
        always_comb begin
          sum[b][j][m] = '0;
          for (int i = 0; i < NLANE; i++)
            sum[b][j][m] = sum[b][j][m] + term[i];
        end
      end
      assign sel[b][j] = sum[b][j][mode];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      mode_out  <= TU4;
      for (int j = 0; j < NLANE; j++) begin
        adderout_e[j] <= '0;
        adderout_o[j] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      mode_out  <= mode;
      for (int j = 0; j < NLANE; j++) begin
        adderout_e[j] <= sel[0][j];
        adderout_o[j] <= sel[1][j];
      end
    end
  end

endmodule
