// pre_arith -- input butterfly stage of the multi-mode transform.
//
// Each clock it takes 32 signed samples (transin) and the TU mode, splits them
// into rows of N = 4, 8, 16 or 32 points (8, 4, 2 or 1 rows), and for each
// row forms the even terms e[k] = x[k] + x[N-1-k] and the odd terms
// o[k] = x[k] - x[N-1-k], k < N/2. Row r, term k lands in lane r*N/2 + k of
// pre_e / pre_o, so all modes fill all 16 even and 16 odd lanes. This is the
// even/odd split of the HEVC matrix that lets the later stages work on half-size
// sub-matrices.
//
// Timing: one register stage. Inputs sampled on a rising clk edge appear on
// the outputs after it, together with out_valid and mode_out. reset is
// synchronous and active high; it clears every output register.
//
// The block name, its place in the pipeline and the 8-bit input width follow
// the design's block diagram. The outputs are one bit wider than the inputs
// (a sum of two samples needs it), where the diagram prints the input width.
module pre_arith
  import hevc_mt_pkg::*;
#(
  parameter int IN_W = 8
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  transin_valid,
  input  tu_mode_e              mode,
  input  logic signed [IN_W-1:0] transin [NSAMP],
  output logic                  out_valid,
  output tu_mode_e              mode_out,
  output logic signed [IN_W:0]  pre_e [NLANE],
  output logic signed [IN_W:0]  pre_o [NLANE]
);

  // Butterfly of every mode, with constant indices, then a mode select.
  logic signed [IN_W:0] e_m [4][NLANE];
  logic signed [IN_W:0] o_m [4][NLANE];
  logic signed [IN_W:0] e_d [NLANE];
  logic signed [IN_W:0] o_d [NLANE];

  for (genvar m = 0; m < 4; m++) begin : g_mode
    localparam int NPTS = 4 << m;
    localparam int HALF = NPTS / 2;
    for (genvar q = 0; q < NLANE; q++) begin : g_lane
      localparam int LO = (q / HALF) * NPTS + (q % HALF);   // x[k]
      localparam int HI = (q / HALF) * NPTS + NPTS - 1 - (q % HALF); // x[N-1-k]
      assign e_m[m][q] = (IN_W+1)'(transin[LO]) + (IN_W+1)'(transin[HI]);
      assign o_m[m][q] = (IN_W+1)'(transin[LO]) - (IN_W+1)'(transin[HI]);
    end
  end

  assign e_d = e_m[mode];
  assign o_d = o_m[mode];

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      mode_out  <= TU4;
      for (int q = 0; q < NLANE; q++) begin
        pre_e[q] <= '0;
        pre_o[q] <= '0;
      end
    end else begin
      out_valid <= transin_valid;
      mode_out  <= mode;
      for (int q = 0; q < NLANE; q++) begin
        pre_e[q] <= e_d[q];
        pre_o[q] <= o_d[q];
      end
    end
  end

endmodule
