// sft_unit -- multiplierless constant multiplier for one butterfly term.
//
// From the shifted copies v<<6 ... v<<0 of its input it forms the product of
// v with each of the 29 coefficient magnitudes of the HEVC core transform,
// using only adders. Every product is written as the sum of shifted copies
// given by the design's shift-and-add table (for example 89 = <<6 + <<4 + <<3
// + 1); products that extend a shorter one reuse it (88 from 80, 89 and 90
// from 88, 83 from 82, 38 from 36), as the adder tree of the unit's figure
// does. prod[i] is v * mag_value(i).
//
// Purely combinational; the enclosing shifter stage registers the products.
// The output is IN_W + 7 bits wide so that no product overflows.
module sft_unit
  import hevc_mt_pkg::*;
#(
  parameter int IN_W = 9
) (
  input  logic signed [IN_W-1:0]   v,
  output logic signed [IN_W+6:0]   prod [NMAG]
);

  localparam int PW = IN_W + 7;
  typedef logic signed [PW-1:0] p_t;

  p_t s0, s1, s2, s3, s4, s5, s6;
  p_t p64, p80, p88, p89, p90, p87, p85, p82, p83, p78, p75, p73, p70, p67;
  p_t p61, p57, p54, p50, p46, p43, p36, p38, p31, p25, p22, p18, p13, p9, p4;

  always_comb begin
    s0 = PW'(v);
    s1 = s0 <<< 1;
    s2 = s0 <<< 2;
    s3 = s0 <<< 3;
    s4 = s0 <<< 4;
    s5 = s0 <<< 5;
    s6 = s0 <<< 6;

    p64 = s6;
    p80 = s6 + s4;
    p88 = p80 + s3;
    p89 = p88 + s0;
    p90 = p88 + s1;
    p87 = p80 + s2 + s1 + s0;
    p85 = p80 + s2 + s0;
    p82 = p80 + s1;
    p83 = p82 + s0;
    p78 = s6 + s3 + s2 + s1;
    p75 = s6 + s3 + s1 + s0;
    p73 = s6 + s3 + s0;
    p70 = s6 + s2 + s1;
    p67 = s6 + s1 + s0;
    p61 = s5 + s4 + s3 + s2 + s0;
    p57 = s5 + s4 + s3 + s0;
    p54 = s5 + s4 + s2 + s1;
    p50 = s5 + s4 + s1;
    p46 = s5 + s3 + s2 + s1;
    p43 = s5 + s3 + s1 + s0;
    p36 = s5 + s2;
    p38 = p36 + s1;
    p31 = s4 + s3 + s2 + s1 + s0;
    p25 = s4 + s3 + s0;
    p22 = s4 + s2 + s1;
    p18 = s4 + s1;
    p13 = s3 + s2 + s0;
    p9  = s3 + s0;
    p4  = s2;

    prod[0]  = p64; prod[1]  = p80; prod[2]  = p88; prod[3]  = p89;
    prod[4]  = p90; prod[5]  = p87; prod[6]  = p85; prod[7]  = p82;
    prod[8]  = p83; prod[9]  = p78; prod[10] = p75; prod[11] = p73;
    prod[12] = p70; prod[13] = p67; prod[14] = p61; prod[15] = p57;
    prod[16] = p54; prod[17] = p50; prod[18] = p46; prod[19] = p43;
    prod[20] = p36; prod[21] = p38; prod[22] = p31; prod[23] = p25;
    prod[24] = p22; prod[25] = p18; prod[26] = p13; prod[27] = p9;
    prod[28] = p4;
  end

endmodule
