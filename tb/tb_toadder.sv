// tb_toadder -- checks the mode-selected coefficient sums.
//
// For random butterfly terms the testbench forms the 29 products of every
// lane itself and drives them in. One clock later each even lane must hold
// the even coefficient, and each odd lane the odd coefficient, of its row,
// computed as a dot product with the HEVC matrix built by the reference model.
// The even (odd) coefficient 2k (2k+1) of an N-point row equals the dot product
// of matrix row 2k (2k+1) restricted to the first N/2 columns with the row's
// even (odd) butterfly terms.
module tb_toadder;
  import hevc_mt_pkg::*;
  import tb_ref_pkg::*;

  localparam int PROD_W = 16, ACC_W = 20;
  logic clk = 0, reset = 1, in_valid = 0;
  tu_mode_e mode = TU4;
  logic signed [PROD_W-1:0] sftout_e [NLANE][NMAG];
  logic signed [PROD_W-1:0] sftout_o [NLANE][NMAG];
  logic out_valid;
  tu_mode_e mode_out;
  logic signed [ACC_W-1:0] adderout_e [NLANE];
  logic signed [ACC_W-1:0] adderout_o [NLANE];
  int checks = 0, failures = 0;
  int v [2][16];
  int mode_seen [4];

  toadder #(.PROD_W(PROD_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_sum(input int m, input int b, input int j);
    int npts, half, r, k;
    longint s;
    npts = 4 << m;
    half = npts / 2;
    r = j / half;
    k = 2 * (j % half) + b;
    s = 0;
    for (int n = 0; n < half; n++)
      s += longint'(hevc_c(npts, k, n)) * longint'(v[b][r * half + n]);
    return s;
  endfunction

  initial begin
    int m;
    longint e;
    foreach (sftout_e[i, k]) begin sftout_e[i][k] = '0; sftout_o[i][k] = '0; end
    repeat (2) @(posedge clk);
    reset = 0;
    for (int t = 0; t < 200; t++) begin
      m = t % 4;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 16; i++) begin
          // extremes first: all terms at the same sign drive the largest sums
          v[b][i] = (t < 4) ? 255 : (t < 8) ? -256 : $signed($urandom_range(0, 511)) - 256;
          for (int k = 0; k < NMAG; k++)
            if (b == 0) sftout_e[i][k] = PROD_W'(v[b][i] * MAGS[k]);
            else        sftout_o[i][k] = PROD_W'(v[b][i] * MAGS[k]);
        end
      mode = tu_mode_e'(m);
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== 1'b1 || mode_out != tu_mode_e'(m)) begin failures++; $display("FAIL valid/mode"); end
      mode_seen[m]++;
      for (int j = 0; j < 16; j++) begin
        e = expect_sum(m, 0, j);
        checks++;
        if (longint'(adderout_e[j]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d even lane %0d got %0d exp %0d", m, j, adderout_e[j], e);
        end
        e = expect_sum(m, 1, j);
        checks++;
        if (longint'(adderout_o[j]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d odd lane %0d got %0d exp %0d", m, j, adderout_o[j], e);
        end
      end
    end
    in_valid = 1'b0;
    @(posedge clk);
    #1 checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
