// tb_shifter -- checks the constant-multiplication stage.
//
// Random butterfly terms (including the extremes) go in every clock; one clock
// later each lane's 29 registered products must equal the term times each
// coefficient magnitude, and valid/mode must follow with the same delay.
module tb_shifter;
  import hevc_mt_pkg::*;
  import tb_ref_pkg::*;

  localparam int PRE_W = 9;
  logic clk = 0, reset = 1, in_valid = 0;
  tu_mode_e mode = TU4;
  logic signed [PRE_W-1:0] pre_e [NLANE];
  logic signed [PRE_W-1:0] pre_o [NLANE];
  logic out_valid;
  tu_mode_e mode_out;
  logic signed [PRE_W+6:0] sftout_e [NLANE][NMAG];
  logic signed [PRE_W+6:0] sftout_o [NLANE][NMAG];
  int checks = 0, failures = 0;
  int ve [16], vo [16];

  shifter #(.PRE_W(PRE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    bit vld;
    foreach (pre_e[i]) begin pre_e[i] = '0; pre_o[i] = '0; end
    repeat (2) @(posedge clk);
    #1 checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL valid not cleared by reset"); end
    reset = 0;
    for (int t = 0; t < 200; t++) begin
      m = $urandom_range(0, 3);
      vld = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 16; i++) begin
        ve[i] = (t == 0) ? -256 : (t == 1) ? 255 : $signed($urandom_range(0, 511)) - 256;
        vo[i] = (t == 0) ? 255 : (t == 1) ? -256 : $signed($urandom_range(0, 511)) - 256;
        pre_e[i] = PRE_W'(ve[i]);
        pre_o[i] = PRE_W'(vo[i]);
      end
      mode = tu_mode_e'(m);
      in_valid = vld;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== vld || mode_out != tu_mode_e'(m)) begin
        failures++;
        $display("FAIL valid/mode");
      end
      for (int i = 0; i < 16; i++)
        for (int k = 0; k < NMAG; k++) begin
          checks++;
          if (int'(sftout_e[i][k]) != ve[i] * MAGS[k] || int'(sftout_o[i][k]) != vo[i] * MAGS[k]) begin
            failures++;
            if (failures < 10) $display("FAIL lane=%0d mag=%0d", i, MAGS[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
