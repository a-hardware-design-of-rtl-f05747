// tb_sft_unit -- exhaustive check of the shift-and-add constant multiplier.
//
// Drives every 9-bit signed input value and compares each of the 29 outputs
// with the input times the coefficient magnitude of that output.
module tb_sft_unit;
  import hevc_mt_pkg::*;
  import tb_ref_pkg::*;

  localparam int IN_W = 9;
  logic signed [IN_W-1:0] v;
  logic signed [IN_W+6:0] prod [NMAG];
  int checks = 0, failures = 0;

  sft_unit #(.IN_W(IN_W)) dut (.v, .prod);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -(1 << (IN_W - 1)); x < (1 << (IN_W - 1)); x++) begin
      v = IN_W'(x);
      #1;
      for (int i = 0; i < NMAG; i++) begin
        checks++;
        if (int'(prod[i]) != x * MAGS[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL v=%0d mag=%0d got=%0d exp=%0d", x, MAGS[i], prod[i], x * MAGS[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
