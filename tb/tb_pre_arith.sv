// tb_pre_arith -- checks the butterfly stage in all four modes.
//
// Random samples and modes are applied every clock (with idle clocks in
// between); one clock later the even and odd lanes must hold the sum and
// difference of the mirrored samples of each row, and valid and mode must
// have moved along with them.
module tb_pre_arith;
  import hevc_mt_pkg::*;

  localparam int IN_W = 8;
  logic clk = 0, reset = 1, transin_valid = 0;
  tu_mode_e mode = TU4;
  logic signed [IN_W-1:0] transin [NSAMP];
  logic out_valid;
  tu_mode_e mode_out;
  logic signed [IN_W:0] pre_e [NLANE];
  logic signed [IN_W:0] pre_o [NLANE];
  int checks = 0, failures = 0;
  int x [32];

  pre_arith #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input bit vld);
    int npts, lane;
    npts = 4 << m;
    checks++;
    if (out_valid !== vld || (vld && mode_out != tu_mode_e'(m))) begin
      failures++;
      $display("FAIL valid/mode: valid=%0d mode=%0d exp %0d/%0d", out_valid, mode_out, vld, m);
    end
    if (!vld) return;
    for (int r = 0; r < 32 / npts; r++)
      for (int k = 0; k < npts / 2; k++) begin
        lane = r * (npts / 2) + k;
        checks++;
        if (int'(pre_e[lane]) != x[r*npts+k] + x[r*npts+npts-1-k] ||
            int'(pre_o[lane]) != x[r*npts+k] - x[r*npts+npts-1-k]) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode=%0d row=%0d k=%0d e=%0d o=%0d", m, r, k, pre_e[lane], pre_o[lane]);
        end
      end
  endtask

  initial begin
    int m;
    bit vld;
    foreach (transin[i]) transin[i] = '0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL valid not cleared by reset"); end
    reset = 0;
    for (int t = 0; t < 400; t++) begin
      m = $urandom_range(0, 3);
      vld = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < 32; i++) begin
        x[i] = (t < 8) ? ((t % 2 != 0) ? 127 : -128) : $signed($urandom_range(0, 255)) - 128;
        transin[i] = IN_W'(x[i]);
      end
      mode = tu_mode_e'(m);
      transin_valid = vld;
      @(posedge clk);
      #1 check(m, vld);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
