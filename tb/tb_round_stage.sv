// tb_round_stage -- checks rounding, shift and output limiting.
//
// Random sums over the whole 20-bit range, plus values just at and past the
// rounding and limiting boundaries, go in with random modes; one clock later
// each lane must hold (sum + 2^(s-1)) >>> s limited to 14 bits, with the
// limit flag set exactly when the limit applied.
module tb_round_stage;
  import hevc_mt_pkg::*;
  import tb_ref_pkg::*;

  localparam int ACC_W = 20, OUT_W = 14;
  logic clk = 0, reset = 1, in_valid = 0;
  tu_mode_e mode = TU4;
  logic signed [ACC_W-1:0] adderout_e [NLANE];
  logic signed [ACC_W-1:0] adderout_o [NLANE];
  logic transout_valid;
  tu_mode_e mode_out;
  logic signed [OUT_W-1:0] transout_e [NLANE];
  logic signed [OUT_W-1:0] transout_o [NLANE];
  logic [NLANE-1:0] sat_e, sat_o;
  int checks = 0, failures = 0;
  int a [2][16];
  int n_sat = 0;

  round_stage #(.ACC_W(ACC_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(input int t, input int m);
    int lim;
    lim = 8192 << (m + 1);   // first sum that rounds past the 14-bit maximum
    case (t % 8)
      0: return lim - 1;
      1: return lim - (1 << m) - 1;
      2: return -lim - (1 << m);
      3: return -lim - (1 << m) - 1;
      4: return (1 << m) - 1;      // just below a rounding step
      5: return (1 << m);          // exactly half: rounds up
      default: return $signed($urandom_range(0, (1 << ACC_W) - 1)) - (1 << (ACC_W - 1));
    endcase
  endfunction

  initial begin
    int m, got, exp_v;
    bit s, gs;
    foreach (adderout_e[i]) begin adderout_e[i] = '0; adderout_o[i] = '0; end
    repeat (2) @(posedge clk);
    reset = 0;
    for (int t = 0; t < 300; t++) begin
      m = $urandom_range(0, 3);
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 16; i++) begin
          a[b][i] = pick(t + i + b, m);
          if (b == 0) adderout_e[i] = ACC_W'(a[b][i]);
          else        adderout_o[i] = ACC_W'(a[b][i]);
        end
      mode = tu_mode_e'(m);
      in_valid = (t % 5 != 4);
      @(posedge clk);
      #1;
      checks++;
      if (transout_valid !== in_valid || mode_out != tu_mode_e'(m)) begin failures++; $display("FAIL valid/mode"); end
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 16; i++) begin
          exp_v = round_lim(m, longint'(a[b][i]), OUT_W, s);
          got = (b == 0) ? int'(transout_e[i]) : int'(transout_o[i]);
          gs  = (b == 0) ? sat_e[i] : sat_o[i];
          n_sat += int'(s);
          checks++;
          if (got != exp_v || gs != s) begin
            failures++;
            if (failures < 10) $display("FAIL mode=%0d in=%0d got=%0d/%0d exp=%0d/%0d", m, a[b][i], got, gs, exp_v, s);
          end
        end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
