// tb_hevc_mt_top -- end-to-end test of the multi-mode transform at its
// default sizes (8-bit samples, 14-bit coefficients, 32 samples per clock).
//
// A driver feeds vectors of 32 samples with a mode; a scoreboard keeps, for
// each accepted vector, the 32 coefficients the reference model expects and
// the clock edge that sampled it, and checks every valid output against it,
// including the 4-cycle latency. The run covers:
//   * one 32x32 block (32 rows on consecutive clocks): its last coefficients
//     must be out 35 cycles after the first row was presented;
//   * whole 16x16, 8x8 and 4x4 blocks, back to back;
//   * a random stream with a new mode on many clocks, idle clocks, and
//     full-scale samples that drive coefficients into the 14-bit limit.
// Each of these (the four modes, mode changes between consecutive vectors,
// idle clocks, limited coefficients) is counted, and one that never happened
// counts as a failure. A few entries of the reference matrix are also checked
// against the published 8x8 HEVC matrix.
module tb_hevc_mt_top;
  import hevc_mt_pkg::*;
  import tb_ref_pkg::*;

  localparam int IN_W = 8, OUT_W = 14;

  logic clk = 0, reset = 1, transin_valid = 0;
  tu_mode_e mode = TU4;
  logic signed [IN_W-1:0] transin [NSAMP];
  logic transout_valid;
  tu_mode_e transout_mode;
  logic signed [OUT_W-1:0] transout_e [NLANE];
  logic signed [OUT_W-1:0] transout_o [NLANE];
  logic [NLANE-1:0] sat_e, sat_o;

  hevc_mt_top dut (.*);

  typedef struct {
    int       edge_no;
    tu_mode_e m;
    int       ye [16];
    int       yo [16];
    bit [15:0] se, so;
  } exp_t;

  exp_t q [$];
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_out_cyc = 0;
  int n_mode [4];
  int n_switch = 0, n_idle = 0, n_sat = 0, n_out = 0;
  int prev_mode = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one vector (or an idle clock) for the next rising edge.
  task automatic drive(input bit vld, input int m, input int x [32]);
    exp_t e;
    bit s;
    mode = tu_mode_e'(m);
    transin_valid = vld;
    for (int i = 0; i < 32; i++) transin[i] = IN_W'(x[i]);
    if (vld) begin
      e.edge_no = cyc + 1;
      e.m = tu_mode_e'(m);
      for (int j = 0; j < 16; j++) begin
        e.ye[j] = round_lim(m, lane_sum(m, 0, j, x), OUT_W, s); e.se[j] = s;
        e.yo[j] = round_lim(m, lane_sum(m, 1, j, x), OUT_W, s); e.so[j] = s;
      end
      q.push_back(e);
      n_mode[m]++;
      if (prev_mode >= 0 && prev_mode != m) n_switch++;
      prev_mode = m;
    end else begin
      n_idle++;
    end
    @(posedge clk);
    #1;
  endtask

  // Scoreboard.
  always @(posedge clk) begin
    #2;
    if (!reset && transout_valid) begin
      exp_t e;
      n_out++;
      last_out_cyc = cyc;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output with nothing expected at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        if (cyc != e.edge_no + 3 || transout_mode != e.m) begin
          failures++;
          $display("FAIL latency/mode: out at %0d, sampled at %0d, mode %0d exp %0d",
                   cyc, e.edge_no, transout_mode, e.m);
        end
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (int'(transout_e[j]) != e.ye[j] || int'(transout_o[j]) != e.yo[j] ||
              sat_e[j] != e.se[j] || sat_o[j] != e.so[j]) begin
            failures++;
            if (failures < 10)
              $display("FAIL mode %0d lane %0d: e=%0d exp %0d, o=%0d exp %0d",
                       e.m, j, transout_e[j], e.ye[j], transout_o[j], e.yo[j]);
          end
          n_sat += int'(e.se[j]) + int'(e.so[j]);
        end
      end
    end
  end

  function automatic void rand_vec(output int x [32], input int amp);
    for (int i = 0; i < 32; i++)
      x[i] = $signed($urandom_range(0, 2 * amp - 1)) - amp;
  endfunction

  // Rows 1 and 3 of the 8x8 HEVC matrix as published.
  localparam int R1 [8] = '{89, 75, 50, 18, -18, -50, -75, -89};
  localparam int R3 [8] = '{75, -18, -89, -50, 50, 89, 18, -75};

  initial begin
    int x [32];
    int zero [32];
    int first_present;
    foreach (transin[i]) transin[i] = '0;
    foreach (zero[i]) zero[i] = 0;

    for (int n = 0; n < 8; n++) begin
      checks++;
      if (hevc_c(8, 1, n) != R1[n] || hevc_c(8, 3, n) != R3[n]) begin
        failures++;
        $display("FAIL reference matrix entry n=%0d", n);
      end
    end

    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (transout_valid !== 1'b0) begin failures++; $display("FAIL valid after reset"); end
    reset = 0;
    @(posedge clk);
    #1;

    // One 32x32 block: 32 rows back to back.
    first_present = cyc;
    for (int r = 0; r < 32; r++) begin
      rand_vec(x, 128);
      if (r == 0) foreach (x[i]) x[i] = 127;     // DC at full scale: limited
      if (r == 1) foreach (x[i]) x[i] = (i % 2 == 0) ? 5 : -3;
      drive(1'b1, 3, x);
    end
    while (q.size() != 0) drive(1'b0, 3, zero);
    checks++;
    if (last_out_cyc - first_present != 35) begin
      failures++;
      $display("FAIL 32x32 block took %0d cycles, expected 35", last_out_cyc - first_present);
    end else
      $display("32x32 block of 32 rows: 35 cycles");

    // Whole blocks of the smaller sizes: 16x16 = 8 vectors, 8x8 = 2, 4x4 = 1.
    for (int m = 2; m >= 0; m--)
      for (int v = 0; v < ((m == 2) ? 8 : (m == 1) ? 2 : 1); v++) begin
        rand_vec(x, 128);
        drive(1'b1, m, x);
      end

    // Random stream: modes, idle clocks, small and full-scale samples.
    for (int t = 0; t < 600; t++) begin
      int amp;
      amp = ($urandom_range(0, 3) == 0) ? 128 : ($urandom_range(0, 1) == 0) ? 40 : 8;
      rand_vec(x, amp);
      if ($urandom_range(0, 9) == 0) foreach (x[i]) x[i] = (t % 2 == 0) ? -128 : 127;
      drive($urandom_range(0, 5) != 0, $urandom_range(0, 3), x);
    end
    repeat (6) drive(1'b0, 0, zero);

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results never came out", q.size()); end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    end
    checks++;
    if (n_switch == 0 || n_idle == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("vectors per mode 4x4/8x8/16x16/32x32: %0d/%0d/%0d/%0d, mode changes %0d, idle clocks %0d, limited coefficients %0d, outputs %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_idle, n_sat, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
