// tb_tu_workloads -- throughput of the transform for each TU size.
//
// For each of the four modes, a 64x64-sample region of random residuals is
// cut into TUs of that size, and every row of every TU is streamed through
// the top, 32 samples per clock with no idle clocks (128 vectors). The test
// checks every coefficient against the reference model. It also checks that
// the region is done 128 + 3 cycles after its first vector went in. For the
// first 35-cycle window of each mode it reports how many rows, and how many
// whole TUs, were completed.
module tb_tu_workloads;
  import hevc_mt_pkg::*;
  import tb_ref_pkg::*;

  localparam int IN_W = 8, OUT_W = 14, REG = 64;

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
    int ye [16];
    int yo [16];
  } exp_t;

  exp_t q [$];
  int checks = 0, failures = 0;
  int cyc = 0, n_out = 0, last_out = 0;
  int img [REG][REG];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (!reset && transout_valid) begin
      exp_t e;
      n_out++;
      last_out = cyc;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (int'(transout_e[j]) != e.ye[j] || int'(transout_o[j]) != e.yo[j]) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d", j);
          end
        end
      end
    end
  end

  initial begin
    int x [32];
    int npts, rows_per_vec, first, nvec, out0;
    bit s;
    foreach (transin[i]) transin[i] = '0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int m = 3; m >= 0; m--) begin
      npts = 4 << m;
      rows_per_vec = 32 / npts;
      foreach (img[r, c]) img[r][c] = $signed($urandom_range(0, 255)) - 128;
      // Row stream: TU by TU in raster order, each TU's rows in order.
      nvec = 0;
      out0 = n_out;
      first = cyc;
      for (int tr = 0; tr < REG; tr += npts)
        for (int tc = 0; tc < REG; tc += npts)
          for (int r = 0; r < npts; r++) begin
            // one row of npts samples; 32/npts rows fill a vector
            int slot;
            slot = ((((tr / npts) * (REG / npts) + tc / npts) * npts) + r) % rows_per_vec;
            for (int n = 0; n < npts; n++) x[slot * npts + n] = img[tr + r][tc + n];
            if (slot == rows_per_vec - 1) begin
              exp_t e;
              for (int j = 0; j < 16; j++) begin
                e.ye[j] = round_lim(m, lane_sum(m, 0, j, x), OUT_W, s);
                e.yo[j] = round_lim(m, lane_sum(m, 1, j, x), OUT_W, s);
              end
              q.push_back(e);
              mode = tu_mode_e'(m);
              transin_valid = 1'b1;
              foreach (x[i]) transin[i] = IN_W'(x[i]);
              nvec++;
              @(posedge clk);
              #3;
              if (cyc - first == 35) begin
                checks++;
                if ((n_out - out0) != 32) begin
                  failures++;
                  $display("FAIL %0d vectors out in the first 35 cycles", n_out - out0);
                end
                $display("%0dx%0d: %0d rows (%0d TUs) completed in the first 35 cycles",
                         npts, npts, (n_out - out0) * rows_per_vec, (n_out - out0) * rows_per_vec / npts);
              end
            end
          end
      transin_valid = 1'b0;
      while (q.size() != 0) begin @(posedge clk); #1; end
      checks++;
      if (nvec != REG * REG / 32 || last_out - first != nvec + 3) begin
        failures++;
        $display("FAIL %0dx%0d: %0d vectors, %0d cycles", npts, npts, nvec, last_out - first);
      end else
        $display("%0dx%0d: 64x64 region, %0d vectors, done in %0d cycles", npts, npts, nvec, last_out - first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
