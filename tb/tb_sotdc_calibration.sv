// tb_sotdc_calibration: the converter's two workloads, at full size and with the
// published run lengths: calibration of all 64 level offsets with added
// Gaussian timing noise, then measurement of Gaussian jitter with the
// calibrated levels.
//
// Calibration: the data edge is placed at a nominal lead dT swept from -100 ps to
// +100 ps in 20 ps steps (M = 11), plus Gaussian noise of 29.8 ps standard
// deviation, as the noise-modulated delay of a pulse generator would do. For each
// dT the converter runs N = 100,000 reference cycles at 25 MHz, all 64 counters
// are read and decoded, and p_i(dT) = count_i / N is a sampled Gaussian cdf in
// dT with mean -t_os(i) and standard deviation ~29.8 ps. The testbench estimates
// each level's mean and sigma from the sampled cdf (trapezoid moments: mean =
// dT_max - integral of p, second moment from the increments of p) and checks
// them against the level's true offset (within 0.5 ps) and the added noise
// (within 1 ps).
//
// Jitter measurement: the data edge lead is Gaussian with mean 9.4 ps and
// standard deviation 13.5 ps, N = 100,000 cycles. For every level with
// 0 < p_i < 1, inv_phi(p_i) = (mu + t_os_i) / sigma; a straight-line fit over the
// calibrated offsets gives mu and sigma, which must be within 0.5 ps of the
// values applied.
`timescale 1ps / 1fs
module tb_sotdc_calibration;
  import tb_sotdc_pkg::*;

  localparam int    N        = 100000;
  localparam int    M        = 11;
  localparam real   DT_MIN   = -100.0;
  localparam real   DT_STEP  = 20.0;
  localparam real   SIGMA_ADD = 29.8;
  localparam real   JIT_MEAN = 9.4;
  localparam real   JIT_SIGMA = 13.5;

  logic        phi_data = 1'b0;
  logic        phi_ref = 1'b0;
  logic        phi_ff = 1'b0;
  logic        rst_n = 1'b1;
  logic        rd_clk = 1'b0;
  logic [5:0]  rd_addr = '0;
  logic [19:0] rd_count;
  logic [19:0] cpld_count_out;

  int checks = 0;
  int failures = 0;
  real p [64][M];
  real tos_cal [64];

  sotdc_top dut (
    .phi_data(phi_data), .phi_ref(phi_ref), .phi_ff(phi_ff), .rst_n(rst_n),
    .rd_clk(rd_clk), .rd_addr(rd_addr), .rd_count(rd_count),
    .cpld_phi_data(1'b0), .cpld_phi_clock(1'b0), .cpld_rst_n(1'b0),
    .cpld_count_out(cpld_count_out)
  );

  always #2500 rd_clk = ~rd_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic cycle(real dt);
    real t_ref, t_dat;
    t_ref = 2000.0;
    t_dat = 2000.0 - dt;
    if (t_dat < t_ref) begin
      #(t_dat) phi_data = 1'b1;
      #(t_ref - t_dat) phi_ref = 1'b1;
    end else begin
      #(t_ref) phi_ref = 1'b1;
      #(t_dat - t_ref) phi_data = 1'b1;
    end
    #(8000.0 - ((t_dat > t_ref) ? t_dat : t_ref)) phi_ff = 1'b1;
    #12000 phi_data = 1'b0;
    phi_ref = 1'b0;
    #8000 phi_ff = 1'b0;
    #12000;
  endtask

  // Reset, N cycles with lead mean + sigma * gauss(), flush, read all levels.
  task automatic run(real mean, real sigma, output real frac [64]);
    rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #100;
    for (int i = 0; i < N; i++) cycle(mean + sigma * gauss());
    repeat (3) cycle(-1000.0);
    for (int a = 0; a < 64; a++) begin
      int n;
      @(negedge rd_clk);
      rd_addr = 6'(a);
      @(posedge rd_clk);
      #1;
      n = lfsr_decode(rd_count, N + 10);
      check(n >= 0, $sformatf("level %0d count decodes", a));
      frac[a] = real'(n) / real'(N);
    end
  endtask

  initial begin
    repeat (100) #1000000000;  // 100 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real frac [64];
    real worst_os, worst_sig;
    real sx, sy, sxx, sxy, slope, icpt, mu_est, sig_est;
    int  k;

    // ---- Calibration with added noise ----
    for (int j = 0; j < M; j++) begin
      run(DT_MIN + DT_STEP * real'(j), SIGMA_ADD, frac);
      for (int a = 0; a < 64; a++) p[a][j] = frac[a];
    end
    worst_os = 0.0;
    worst_sig = 0.0;
    for (int a = 0; a < 64; a++) begin
      real integ, m1, m2, sig, err;
      integ = 0.0;
      for (int j = 0; j < M - 1; j++) integ += 0.5 * DT_STEP * (p[a][j] + p[a][j + 1]);
      // mean of the cdf = dT_max - integral (p = 0 at dT_min, 1 at dT_max)
      tos_cal[a] = integ - (DT_MIN + DT_STEP * real'(M - 1));
      m1 = 0.0;
      m2 = 0.0;
      for (int j = 1; j < M; j++) begin
        real x;
        x = DT_MIN + DT_STEP * (real'(j) - 0.5);
        m1 += x * (p[a][j] - p[a][j - 1]);
        m2 += x * x * (p[a][j] - p[a][j - 1]);
      end
      // Remove the variance of the step grid itself (Sheppard's correction).
      sig = $sqrt(m2 - m1 * m1 - DT_STEP * DT_STEP / 12.0);
      err = tos_cal[a] - ref_offset_ps(a);
      if ((err < 0 ? -err : err) > worst_os) worst_os = (err < 0 ? -err : err);
      if ((sig - SIGMA_ADD < 0 ? SIGMA_ADD - sig : sig - SIGMA_ADD) > worst_sig)
        worst_sig = (sig - SIGMA_ADD < 0 ? SIGMA_ADD - sig : sig - SIGMA_ADD);
      check((err < 0 ? -err : err) < 0.5,
            $sformatf("level %0d calibrated offset %0.2f ps, true %0.2f ps", a, tos_cal[a], ref_offset_ps(a)));
      check(sig > SIGMA_ADD - 1.0 && sig < SIGMA_ADD + 1.0,
            $sformatf("level %0d fitted sigma %0.2f ps", a, sig));
      if (a < 4) $display("level %0d: calibrated t_os %6.2f ps (true %6.2f), sigma %6.2f ps",
                          a, tos_cal[a], ref_offset_ps(a), sig);
    end
    $display("calibration: worst offset error %0.2f ps, worst sigma error %0.2f ps", worst_os, worst_sig);

    // ---- Jitter measurement with the calibrated levels ----
    run(JIT_MEAN, JIT_SIGMA, frac);
    sx = 0.0; sy = 0.0; sxx = 0.0; sxy = 0.0; k = 0;
    for (int a = 0; a < 64; a++) begin
      if (frac[a] > 0.0 && frac[a] < 1.0) begin
        real z;
        z = inv_phi(frac[a]);
        sx += tos_cal[a];
        sy += z;
        sxx += tos_cal[a] * tos_cal[a];
        sxy += tos_cal[a] * z;
        k++;
      end
    end
    check(k >= 32, $sformatf("%0d levels inside the jitter distribution", k));
    slope = (real'(k) * sxy - sx * sy) / (real'(k) * sxx - sx * sx);
    icpt = (sy - slope * sx) / real'(k);
    sig_est = 1.0 / slope;
    mu_est = icpt * sig_est;
    $display("jitter: measured mean %0.2f ps (applied %0.2f), rms %0.2f ps (applied %0.2f), %0d levels",
             mu_est, JIT_MEAN, sig_est, JIT_SIGMA, k);
    check(mu_est > JIT_MEAN - 0.5 && mu_est < JIT_MEAN + 0.5, "jitter mean");
    check(sig_est > JIT_SIGMA - 0.5 && sig_est < JIT_SIGMA + 0.5, "jitter rms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
