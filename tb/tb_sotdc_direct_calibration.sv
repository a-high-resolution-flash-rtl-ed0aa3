// tb_sotdc_direct_calibration: traditional direct calibration of all 64 levels
// of the full-size converter, without added noise, for comparison with the
// added-noise method.
//
// The data edge lead dT is stepped from -20 ps to 0 ps in 1 ps steps; for each
// step the converter runs N = 10,000 reference cycles at 25 MHz and all 64
// counters are read. With only the arbiters' own 0.35 ps noise, each level's
// count jumps from 0 to N within about one step; the level's offset is taken
// as minus the dT at which count/N crosses 0.5 (linear interpolation between
// steps) and must lie within 0.5 ps of the true offset. The percentage error
// between the two methods is not computed here: this testbench checks that the
// direct method recovers the offsets that the added-noise method also finds.
`timescale 1ps / 1fs
module tb_sotdc_direct_calibration;
  import tb_sotdc_pkg::*;

  localparam int    N        = 10000;
  localparam int    M        = 21;
  localparam real   DT_MIN   = -20.0;
  localparam real   DT_STEP  = 1.0;

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
    real worst;
    for (int j = 0; j < M; j++) begin
      run(DT_MIN + DT_STEP * real'(j), 0.0, frac);
      for (int a = 0; a < 64; a++) p[a][j] = frac[a];
    end
    worst = 0.0;
    for (int a = 0; a < 64; a++) begin
      real t_half, err;
      bit found;
      found = 1'b0;
      t_half = 0.0;
      for (int j = 1; j < M && !found; j++) begin
        if (p[a][j - 1] < 0.5 && p[a][j] >= 0.5) begin
          t_half = DT_MIN + DT_STEP * (real'(j - 1) + (0.5 - p[a][j - 1]) / (p[a][j] - p[a][j - 1]));
          found = 1'b1;
        end
      end
      check(found, $sformatf("level %0d: count crosses N/2 inside the sweep", a));
      tos_cal[a] = -t_half;
      err = tos_cal[a] - ref_offset_ps(a);
      if ((err < 0 ? -err : err) > worst) worst = (err < 0 ? -err : err);
      check((err < 0 ? -err : err) < 0.5,
            $sformatf("level %0d direct offset %0.2f ps, true %0.2f ps", a, tos_cal[a], ref_offset_ps(a)));
    end
    $display("direct calibration: worst offset error %0.2f ps", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
