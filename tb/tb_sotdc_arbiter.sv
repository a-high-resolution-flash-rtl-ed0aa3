// tb_sotdc_arbiter: checks the arbiter model's decision rule and timing.
//
// With offset +10 ps and 0.35 ps noise: data edges 9 ps after the reference
// (dt = -9) still give q = 1, 11 ps after give q = 0; large leads and lags give
// 1 and 0; q_n is the complement while both inputs are high and both outputs are
// 0 once an input falls. A second instance with 30 ps noise, driven at
// dt = -t_os, must give q = 1 in about half of 2000 trials, and at dt = -t_os +
// 30 ps in about 84 % (Phi(1)).
`timescale 1ps / 1fs
module tb_sotdc_arbiter;
  import tb_sotdc_pkg::*;

  logic phi_1 = 1'b0;
  logic phi_2 = 1'b0;
  logic q, q_n, qw, qw_n;
  int checks = 0;
  int failures = 0;

  sotdc_arbiter #(.T_OS_PS(10.0), .SIGMA_PS(0.35)) dut (.phi_1(phi_1), .phi_2(phi_2), .q(q), .q_n(q_n));
  sotdc_arbiter #(.T_OS_PS(10.0), .SIGMA_PS(30.0)) dut_noisy (.phi_1(phi_1), .phi_2(phi_2), .q(qw), .q_n(qw_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Reference edge at 1 ns; data edge dt ps earlier. Returns the decisions
  // sampled 5 ns after the reference edge.
  task automatic trial(real dt, output logic dq, output logic dqn, output logic nq);
    real t_ref, t_dat;
    t_ref = 1000.0;
    t_dat = 1000.0 - dt;
    if (t_dat < t_ref) begin
      #(t_dat) phi_1 = 1'b1;
      #(t_ref - t_dat) phi_2 = 1'b1;
    end else begin
      #(t_ref) phi_2 = 1'b1;
      #(t_dat - t_ref) phi_1 = 1'b1;
    end
    #(6000.0 - ((t_dat > t_ref) ? t_dat : t_ref));
    dq = q;
    dqn = q_n;
    nq = qw;
    #4000;
    phi_1 = 1'b0;
    phi_2 = 1'b0;
    #1;
    check(q == 1'b0 && q_n == 1'b0, "outputs released when inputs fall");
    #9000;
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, c;
    int ones;
    trial(500.0, a, b, c);  check(a == 1'b1 && b == 1'b0, "data well ahead: q=1");
    trial(-500.0, a, b, c); check(a == 1'b0 && b == 1'b1, "data well behind: q=0");
    trial(-9.0, a, b, c);   check(a == 1'b1, "dt=-9 ps with offset 10 ps: q=1");
    trial(-11.0, a, b, c);  check(a == 1'b0, "dt=-11 ps with offset 10 ps: q=0");
    trial(-8.0, a, b, c);   check(a == 1'b1, "dt=-8 ps: q=1");
    trial(-12.0, a, b, c);  check(a == 1'b0, "dt=-12 ps: q=0");
    // Decision is not ready right after the later edge (resolve delay).
    #1000 phi_2 = 1'b1;
    #20 phi_1 = 1'b1;
    #10 check(q == 1'b0 && q_n == 1'b0, "no decision before the resolve delay");
    #500 check(q == 1'b0 && q_n == 1'b1, "late data decided as 0");
    phi_1 = 1'b0;
    phi_2 = 1'b0;
    #10000;
    // Statistics of the noisy instance.
    ones = 0;
    for (int i = 0; i < 2000; i++) begin
      trial(-10.0, a, b, c);
      ones += int'(c);
    end
    check(ones > 900 && ones < 1100, $sformatf("P(q=1) at dt=-t_os: %0d / 2000", ones));
    ones = 0;
    for (int i = 0; i < 2000; i++) begin
      trial(20.0, a, b, c);
      ones += int'(c);
    end
    check(ones > 1600 && ones < 1760, $sformatf("P(q=1) at dt=-t_os+sigma: %0d / 2000", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
