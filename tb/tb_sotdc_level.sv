// tb_sotdc_level: drives one converter level at 25 MHz (40 ns period) and checks
// its LFSR count, decoded with an independent model, against the number of
// cycles whose data edge beat the threshold -t_os (t_os = +5 ps, noise 0.35 ps).
//
// phi_ref rises 2 ns into each cycle, phi_data dt ps earlier, phi_FF 6 ns after
// phi_ref; all fall later in the cycle. Checks: a cycle counted at the third
// phi_FF edge after its own (latency), runs of early, late and mixed data, and
// reset.
`timescale 1ps / 1fs
module tb_sotdc_level;
  import tb_sotdc_pkg::*;

  localparam real T_OS = 5.0;

  logic        phi_data = 1'b0;
  logic        phi_ref = 1'b0;
  logic        phi_ff = 1'b0;
  logic        rst_n = 1'b1;
  logic [19:0] count_out;
  int checks = 0;
  int failures = 0;
  int expected = 0;

  sotdc_level #(.T_OS_PS(T_OS)) dut (
    .phi_data(phi_data), .phi_ref(phi_ref), .phi_ff(phi_ff), .rst_n(rst_n), .count_out(count_out)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL: %s (decoded=%0d expected=%0d)", what, lfsr_decode(count_out, 5000), expected);
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

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 check(lfsr_decode(count_out, 10) == 0, "reset loads count 0");
    rst_n = 1'b1;
    // Latency: one early cycle, then late ones.
    cycle(100.0);
    cycle(-100.0);
    cycle(-100.0);
    check(lfsr_decode(count_out, 10) == 0, "not counted before the third edge");
    cycle(-100.0);
    expected = 1;
    check(lfsr_decode(count_out, 10) == 1, "counted at the third edge");
    // Just above and just below the threshold -t_os.
    repeat (200) cycle(-T_OS + 2.0);
    repeat (3) cycle(-T_OS - 2.0);
    expected += 200;
    check(lfsr_decode(count_out, 5000) == expected, "data 2 ps ahead of threshold counted");
    repeat (200) cycle(-T_OS - 2.0);
    check(lfsr_decode(count_out, 5000) == expected, "data 2 ps behind threshold not counted");
    for (int i = 0; i < 600; i++) begin
      real dt;
      dt = real'(int'($urandom_range(200))) - 100.0;
      if (dt > -T_OS + 1.5) expected++;
      else if (dt > -T_OS - 1.5) dt = -T_OS - 1.5;
      cycle(dt);
    end
    repeat (3) cycle(-100.0);
    check(lfsr_decode(count_out, 5000) == expected, "random placements");
    rst_n = 1'b0;
    #1 check(lfsr_decode(count_out, 10) == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
