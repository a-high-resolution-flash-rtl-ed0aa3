// tb_cpld_level: drives the single-level prototype with 20 MHz clock and data
// (50 ns period) and checks the counter against a reference count.
//
// In each cycle the data edge is placed dt ps before (dt > 0) or after the clock
// edge; the measuring flip-flop has no offset in RTL, so cycle k is counted
// exactly when dt > 0, three clock edges later. Checks the count after runs of
// all-early, all-late and random placements, the three-edge latency, and reset.
`timescale 1ps / 1fs
module tb_cpld_level;
  localparam int PERIOD_PS = 50000;

  logic        phi_data = 1'b0;
  logic        phi_clock = 1'b0;
  logic        rst_n = 1'b1;
  logic [19:0] count_out;
  int checks = 0;
  int failures = 0;
  int expected = 0;

  cpld_level dut (.phi_data(phi_data), .phi_clock(phi_clock), .rst_n(rst_n), .count_out(count_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (count=%0d expected=%0d)", what, count_out, expected);
    end
  endtask

  // One reference cycle; the clock edge is at 10 ns into the cycle.
  task automatic cycle(int dt_ps);
    int t_clk, t_dat;
    t_clk = 10000;
    t_dat = 10000 - dt_ps;
    if (t_dat < t_clk) begin
      #(t_dat) phi_data = 1'b1;
      #(t_clk - t_dat) phi_clock = 1'b1;
    end else begin
      #(t_clk) phi_clock = 1'b1;
      #(t_dat - t_clk) phi_data = 1'b1;
    end
    #(35000 - ((t_dat > t_clk) ? t_dat : t_clk));
    phi_data = 1'b0;
    phi_clock = 1'b0;
    #(PERIOD_PS - 35000);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dts [$];
    #1 rst_n = 1'b0;
    #1 check(count_out == 0, "reset clears");
    rst_n = 1'b1;
    // All data edges early by 3 ps: 100 counts after 3 flush cycles.
    repeat (100) cycle(3);
    check(count_out == 97, "latency: 3 edges");
    repeat (3) cycle(-3);
    expected = 100;
    check(count_out == 100, "all-early run");
    repeat (100) cycle(-2);
    check(count_out == 100, "late data not counted");
    // Random placements.
    for (int i = 0; i < 400; i++) begin
      int dt;
      dt = int'($urandom_range(400)) - 200;
      if (dt == 0) dt = 1;
      if (dt > 0) expected++;
      cycle(dt);
    end
    repeat (3) cycle(-50);
    check(count_out == 20'(expected), "random placements");
    rst_n = 1'b0;
    #1 check(count_out == 0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
