// tb_sotdc_top: end-to-end test of the full converter at its default size
// (64 levels, 20-bit LFSR counters, 0.35 ps arbiter noise) and of the
// single-level prototype beside it.
//
// One operation of the converter: reset, N reference cycles at 25 MHz with the
// data edge at a fixed lead dt, three flush cycles with late data, then all 64
// counters read through the readout port and decoded with an independent LFSR
// model. A level must count every cycle when dt + t_os is above +1.5 ps and none
// when it is below -1.5 ps (over 4 noise sigmas); levels inside that band only
// need counts between 0 and N. Several dt values sweep the thresholds across
// both sections. The mechanisms exercised are counted, and each must occur:
// a level firing, a level holding, the three-edge synchronizer latency, a
// readout of every address, the reset, and a count in the prototype.
`timescale 1ps / 1fs
module tb_sotdc_top;
  import tb_sotdc_pkg::*;

  localparam int N = 40;

  logic        phi_data = 1'b0;
  logic        phi_ref = 1'b0;
  logic        phi_ff = 1'b0;
  logic        rst_n = 1'b1;
  logic        rd_clk = 1'b0;
  logic [5:0]  rd_addr = '0;
  logic [19:0] rd_count;
  logic        cpld_phi_data = 1'b0;
  logic        cpld_phi_clock = 1'b0;
  logic        cpld_rst_n = 1'b1;
  logic [19:0] cpld_count_out;

  int checks = 0;
  int failures = 0;
  int n_fire = 0, n_hold = 0, n_latency = 0, n_read = 0, n_reset = 0, n_cpld = 0;
  bit read_seen [64];

  sotdc_top dut (
    .phi_data(phi_data), .phi_ref(phi_ref), .phi_ff(phi_ff), .rst_n(rst_n),
    .rd_clk(rd_clk), .rd_addr(rd_addr), .rd_count(rd_count),
    .cpld_phi_data(cpld_phi_data), .cpld_phi_clock(cpld_phi_clock),
    .cpld_rst_n(cpld_rst_n), .cpld_count_out(cpld_count_out)
  );

  always #2500 rd_clk = ~rd_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
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

  task automatic read_level(int a, output int n);
    @(negedge rd_clk);
    rd_addr = 6'(a);
    @(posedge rd_clk);
    #1;
    n = lfsr_decode(rd_count, N + 10);
    read_seen[a] = 1'b1;
  endtask

  task automatic reset_converter();
    rst_n = 1'b0;
    #100;
    rst_n = 1'b1;
    #100;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    real dts [5] = '{0.0, -6.0, -9.5, -13.0, -20.0};

    // Reset, then check that every counter reads 0.
    reset_converter();
    for (int a = 0; a < 64; a++) begin
      read_level(a, n);
      check(n == 0, $sformatf("level %0d reads 0 after reset", a));
    end
    n_reset++;

    // Synchronizer latency, seen through the readout port on level 0.
    cycle(100.0);
    cycle(-100.0);
    cycle(-100.0);
    read_level(0, n);
    check(n == 0, "not counted after two phi_FF edges");
    cycle(-100.0);
    read_level(0, n);
    check(n == 1, "counted at the third phi_FF edge");
    if (n == 1) n_latency++;

    // Threshold sweep.
    foreach (dts[k]) begin
      int fired;
      reset_converter();
      n_reset++;
      repeat (N) cycle(dts[k]);
      repeat (3) cycle(-200.0);
      fired = 0;
      for (int a = 0; a < 64; a++) begin
        real margin;
        read_level(a, n);
        n_read++;
        margin = dts[k] + ref_offset_ps(a);
        if (margin > 1.5) begin
          check(n == N, $sformatf("dt=%0.1f level %0d fires every cycle (count %0d)", dts[k], a, n));
        end else if (margin < -1.5) begin
          check(n == 0, $sformatf("dt=%0.1f level %0d holds (count %0d)", dts[k], a, n));
        end else begin
          check(n >= 0 && n <= N, $sformatf("dt=%0.1f level %0d near threshold (count %0d)", dts[k], a, n));
        end
        if (n == N) n_fire++;
        if (n == 0) n_hold++;
        if (n > 0) fired++;
      end
      $display("dt = %6.2f ps: %0d of 64 levels count", dts[k], fired);
    end

    // Reset in the middle of a run clears the counters.
    repeat (5) cycle(50.0);
    reset_converter();
    n_reset++;
    repeat (3) cycle(-200.0);
    read_level(17, n);
    check(n == 0, "reset during a run clears the counters");

    // Single-level prototype: 30 early and 20 late data edges at 20 MHz.
    cpld_rst_n = 1'b0;
    #100 cpld_rst_n = 1'b1;
    for (int i = 0; i < 53; i++) begin
      int lead;
      lead = (i < 30) ? 5 : -5;
      if (lead > 0) begin
        #(10000 - lead) cpld_phi_data = 1'b1;
        #(lead) cpld_phi_clock = 1'b1;
      end else begin
        #(10000) cpld_phi_clock = 1'b1;
        #(-lead) cpld_phi_data = 1'b1;
      end
      #25000 cpld_phi_data = 1'b0;
      cpld_phi_clock = 1'b0;
      #(15000 - ((lead > 0) ? 0 : -lead));
    end
    check(cpld_count_out == 20'd30, $sformatf("prototype count %0d", cpld_count_out));
    if (cpld_count_out != 0) n_cpld++;

    foreach (read_seen[a]) check(read_seen[a], $sformatf("address %0d read", a));
    $display("mechanisms: fire=%0d hold=%0d latency=%0d reads=%0d resets=%0d prototype=%0d",
             n_fire, n_hold, n_latency, n_read, n_reset, n_cpld);
    check(n_fire > 0, "a level fired");
    check(n_hold > 0, "a level held");
    check(n_latency > 0, "latency observed");
    check(n_read > 0, "readout used");
    check(n_reset > 0, "reset used");
    check(n_cpld > 0, "prototype counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
