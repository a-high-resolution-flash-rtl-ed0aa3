// tb_sotdc_section: checks a 32-level section as a flash quantizer.
//
// Section 1 (levels 32..63), with the arbiter noise lowered to 0.02 ps. For a fixed placement dt of the
// data edge, level i counts every cycle when dt + t_os(i) > 0 and none when it
// is below, so the counts across the section form a thermometer code over the
// levels sorted by offset. The offsets are evenly spaced 13/63 ps apart; dt is
// chosen midway between two of them, 5 noise sigmas from either.
`timescale 1ps / 1fs
module tb_sotdc_section;
  import tb_sotdc_pkg::*;

  localparam int N = 50;

  logic        phi_data = 1'b0;
  logic        phi_ref = 1'b0;
  logic        phi_ff = 1'b0;
  logic        rst_n = 1'b1;
  logic [19:0] counts [32];
  int checks = 0;
  int failures = 0;
  int hits = 0;

  sotdc_section #(.SECTION_ID(1), .SIGMA_PS(0.02)) dut (
    .phi_data(phi_data), .phi_ref(phi_ref), .phi_ff(phi_ff), .rst_n(rst_n), .counts(counts)
  );

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

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real step;
    step = 13.0 / 63.0;
    for (int k = 0; k <= 64; k += 8) begin
      real dt;
      int ones;
      // Threshold midway between grid offsets k-1 and k (k = 0: below all).
      dt = -(3.0 + step * (real'(k) - 0.5));
      rst_n = 1'b0;
      #1 rst_n = 1'b1;
      repeat (N) cycle(dt);
      repeat (3) cycle(-200.0);
      ones = 0;
      for (int i = 0; i < 32; i++) begin
        int n;
        bit exp_hit;
        n = lfsr_decode(counts[i], N + 5);
        exp_hit = (dt + ref_offset_ps(32 + i)) > 0.0;
        check(n == (exp_hit ? N : 0),
              $sformatf("dt=%0.2f level %0d: count %0d, offset %0.2f", dt, 32 + i, n, ref_offset_ps(32 + i)));
        if (n == N) ones++;
      end
      hits += ones;
      $display("dt = %6.2f ps: %0d of 32 levels fire", dt, ones);
    end
    check(hits > 0 && hits < 9 * 32, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
