// tb_lfsr_counter: checks the 20-bit LFSR counter against an independent model.
//
// Checks: reset loads the seed; every enabled edge matches the reference
// sequence; a low enable holds the state; the sequence visits every non-zero
// state exactly once and returns to the seed after 2^20 - 1 steps (maximal length).
`timescale 1ps / 1fs
module tb_lfsr_counter;
  import tb_sotdc_pkg::*;

  localparam int unsigned PERIOD = (1 << 20) - 1;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        en = 1'b0;
  logic [19:0] count_out;
  logic [19:0] ref_state;
  int checks = 0;
  int failures = 0;

  bit seen [logic [19:0]];

  lfsr_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .count_out(count_out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (count_out=%h ref=%h)", what, count_out, ref_state);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    bit dup;
    int mismatch;
    #1 rst_n = 1'b0;
    #11 check(count_out == 20'd1, "reset loads seed");
    rst_n = 1'b1;
    ref_state = 20'd1;
    // Enable toggling: random enable for 2000 edges.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      @(posedge clk);
      #1;
      if (en) ref_state = lfsr_ref_next(ref_state);
      check(count_out == ref_state, "sequence with random enable");
    end
    // Full period with enable held high.
    @(negedge clk);
    rst_n = 1'b0;
    #1 check(count_out == 20'd1, "asynchronous reset");
    @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    seen.delete();
    seen[count_out] = 1'b1;
    ref_state = 20'd1;
    dup = 1'b0;
    mismatch = 0;
    n = 0;
    forever begin
      @(posedge clk);
      #1;
      n++;
      ref_state = lfsr_ref_next(ref_state);
      if (count_out != ref_state) mismatch++;
      if (count_out == 20'd1) break;
      if (count_out == 20'd0) break;
      if (seen.exists(count_out)) dup = 1'b1;
      seen[count_out] = 1'b1;
      if (n > PERIOD + 10) break;
    end
    check(n == PERIOD, $sformatf("period %0d", n));
    check(!dup, "no state repeats within a period");
    check(mismatch == 0, "full period matches reference");
    check(seen.num() == PERIOD, "all non-zero states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
