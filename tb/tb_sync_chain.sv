// tb_sync_chain: checks that q follows d exactly three rising clock edges later,
// and that the asynchronous reset clears every stage.
`timescale 1ps / 1fs
module tb_sync_chain;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b0;
  logic q;
  logic [15:0] hist;  // hist[k] = d sampled k+1 edges ago
  int checks = 0;
  int failures = 0;

  sync_chain dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #2 check(q == 1'b0, "reset clears output");
    rst_n = 1'b1;
    hist = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      @(posedge clk);
      #1;
      hist = {hist[14:0], d};
      check(q == hist[2], "q is d delayed by three edges");
    end
    // Latency of a single pulse.
    @(negedge clk);
    d = 1'b0;
    repeat (4) @(negedge clk);
    d = 1'b1;
    @(negedge clk);
    d = 1'b0;
    check(q == 1'b0, "pulse not visible after one edge");
    @(negedge clk);
    check(q == 1'b0, "pulse not visible after two edges");
    @(negedge clk);
    check(q == 1'b1, "pulse visible after three edges");
    @(negedge clk);
    check(q == 1'b0, "pulse lasts one cycle");
    d = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b0;
    #1 check(q == 1'b0, "asynchronous reset clears");
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 1'b0, "reset cleared the inner stages too");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
