// tb_binary_counter: checks the 20-bit enabled up counter against a reference
// count under random enable, its asynchronous reset, and its wrap from
// 2^20 - 1 to 0.
`timescale 1ps / 1fs
module tb_binary_counter;
  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        en = 1'b0;
  logic [19:0] count_out;
  int unsigned ref_count;
  int checks = 0;
  int failures = 0;

  binary_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .count_out(count_out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (count_out=%0d ref=%0d)", what, count_out, ref_count);
    end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wrapped;
    #1 rst_n = 1'b0;
    #3 check(count_out == 0, "reset clears");
    rst_n = 1'b1;
    ref_count = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      @(posedge clk);
      #1;
      if (en) ref_count++;
      check(count_out == 20'(ref_count), "count with random enable");
    end
    // Count up to the wrap.
    @(negedge clk);
    en = 1'b1;
    wrapped = 0;
    for (int i = 0; i < (1 << 20); i++) begin
      @(posedge clk);
      #1;
      ref_count++;
      if (count_out != 20'(ref_count)) wrapped++;
    end
    check(wrapped == 0, "long run matches reference (including wrap)");
    @(negedge clk);
    en = 1'b0;
    rst_n = 1'b0;
    #1 check(count_out == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
