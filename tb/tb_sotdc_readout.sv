// tb_sotdc_readout: loads random values into the 64 counter inputs and checks
// that every address returns its counter on the rising rd_clk edge after it is
// applied, and that reset clears the output register.
`timescale 1ps / 1fs
module tb_sotdc_readout;
  logic        rd_clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [19:0] counts [64];
  logic [5:0]  rd_addr = '0;
  logic [19:0] rd_count;
  int checks = 0;
  int failures = 0;

  sotdc_readout dut (
    .rd_clk(rd_clk), .rst_n(rst_n), .counts(counts), .rd_addr(rd_addr), .rd_count(rd_count)
  );

  always #5 rd_clk = ~rd_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
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
    for (int i = 0; i < 64; i++) counts[i] = 20'($urandom);
    #1 rst_n = 1'b0;
    #1 check(rd_count == '0, "reset clears output");
    rst_n = 1'b1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < 64; a++) begin
        int addr;
        addr = (pass == 1) ? 63 - a : (pass == 2) ? int'($urandom_range(63)) : a;
        @(negedge rd_clk);
        rd_addr = 6'(addr);
        @(posedge rd_clk);
        #1 check(rd_count == counts[addr], $sformatf("address %0d", addr));
      end
      for (int i = 0; i < 64; i++) counts[i] = 20'($urandom);
    end
    // Output register holds between edges while the selected counter changes.
    @(negedge rd_clk);
    rd_addr = 6'd7;
    @(posedge rd_clk);
    #1 counts[7] = counts[7] + 20'd1;
    #1 check(rd_count == counts[7] - 20'd1, "output held between edges");
    @(posedge rd_clk);
    #1 check(rd_count == counts[7], "new value after next edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
