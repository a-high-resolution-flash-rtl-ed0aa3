// sotdc_readout: takes the level counters off chip one at a time.
//
// The fabricated converter has readout circuitry for its counters that is not
// described; this is the simplest such circuit: an addressed multiplexer with an
// output register. On every rising edge of rd_clk the counter selected by
// rd_addr is copied to rd_count, so a tester reads level a two rd_clk edges after
// it drives rd_addr = a (one to settle the address, one to register). The
// registered output keeps the pins stable while a counter is still counting.
// Addresses at or above LEVELS read 0. rst_n (asynchronous, active low) clears
// rd_count. Everything in this block is this design's choice.
`timescale 1ps / 1fs
module sotdc_readout #(
  parameter int unsigned LEVELS = 64,
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned ADDR_W = $clog2(LEVELS)
) (
  input  logic              rd_clk,
  input  logic              rst_n,
  input  logic [CNT_W-1:0]  counts [LEVELS],
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [CNT_W-1:0]  rd_count
);

  logic [CNT_W-1:0] selected;

  always_comb begin
    selected = '0;
    if (32'(rd_addr) < LEVELS) selected = counts[rd_addr];
  end

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) rd_count <= '0;
    else        rd_count <= selected;
  end

endmodule
