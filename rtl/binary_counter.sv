// binary_counter: WIDTH-bit up counter with count enable.
//
// Counts the rising clock edges on which en is high; wraps to 0 after 2^WIDTH - 1.
// It is the 20-bit counter of the single-level prototype built in a programmable
// logic device, where a plain binary counter was used; the fabricated converter
// replaces it by an LFSR. rst_n (asynchronous, active low) clears the count; the
// reset and the wrap-around are this design's choice.
`timescale 1ps / 1fs
module binary_counter #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count_out <= '0;
    else if (en) count_out <= count_out + WIDTH'(1);
  end

endmodule
