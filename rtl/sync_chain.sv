// sync_chain: STAGES D flip-flops in series on one clock.
//
// Each converter level passes the arbiter decision through three flip-flops
// clocked by phi_FF before it may enable the counter, so that a metastable
// first sample has two more clock periods to resolve. In the CPLD version of a
// level the first flip-flop of the chain is itself the time-comparing element
// (it samples phi_data on the rising edge of phi_clock).
//
// Interface: d is sampled on every rising edge of clk; q is d delayed by STAGES
// rising edges. rst_n (asynchronous, active low) clears all stages; the reset is
// this design's addition, the document does not describe one.
`timescale 1ps / 1fs
module sync_chain #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else        stage <= {stage[STAGES-2:0], d};
  end

  assign q = stage[STAGES-1];

endmodule
