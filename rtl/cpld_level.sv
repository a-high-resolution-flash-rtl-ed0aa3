// cpld_level: one level of a sampling offset TDC as built in a programmable logic
// device, the single-level prototype that preceded the custom chip.
//
// The leftmost flip-flop is the measuring element: on the rising edge of
// phi_clock it samples phi_data, giving 1 when the data edge came first (earlier
// by more than the flip-flop's own offset). Two further flip-flops on phi_clock
// lower the chance that a metastable sample reaches the counter, and the 20-bit
// counter, also clocked by phi_clock, counts the clock edges on which the third
// flip-flop holds 1. After N reference cycles, count_out / N estimates the
// probability that the data edge precedes the clock edge, the quantity that is
// fitted to a Gaussian cdf during calibration.
//
// Timing: a 1 sampled at clock edge k is counted at edge k+3. rst_n (asynchronous,
// active low) clears the flip-flops and the counter; it is this design's
// addition. The structure (3 flip-flops, 20-bit counter, common clock) follows the
// document.
`timescale 1ps / 1fs
module cpld_level #(
  parameter int unsigned COUNT_W = 20
) (
  input  logic               phi_data,
  input  logic               phi_clock,
  input  logic               rst_n,
  output logic [COUNT_W-1:0] count_out
);

  logic enable;

  sync_chain #(.STAGES(3)) u_ffs (
    .clk  (phi_clock),
    .rst_n(rst_n),
    .d    (phi_data),
    .q    (enable)
  );

  binary_counter #(.WIDTH(COUNT_W)) u_counter (
    .clk      (phi_clock),
    .rst_n    (rst_n),
    .en       (enable),
    .count_out(count_out)
  );

endmodule
