// sotdc_level: one level of the custom sampling offset flash TDC.
//
// The arbiter compares the rising edge of phi_data with that of phi_ref; its
// random mismatch offset, not a delay buffer, sets the time threshold of this
// level. Because the arbiter does not hold its decision for the whole reference
// period, three flip-flops clocked by a separate phase phi_FF (rising while
// phi_ref and phi_data are still high) capture and synchronize it, and the last
// one enables a 20-bit LFSR counter, also on phi_FF. Over N reference cycles the
// counter records how often the data edge beat the reference edge by more than
// -T_OS_PS.
//
// Timing: phi_FF must rise while phi_ref is high (asserted below). The
// decision of the reference cycle sampled by phi_FF edge k is
// counted at phi_FF edge k+3. rst_n (asynchronous, active low) clears the
// flip-flops and loads the LFSR seed; the document does not describe a reset.
// The arbiter is a behavioural model, so this module simulates but is not
// synthesizable as a whole; the flip-flops and the counter are.
// Follows the document: arbiter, three flip-flops, 20-bit LFSR counter, phi_FF.
// Only the arbiter's Q output is used, so its complement output arb_q_n stays
// unconnected.
`timescale 1ps / 1fs
module sotdc_level import sotdc_pkg::*; #(
  parameter real         T_OS_PS  = 0.0,
  parameter real         SIGMA_PS = SIGMA_FF_PS,
  parameter int unsigned CNT_W    = COUNT_W
) (
  input  logic             phi_data,
  input  logic             phi_ref,
  input  logic             phi_ff,
  input  logic             rst_n,
  output logic [CNT_W-1:0] count_out
);

  logic arb_q;
  logic arb_q_n;
  logic enable;

  sotdc_arbiter #(.T_OS_PS(T_OS_PS), .SIGMA_PS(SIGMA_PS)) u_arbiter (
    .phi_1(phi_data),
    .phi_2(phi_ref),
    .q    (arb_q),
    .q_n  (arb_q_n)
  );

  sync_chain #(.STAGES(SYNC_STAGES)) u_sync (
    .clk  (phi_ff),
    .rst_n(rst_n),
    .d    (arb_q),
    .q    (enable)
  );

  lfsr_counter #(
    .WIDTH(CNT_W),
    .TAP_A(LFSR_TAP_A),
    .TAP_B(LFSR_TAP_B),
    .SEED (CNT_W'(LFSR_SEED))
  ) u_counter (
    .clk      (phi_ff),
    .rst_n    (rst_n),
    .en       (enable),
    .count_out(count_out)
  );

  // Clocking rule: the arbiter releases its decision when phi_ref falls, so
  // phi_FF must rise while phi_ref is still high.
  a_phi_ff_inside_ref: assert property (@(posedge phi_ff) disable iff (!rst_n) phi_ref)
    else $error("sotdc_level: phi_ff rose while phi_ref was low");

endmodule
