// sotdc_arbiter: behavioural model (not synthesizable) of the transistor-level
// arbiter at the front of every converter level.
//
// The arbiter is a cross-coupled latch whose two discharge paths are gated by the
// inputs phi_1 (data) and phi_2 (reference); the input that rises first wins.
// Modelled in time: with dT = t(phi_2) - t(phi_1), the arbiter decides q = 1 when
//     dT + T_OS_PS + noise > 0,
// where T_OS_PS is the random mismatch offset of this particular arbiter and noise
// is Gaussian with standard deviation SIGMA_PS (thermal noise). q is therefore 1
// when the data edge arrives early enough against the reference edge, as in the
// transfer model P(q=1) = Phi((dT + t_os) / sigma).
//
// Timing: the decision appears on q / q_n T_RES_PS after the later of the two
// rising edges. The output is not held for the whole reference period: once either
// input falls, both latch nodes precharge and q = q_n = 0. This is why the
// following flip-flops are clocked by a separate phase phi_FF that must rise while
// both inputs are still high.
//
// Follows the document: the two-input arbiter, its polarity (data first gives
// q = 1), the offset-plus-Gaussian-noise model. This model's own choices: the
// resolve delay, decision only once both inputs are high, the release on a
// falling input, and the Gaussian approximation (sum of 12 uniform variates).
`timescale 1ps / 1fs
module sotdc_arbiter #(
  parameter real T_OS_PS  = 0.0,   // mismatch offset, ps
  parameter real SIGMA_PS = 0.35,  // thermal noise standard deviation, ps
  parameter real T_RES_PS = 100.0  // decision (resolve) delay, ps
) (
  input  logic phi_1,  // phi_data
  input  logic phi_2,  // phi_ref
  output logic q,
  output logic q_n
);

  realtime     t1;
  realtime     t2;
  int unsigned decision_id;

  initial begin
    t1          = 0.0;
    t2          = 0.0;
    decision_id = 0;
    q           = 1'b0;
    q_n         = 1'b0;
  end

  // Approximately standard-normal variate: sum of 12 uniforms on [0,1) minus 6.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  task automatic decide();
    real dt_eff;
    int unsigned my_id;
    logic win;
    dt_eff = (t2 - t1) + T_OS_PS + SIGMA_PS * gauss();
    win = (dt_eff > 0.0);
    decision_id++;
    my_id = decision_id;
    #(T_RES_PS);
    // A release that happened during the resolve time cancels the decision.
    if (my_id == decision_id && phi_1 && phi_2) begin
      q   = win;
      q_n = !win;
    end
  endtask

  always @(posedge phi_1) begin
    t1 = $realtime;
    if (phi_2) decide();
  end

  always @(posedge phi_2) begin
    t2 = $realtime;
    if (phi_1) decide();
  end

  always @(negedge phi_1 or negedge phi_2) begin
    decision_id++;
    q   = 1'b0;
    q_n = 1'b0;
  end

endmodule
