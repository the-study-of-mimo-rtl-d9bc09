// sac_osc: semi-synchronous clocker, the gated selectable ring oscillator of
// SACA (behavioural model).
//
// This is a behavioural model, not synthesizable logic. The real clocker is a
// chain of AND-OR delay stages, a one-hot stage select b_0..b_k choosing
// where the ring closes, and a NAND gated by the window signal, followed by
// an output inverter. Its 64 settings span 1231 MHz to 103 MHz in steps of
// 140 ps of period. The model keeps those ports and numbers: the period of
// setting s is T0_PS + s * STEP_PS (812 ps for s = 0, 9632 ps for s = 63).
// While win_i is low the output rests low; when win_i rises, the first
// rising edge comes at once, so the clock starts in step with the trigger.
// After win_i falls, the current cycle completes (the low half is not cut),
// and the output then stays low. The stage is read at each edge.
`timescale 1ps/1fs
module sac_osc #(
  parameter int unsigned STAGE_W = 6,
  parameter int unsigned T0_PS   = 812,   // 1231 MHz
  parameter int unsigned STEP_PS = 140
) (
  input  logic               win_i,
  input  logic [STAGE_W-1:0] stage_i,
  output logic               clk_o
);

  real half_ps;

  initial clk_o = 1'b0;

  always begin
    if (!win_i) @(posedge win_i);
    half_ps = real'(T0_PS + STEP_PS * 32'(stage_i)) / 2.0;
    clk_o = 1'b1;
    #(half_ps);
    clk_o = 1'b0;
    #(half_ps);
  end

endmodule
