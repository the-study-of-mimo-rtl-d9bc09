// dco: digitally controlled oscillator (behavioural model).
//
// This is a behavioural model, not synthesizable logic: the real oscillator
// is a custom high-resolution, wide-range circuit. It follows the linear
// model T_dco = T_intr + k_DCO * CTW, with T_intr the intrinsic (shortest)
// period and k_DCO the period step per CTW LSB. The defaults give the
// platform's 460 MHz top frequency (T_intr = 2173.913 ps), its 10 fs
// resolution, and its 660 kHz bottom frequency, where the period is clamped
// (CTW above about 151.3 million). The control word is sampled at every
// edge of the output, so a new word changes the very next half period; the
// tracking algorithm relies on that to hold a corrected period for half a
// cycle. While en_i is low the output stays low; it starts with a rising
// edge T/2 after en_i rises. The real oscillator is not linear over its
// whole range and has several tuning stages; the model is one linear stage.
`timescale 1ps/1fs
module dco #(
  parameter int unsigned CTW_W     = 28,
  parameter longint      T_INTR_FS = 2173913,      // 460 MHz
  parameter longint      K_DCO_FS  = 10,           // 10 fs per LSB
  parameter longint      T_MAX_FS  = 1515151515    // 660 kHz
) (
  input  logic             en_i,
  input  logic [CTW_W-1:0] ctw_i,
  output logic             clk_o
);

  real half_ps;

  function automatic real period_ps(input logic [CTW_W-1:0] ctw);
    longint t;
    t = T_INTR_FS + K_DCO_FS * longint'(ctw);
    return real'((t > T_MAX_FS) ? T_MAX_FS : t) / 1000.0;
  endfunction

  initial clk_o = 1'b0;

  always begin
    if (!en_i) begin
      clk_o = 1'b0;
      @(posedge en_i);
    end
    half_ps = period_ps(ctw_i) / 2.0;
    #(half_ps);
    if (en_i) clk_o = ~clk_o;
  end

endmodule
