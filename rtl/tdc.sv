// tdc: time-to-digital converter (behavioural model).
//
// This is a behavioural model, not synthesizable logic. The real converter
// is a process-specific circuit: a gated ring of delay cells whose tap
// states are latched and encoded, with a cascaded counter that counts how
// many times the input edge has gone round the ring; the encoder combines
// the two into a code. Its resolution is 15 ps. The model keeps the ports
// and the result of that circuit: while in_i is high the ring runs, and
// when in_i falls the code is the pulse width in units of RES_FS (15 ps by
// default), rounded down and saturated at 2^CODE_W-1. done_o toggles once
// per completed measurement, in the same time step in which code_o takes its
// new value, so a circuit in another clock domain can synchronise done_o and
// then read code_o, which stays stable until the next falling edge of in_i.
// A zero-width pulse gives no measurement.
`timescale 1ps/1fs
module tdc #(
  parameter int unsigned CODE_W = 27,       // 2^27 * 15 ps > 2 ms, the longest reference period
  parameter int unsigned RES_FS = 15000     // resolution in femtoseconds
) (
  input  logic              in_i,    // pulse to measure
  input  logic              rst_n,
  output logic [CODE_W-1:0] code_o,  // pulse width in resolution steps
  output logic              done_o   // toggles per measurement
);

  realtime t_rise;
  real     steps;

  initial begin
    t_rise = 0.0;
    code_o = '0;
    done_o = 1'b0;
  end

  always @(posedge in_i) t_rise = $realtime;

  always @(negedge in_i) begin
    if (rst_n && $realtime > t_rise) begin
      // $realtime is in ps; RES_FS is in fs.
      steps = ($realtime - t_rise) * 1000.0 / real'(RES_FS);
      if (steps >= real'(2.0 ** CODE_W - 1.0)) code_o <= '1;
      else                                      code_o <= CODE_W'(longint'($floor(steps)));
      done_o <= ~done_o;
    end
  end

endmodule
