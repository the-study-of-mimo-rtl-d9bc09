// tb_pll_module: the PLL peripheral through its bus port.
// Checks register write/read and the one-clock acknowledge; a reference
// period measurement (TDC source REF) against floor(T_ref / 15 ps); a DCO
// period measurement against the DCO law T = 2173.913 ps + 10 fs * CTW;
// the divided clock period (N DCO periods); and signed phase errors in PFD
// mode against the edge times of the reference and divided clocks seen by
// the testbench, with the error flag set by a measurement and cleared by
// reading it.
`timescale 1ps/1fs
module tb_pll_module;
  import sdpll_pkg::*;
  localparam real TREF = 200000.0;   // 5 MHz reference
  logic clk = 0, rst_n = 1, refc = 0;
  wb_m2s_t m;
  wb_s2m_t s;
  logic dco_clk, div_clk, lead, lag;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0, n_lead = 0, n_lag = 0;
  realtime t_pulse, t_div_prev, t_div;
  longint exp_err;
  logic pulse_lead;

  pll_module dut (.clk(clk), .rst_n(rst_n), .wb_i(m), .wb_o(s), .ref_clk_i(refc),
                  .dco_clk_o(dco_clk), .div_clk_o(div_clk), .lead_o(lead), .lag_o(lag));

  wb_master_bfm bfm (.clk(clk), .m_o(m), .s_i(s));

  always #5000 clk = ~clk;
  always #(TREF / 2.0) refc = ~refc;

  // independent measurement of each PFD error pulse
  always @(posedge (lead | lag)) begin t_pulse = $realtime; pulse_lead = lead; end
  always @(negedge (lead | lag)) begin
    exp_err = longint'($floor(($realtime - t_pulse) / 15.0));
    if (pulse_lead) n_lead++; else begin n_lag++; exp_err = -exp_err; end
  end
  always @(posedge div_clk) begin t_div_prev = t_div; t_div = $realtime; end

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp, input longint tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++; $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input logic [2:0] r, input logic [31:0] d);
    int cyc;
    bfm.write(PLLA_BASE + 32'(r) * 4, d, cyc);
    chk("write ack cycles", cyc, 1, 0);
  endtask

  task automatic rd(input logic [2:0] r, output logic [31:0] d);
    int cyc;
    bfm.read(PLLA_BASE + 32'(r) * 4, d, cyc);
    chk("read ack cycles", cyc, 1, 0);
  endtask

  // wait for a fresh measurement, read it; the flag must then be clear
  // (a measurement started before a source switch may still be in flight,
  // so the first one after the discard is dropped too)
  task automatic measure(output longint v, input bit check_clear = 0);
    logic [31:0] st, e;
    rd(PLL_REG_ERR, e);
    for (int k = 0; k < 2; k++) begin
      do rd(PLL_REG_STATUS, st); while (!st[0]);
      rd(PLL_REG_ERR, e);
    end
    v = longint'($signed(e));
    if (check_clear) begin
      rd(PLL_REG_STATUS, st);
      chk("flag cleared by read", st[0], 0, 0);
    end
  endtask

  initial begin
    logic [31:0] d;
    longint v, v1;
    real tdco;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // registers
    wr(PLL_REG_DIVN, 10);
    wr(PLL_REG_CTW, 32'h0123_4567);
    rd(PLL_REG_DIVN, d);  chk("DIVN", d, 10, 0);
    rd(PLL_REG_CTW, d);   chk("CTW", d, 32'h0123_4567, 0);
    // reference period
    wr(PLL_REG_CTRL, {29'd0, TDC_SRC_REF, 1'b0});
    measure(v, 1);
    chk("reference period", v, longint'($floor(TREF / 15.0)), 0);
    // DCO period: T_ref / N = 20 ns -> CTW = (20000 - 2173.913) / 0.01
    wr(PLL_REG_CTW, 1782609);
    wr(PLL_REG_CTRL, {29'd0, TDC_SRC_DCO, 1'b1});
    tdco = 2173.913 + 0.01 * 1782609.0;
    measure(v);
    chk("DCO period", v, longint'($floor(tdco / 15.0)), 0);
    // divided clock is N DCO periods
    repeat (3) @(posedge div_clk);
    #1;
    checks++;
    if ((t_div - t_div_prev) < 10.0 * tdco - 0.1 || (t_div - t_div_prev) > 10.0 * tdco + 0.1) begin
      failures++; $display("divided period %f", t_div - t_div_prev);
    end
    // phase errors
    wr(PLL_REG_CTRL, {29'd0, TDC_SRC_PFD, 1'b1});
    for (int i = 0; i < 6; i++) begin
      measure(v);
      chk("phase error (locked frequency)", v, exp_err, 1);
    end
    // DCO 3 % fast: the divided clock gains about 6 ns per reference
    // period, so the error moves from lag through zero to lead
    wr(PLL_REG_CTW, 1782609 - 60000);
    measure(v1);
    for (int i = 0; i < 40; i++) begin
      measure(v);
      chk("phase error (fast DCO)", v, exp_err, 1);
    end
    checks++;
    if (n_lead == 0 || n_lag == 0) begin
      failures++; $display("lead %0d lag %0d: both signs expected", n_lead, n_lag);
    end
    $display("lead pulses %0d, lag pulses %0d", n_lead, n_lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
