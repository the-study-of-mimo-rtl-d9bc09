// tb_saca_example: the system clock generator on its worked example, a
// 30 MHz reference with N_f = 4, where the wanted clock is 4 x 30 = 120 MHz.
// Worked out here without the block: the reference period 33333.333 ps is
// 2222 TDC steps of 15 ps; Z = floor(2222 / 16) = 138, a target of
// 138 x 60 ps = 8280 ps; the nearest oscillator setting is 53 (8232 ps,
// 121.5 MHz; setting 54 would be 8372 ps). The bench checks those register
// values, the clock period, that every burst has exactly four rising edges
// starting at the reference edge, that the burst ends before the next
// reference edge, and that the clock is within 2 % of N_f x f_ref.
// N_f is reset to 4 through the block's parameter so the example runs from
// reset.
`timescale 1ps/1fs
module tb_saca_example;
  import sdpll_pkg::*;
  localparam real TREF = 100000000.0 / 3000.0;   // 33333.333 ps, 30 MHz
  localparam int  NF = 4;
  logic refc = 0, rst_n = 1, clk;
  wb_m2s_t m;
  wb_s2m_t s;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;
  int edges = 0, last_burst = 0, bursts = 0;
  realtime t_ref, t_first, t_last, t_prev, period;
  bit first_pending = 0;

  saca #(.NF_RESET(NF)) dut (.ref_clk_i(refc), .rst_n(rst_n), .clk_o(clk), .wb_i(m), .wb_o(s));
  wb_master_bfm bfm (.clk(clk), .m_o(m), .s_i(s));

  always #(TREF / 2.0) refc = ~refc;

  always @(posedge refc) begin
    last_burst = edges;
    edges = 0;
    bursts++;
    t_ref = $realtime;
    first_pending = 1;
  end
  always @(posedge clk) begin
    if (first_pending) begin t_first = $realtime; first_pending = 0; end
    period = $realtime - t_prev;
    t_prev = $realtime;
    t_last = $realtime;
    edges++;
  end

  initial begin
    #100_000_000;
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

  initial begin
    logic [31:0] d;
    int cyc;
    #1000;
    rst_n = 1;
    repeat (4) @(posedge refc);
    bfm.read(SACA_BASE + 32'(SACA_REG_NF) * 4, d, cyc);
    chk("N_f", d, NF, 0);
    bfm.read(SACA_BASE + 32'(SACA_REG_TCODE) * 4, d, cyc);
    chk("reference period code", d, 2222, 0);
    bfm.read(SACA_BASE + 32'(SACA_REG_Z) * 4, d, cyc);
    chk("Z", d, 138, 0);
    bfm.read(SACA_BASE + 32'(SACA_REG_STATUS) * 4, d, cyc);
    chk("valid", d[6], 1, 0);
    chk("setting", d[5:0], 53, 0);
    // several whole bursts at the final setting
    for (int b = 0; b < 5; b++) begin
      @(posedge refc);
      chk("edges per burst", last_burst, NF, 0);
      #1;
      @(posedge clk); @(posedge clk); #1;
      chk("clock period (fs)", longint'(period * 1000.0), 8232000, 2);
      chk("burst starts at reference edge (fs)", longint'((t_first - t_ref) * 1000.0), 0, 1);
      wait (edges == NF);
      #1;
      // the last rising edge plus one period ends the burst before the next
      // reference edge
      chk("burst fits in the reference period", (t_last + period < t_ref + TREF) ? 1 : 0, 1, 0);
    end
    // 121.5 MHz against the wanted 120 MHz
    chk("frequency within 2 % of N_f x f_ref (ppm)",
        longint'((TREF / (NF * period) - 1.0) * 1.0e6), 0, 20000);
    chk("bursts seen", bursts > 8 ? 1 : 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
