// tb_dco: measures the output period for several control words against
// T = 2173.913 ps + 10 fs * CTW, the clamp at 660 kHz, and enable gating.
`timescale 1ps/1fs
module tb_dco;
  logic en = 0;
  logic [27:0] ctw;
  logic clk;
  int checks = 0, failures = 0;
  realtime t0, t1;

  dco dut (.en_i(en), .ctw_i(ctw), .clk_o(clk));

  task automatic meas(input logic [27:0] c, input real exp_ps);
    ctw = c;
    repeat (3) @(posedge clk);
    t0 = $realtime;
    @(posedge clk);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) < exp_ps - 0.002 || (t1 - t0) > exp_ps + 0.002) begin
      failures++; $display("ctw %0d period %f expected %f", c, t1 - t0, exp_ps);
    end
  endtask

  initial begin
    #5_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctw = 0;
    #100;
    checks++;
    if (clk) failures++;
    en = 1;
    meas(28'd0, 2173.913);
    meas(28'd1000, 2183.913);
    meas(28'd23114, 2405.053);
    meas(28'd12345678, 2173.913 + 123456.78);
    meas(28'd200000000, 1515151.515);
    for (int i = 0; i < 10; i++) begin
      automatic logic [27:0] c = 28'($urandom_range(0, 2000000));
      meas(c, 2173.913 + 0.01 * real'(c));
    end
    en = 0;
    #5_000_000;
    checks++;
    if (clk) begin failures++; $display("clock not stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
