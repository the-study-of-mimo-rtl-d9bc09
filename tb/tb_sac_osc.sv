// tb_sac_osc: period of several settings (812 ps + 140 ps * s) and that the
// clock starts with the window and rests low outside it.
`timescale 1ps/1fs
module tb_sac_osc;
  logic win = 0;
  logic [5:0] stage;
  logic clk;
  int checks = 0, failures = 0, edges = 0;
  realtime t0, t1, tw;

  sac_osc dut (.win_i(win), .stage_i(stage), .clk_o(clk));

  always @(posedge clk) edges++;

  initial begin
    int ss [] = '{0, 1, 10, 32, 63};
    stage = 0;
    #1000;
    checks++;
    if (clk !== 1'b0 || edges != 0) failures++;
    foreach (ss[k]) begin
      stage = 6'(ss[k]);
      #1000;
      tw = $realtime;
      win = 1;
      @(posedge clk); t0 = $realtime;
      checks++;
      if (t0 - tw > 0.001) begin failures++; $display("late start %f", t0 - tw); end
      @(posedge clk); t1 = $realtime;
      checks++;
      if ((t1 - t0) < 812.0 + 140.0 * ss[k] - 0.01 || (t1 - t0) > 812.0 + 140.0 * ss[k] + 0.01) begin
        failures++; $display("stage %0d period %f", ss[k], t1 - t0);
      end
      win = 0;
      #20000;
      begin
        int e0;
        e0 = edges;
        #20000;
        checks++;
        if (edges != e0 || clk) begin failures++; $display("not stopped edges=%0d e0=%0d clk=%b t=%t", edges, e0, clk, $realtime); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
