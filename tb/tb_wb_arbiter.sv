// tb_wb_arbiter: random request patterns against a reference model of the
// fixed-priority, hold-until-CYC-drops arbitration rule.
`timescale 1ps/1fs
module tb_wb_arbiter;
  logic clk = 0, rst_n = 1;
  logic [1:0] cyc, gnt, exp_q, exp_g;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0, holds = 0, conflicts = 0;

  wb_arbiter dut (.clk(clk), .rst_n(rst_n), .cyc_i(cyc), .gnt_o(gnt));

  always #5000 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] model(input logic [1:0] c, input logic [1:0] held);
    if ((held & c) != 0) return held;
    if (c[0]) return 2'b01;
    if (c[1]) return 2'b10;
    return 2'b00;
  endfunction

  initial begin
    cyc = 0; exp_q = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // keep CYC of a master for a few cycles, like a real bus cycle
      if ($urandom_range(0, 3) == 0) cyc = 2'($urandom);
      #1000;
      exp_g = model(cyc, exp_q);
      checks++;
      if (gnt !== exp_g) begin
        failures++;
        if (failures < 10) $display("cycle %0d cyc=%b gnt=%b expected %b", i, cyc, gnt, exp_g);
      end
      if (cyc == 2'b11) conflicts++;
      if (cyc == 2'b11 && exp_g == 2'b10) holds++;
      @(posedge clk);
      exp_q = exp_g;
    end
    // instruction channel holding the bus while data channel requests
    checks++;
    if (holds == 0 || conflicts == 0) failures++;
    $display("conflicts=%0d instruction-held=%0d", conflicts, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
