// tb_freq_divider: counts input clock edges between rising output edges for
// several N, including 1, 2, odd values and the maximum 1023.
`timescale 1ps/1fs
module tb_freq_divider;
  logic clk = 0, rst_n = 1, div;
  logic [9:0] n;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;
  int cnt = 0;

  freq_divider dut (.clk_i(clk), .rst_n(rst_n), .n_i(n), .clk_o(div));

  always #1000 clk = ~clk;
  always @(posedge clk) cnt++;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ns [] = '{1, 2, 3, 5, 100, 7, 1023, 4};
    int c0;
    n = 10'd1;
    #3500 rst_n = 1;
    foreach (ns[k]) begin
      n = 10'(ns[k]);
      // let the new ratio take effect
      repeat (3) @(posedge div);
      for (int r = 0; r < 3; r++) begin
        @(posedge div); c0 = cnt;
        @(posedge div);
        checks++;
        if (cnt - c0 != ns[k]) begin
          failures++;
          $display("N=%0d measured %0d", ns[k], cnt - c0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
