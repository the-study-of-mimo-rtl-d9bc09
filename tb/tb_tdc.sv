// tb_tdc: pulses of known width against floor(width / 15 ps), saturation, and
// one done toggle per measurement.
`timescale 1ps/1fs
module tb_tdc;
  logic in = 0, rst_n = 1;
  logic [26:0] code;
  logic done, d0;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;

  tdc dut (.in_i(in), .rst_n(rst_n), .code_o(code), .done_o(done));

  task automatic pulse(input real w_ps, input longint exp_code);
    d0 = done;
    #1000 in = 1;
    #(w_ps) in = 0;
    #1;
    checks += 2;
    if (longint'(code) != exp_code) begin
      failures++; $display("width %f code %0d expected %0d", w_ps, code, exp_code);
    end
    if (done == d0) begin failures++; $display("no done toggle"); end
  endtask

  initial begin
    #100 rst_n = 1;
    pulse(15.0, 1);
    pulse(14.9, 0);
    pulse(1000.0, 66);
    pulse(23333333.0, 1555555);
    for (int i = 0; i < 40; i++) begin
      automatic int w = $urandom_range(1, 2000000);
      pulse(real'(w), longint'(w / 15));
    end
    pulse(2.1e9, (1 << 27) - 1);   // beyond the range: saturates
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
