// tb_pfd: drives reference and divided edges with known offsets and checks
// the error pulse width, which of UP and DN fired, and the lead flag.
`timescale 1ps/1fs
module tb_pfd;
  logic refc = 0, divc = 0, rst_n = 1;
  logic up, dn, err, lead;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;
  realtime t_r, t_f;

  pfd dut (.ref_i(refc), .div_i(divc), .rst_n(rst_n), .up_o(up), .dn_o(dn),
           .err_o(err), .lead_o(lead));

  always @(posedge err) t_r = $realtime;
  always @(negedge err) t_f = $realtime;

  // one comparison: offset > 0 means the divided edge comes later (lag)
  task automatic cmp(input real offset_ps);
    real w;
    #10000;
    if (offset_ps >= 0) begin
      refc = 1; #(offset_ps / 2.0);
      checks++;
      if (!up || dn) begin failures++; $display("offset %f: UP/DN %b%b mid-pulse", offset_ps, up, dn); end
      #(offset_ps / 2.0); divc = 1;
    end else begin
      divc = 1; #(-offset_ps / 2.0);
      checks++;
      if (up || !dn) begin failures++; $display("offset %f: UP/DN %b%b mid-pulse", offset_ps, up, dn); end
      #(-offset_ps / 2.0); refc = 1;
    end
    #1000; refc = 0; divc = 0;
    w = t_f - t_r;
    checks += 2;
    if (w < (offset_ps < 0 ? -offset_ps : offset_ps) - 0.001 ||
        w > (offset_ps < 0 ? -offset_ps : offset_ps) + 0.001) begin
      failures++; $display("offset %f: pulse %f", offset_ps, w);
    end
    if (lead !== (offset_ps < 0)) begin
      failures++; $display("offset %f: lead=%b", offset_ps, lead);
    end
    checks++;
    if (up || dn) begin failures++; $display("flags not cleared"); end
  endtask

  initial begin
    #1000 rst_n = 1;
    cmp(250.0);
    cmp(-45.0);
    cmp(1234.567);
    cmp(-3000.0);
    for (int i = 0; i < 50; i++) cmp(real'($urandom_range(1, 20000)) * (i % 2 ? 1.0 : -1.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
