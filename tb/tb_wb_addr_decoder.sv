// tb_wb_addr_decoder: memory-map boundaries and random addresses against an
// independent table of the map.
`timescale 1ps/1fs
module tb_wb_addr_decoder;
  import sdpll_pkg::*;
  logic [31:0] adr;
  slave_e      slave;
  logic [3:0]  sel;
  int checks = 0, failures = 0;

  wb_addr_decoder dut (.adr_i(adr), .slave_o(slave), .sel_o(sel));

  function automatic int expect_slave(input logic [31:0] a);
    // 0 storage, 1 PLL A, 2 SACA, 3 PLL B, 4 none
    if (a <= 32'h00FF_FFFF) return 0;
    if (a[31:24] == 8'h95) return 1;
    if (a[31:24] == 8'h96) return 2;
    if (a[31:24] == 8'h97) return 3;
    return 4;
  endfunction

  task automatic check(input logic [31:0] a);
    int e;
    adr = a;
    #1;
    e = expect_slave(a);
    checks++;
    if (int'(slave) != e || (e < 4 ? sel != 4'(1 << e) : sel != 0)) begin
      failures++;
      $display("adr=%h slave=%0d sel=%b expected %0d", a, slave, sel, e);
    end
  endtask

  initial begin
    logic [31:0] edges [] = '{32'h0, 32'h007F_FFFC, 32'h0080_0000, 32'h00FF_FFFC, 32'h0100_0000,
                              32'h94FF_FFFC, 32'h9500_0000, 32'h95FF_FFFC, 32'h9600_0000,
                              32'h96FF_FFFC, 32'h9700_0000, 32'h97FF_FFFC, 32'h9800_0000,
                              32'hFFFF_FFFC};
    foreach (edges[i]) check(edges[i]);
    for (int i = 0; i < 3000; i++) begin
      automatic logic [31:0] a = $urandom;
      if (i % 3 == 0) a[31:24] = 8'h94 + 8'($urandom_range(0, 4));
      if (i % 7 == 0) a[31:24] = 8'h00;
      check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
