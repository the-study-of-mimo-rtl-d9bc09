// tb_wb_storage: memory writes with byte selects and read-back against a
// reference array, flash loaded through the programming port and read over
// the bus, bus writes to flash dropped, and the one-clock acknowledge.
`timescale 1ps/1fs
module tb_wb_storage;
  import sdpll_pkg::*;
  logic clk = 0, rst_n = 1;
  wb_m2s_t m;
  wb_s2m_t s;
  logic prog_we = 0;
  logic [31:0] prog_adr = 0, prog_dat = 0;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [64];
  logic [31:0] ref_fl [64];

  // small arrays keep the test quick; the map split is the same
  wb_storage #(.MEM_WORDS(64), .FLASH_WORDS(64)) dut (
    .clk(clk), .rst_n(rst_n), .wb_i(m), .wb_o(s),
    .prog_we_i(prog_we), .prog_adr_i(prog_adr), .prog_dat_i(prog_dat));

  wb_master_bfm bfm (.clk(clk), .m_o(m), .s_i(s));

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d, r;
    logic [3:0]  sel;
    int cyc, a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill memory and flash
    for (int i = 0; i < 64; i++) begin
      d = $urandom;
      bfm.write(32'(i * 4), d, cyc);
      ref_mem[i] = d;
      chk("write ack cycles", 32'(cyc), 1);
      @(negedge clk);
      prog_we = 1; prog_adr = 32'(i); prog_dat = ~d ^ 32'(i); ref_fl[i] = ~d ^ 32'(i);
      @(negedge clk);
      prog_we = 0;
    end
    // byte-select writes
    for (int i = 0; i < 100; i++) begin
      a = $urandom_range(0, 63);
      d = $urandom;
      sel = 4'($urandom);
      bfm.access(1'b1, 32'(a * 4), d, sel, r, cyc);
      for (int b = 0; b < 4; b++) if (sel[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    end
    for (int i = 0; i < 64; i++) begin
      bfm.read(32'(i * 4), r, cyc);
      chk("memory read", r, ref_mem[i]);
      chk("read ack cycles", 32'(cyc), 1);
      bfm.read(FLASH_BASE + 32'(i * 4), r, cyc);
      chk("flash read", r, ref_fl[i]);
    end
    // bus writes to flash are dropped
    bfm.write(FLASH_BASE + 32'h10, 32'hDEAD_BEEF, cyc);
    bfm.read(FLASH_BASE + 32'h10, r, cyc);
    chk("flash write dropped", r, ref_fl[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
