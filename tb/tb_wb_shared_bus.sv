// tb_wb_shared_bus: two master models and four register-file slave models.
// Checks that every access reaches the slave its address maps to and no
// other, that read data returns to the right master, that the data channel
// wins when both masters start in the same clock, that a cycle is not
// interrupted, and that reserved addresses are acknowledged with zero.
`timescale 1ps/1fs
module tb_wb_shared_bus;
  import sdpll_pkg::*;
  logic clk = 0, rst_n = 1;
  wb_m2s_t m_i [N_MASTERS];
  wb_s2m_t m_o [N_MASTERS];
  wb_m2s_t s_o [N_SLAVES];
  wb_s2m_t s_i [N_SLAVES];
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;
  int hits [N_SLAVES];
  int both_first = 0;

  wb_shared_bus dut (.clk(clk), .rst_n(rst_n), .m_i(m_i), .m_o(m_o), .s_o(s_o), .s_i(s_i));

  wb_master_bfm bfm_d (.clk(clk), .m_o(m_i[0]), .s_i(m_o[0]));
  wb_master_bfm bfm_i (.clk(clk), .m_o(m_i[1]), .s_i(m_o[1]));

  // slave models: 16 words each, one-clock ack
  logic [31:0] regs [N_SLAVES][16];
  for (genvar g = 0; g < N_SLAVES; g++) begin : g_slv
    always_ff @(posedge clk) begin
      s_i[g].ack <= s_o[g].cyc && s_o[g].stb && !s_i[g].ack;
      s_i[g].dat <= regs[g][s_o[g].adr[5:2]] ^ 32'(g << 28);
      if (s_o[g].cyc && s_o[g].stb && !s_i[g].ack) begin
        hits[g] <= hits[g] + 1;
        if (s_o[g].we) regs[g][s_o[g].adr[5:2]] <= s_o[g].dat;
      end
    end
  end

  always #5000 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int slave_of(input logic [31:0] a);
    if (a < 32'h0100_0000) return 0;
    if (a[31:24] == 8'h95) return 1;
    if (a[31:24] == 8'h96) return 2;
    if (a[31:24] == 8'h97) return 3;
    return -1;
  endfunction

  localparam logic [31:0] BASES [4] = '{32'h0000_0000, 32'h9500_0000, 32'h9600_0000, 32'h9700_0000};

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] r, d, a;
    int cyc, h0 [N_SLAVES], sl;
    logic [31:0] shadow [N_SLAVES][16];
    for (int g = 0; g < N_SLAVES; g++) hits[g] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // routing: random writes from either master, each reaching one slave
    for (int i = 0; i < 200; i++) begin
      sl = $urandom_range(0, 3);
      a  = BASES[sl] + 32'($urandom_range(0, 15) * 4);
      if (sl == 0 && i % 2) a[23] = 1'b1;        // flash half of storage
      d  = $urandom;
      for (int g = 0; g < N_SLAVES; g++) h0[g] = hits[g];
      if (i % 2) bfm_i.write(a, d, cyc); else bfm_d.write(a, d, cyc);
      shadow[sl][a[5:2]] = d;
      @(negedge clk);
      for (int g = 0; g < N_SLAVES; g++)
        chk("slave hit count", 32'(hits[g] - h0[g]), (g == slave_of(a)) ? 1 : 0);
    end
    // read back through both masters
    for (int g = 0; g < N_SLAVES; g++)
      for (int w = 0; w < 16; w++) begin
        if ($urandom_range(0, 1)) bfm_d.read(BASES[g] + 32'(w * 4), r, cyc);
        else                      bfm_i.read(BASES[g] + 32'(w * 4), r, cyc);
        if (shadow[g][w] !== 32'bx) chk("read data", r, regs[g][w] ^ 32'(g << 28));
      end
    // reserved space
    bfm_d.read(32'h1234_5678, r, cyc);
    chk("reserved data", r, 0);
    chk("reserved ack", 32'(cyc), 1);
    // contention: both masters start together; data channel must finish first
    for (int i = 0; i < 20; i++) begin
      int cd, ci;
      logic [31:0] rd, ri;
      fork
        bfm_d.read(BASES[1] + 32'h4, rd, cd);
        bfm_i.read(BASES[3] + 32'h8, ri, ci);
      join
      chk("data channel first", 32'(cd < ci), 1);
      chk("data channel read", rd, regs[1][1] ^ 32'(1 << 28));
      chk("instruction channel read", ri, regs[3][2] ^ 32'(3 << 28));
      if (cd < ci) both_first++;
    end
    $display("contended accesses won by data channel: %0d", both_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
