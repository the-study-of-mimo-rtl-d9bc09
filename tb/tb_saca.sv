// tb_saca: the system clock generator with a 10 MHz reference.
// Checks the start-up setting (slowest, 9632 ps) before the first
// measurement; the measured reference period floor(T/15 ps); Z =
// floor(T/(4*N_f)); the chosen setting against an independent nearest-
// setting search; the resulting clock period 812 ps + 140 ps * setting; that
// each burst starts at the reference edge and has exactly N_f rising edges;
// and N_f written over the bus, which is itself clocked by the bursts.
`timescale 1ps/1fs
module tb_saca;
  import sdpll_pkg::*;
  localparam real TREF = 100000.0;
  logic refc = 0, rst_n = 1, clk;
  wb_m2s_t m;
  wb_s2m_t s;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous resets
  int checks = 0, failures = 0;
  int edges = 0, bursts = 0, last_burst = 0;
  realtime t_ref, t_first, t_prev, period;
  bit first_pending = 0;

  saca #(.NF_RESET(12)) dut (.ref_clk_i(refc), .rst_n(rst_n), .clk_o(clk), .wb_i(m), .wb_o(s));
  wb_master_bfm bfm (.clk(clk), .m_o(m), .s_i(s));

  always #(TREF / 2.0) refc = ~refc;

  // a burst starts on a reference edge; count its clock edges
  always @(posedge refc) begin
    if (first_pending) ;
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
    edges++;
  end

  initial begin
    #1_000_000_000;
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

  function automatic int nearest(input longint p_ps);
    int best = 0;
    for (int k = 1; k < 64; k++) begin
      longint dk = p_ps - (812 + 140 * k), db = p_ps - (812 + 140 * best);
      if ((dk < 0 ? -dk : dk) < (db < 0 ? -db : db)) best = k;
    end
    return best;
  endfunction

  task automatic check_nf(input int nf);
    logic [31:0] d;
    int cyc, z, st;
    bfm.write(SACA_BASE + 32'(SACA_REG_NF) * 4, 32'(nf), cyc);
    chk("ack cycles", cyc, 1, 0);
    bfm.read(SACA_BASE + 32'(SACA_REG_NF) * 4, d, cyc);
    chk("N_f read back", d, nf, 0);
    repeat (3) @(posedge refc);
    bfm.read(SACA_BASE + 32'(SACA_REG_TCODE) * 4, d, cyc);
    chk("reference period code", d, 6666, 0);
    bfm.read(SACA_BASE + 32'(SACA_REG_Z) * 4, d, cyc);
    z = 6666 / (4 * nf);
    chk("Z", d, z, 0);
    bfm.read(SACA_BASE + 32'(SACA_REG_STATUS) * 4, d, cyc);
    st = nearest(longint'(z) * 60);
    chk("valid", d[6], 1, 0);
    chk("setting", d[5:0], st, 0);
    // whole bursts at this setting
    repeat (2) @(posedge refc);
    @(posedge refc);
    chk("edges per burst", last_burst, nf, 0);
    #1;
    @(posedge clk); @(posedge clk); #1;
    chk("clock period (fs)", longint'(period * 1000.0), 1000 * (812 + 140 * st), 2);
    chk("burst starts at reference edge (fs)", longint'((t_first - t_ref) * 1000.0), 0, 1);
  endtask

  initial begin
    #1000;
    rst_n = 1;
    // start-up: slowest setting until the first measurement
    @(posedge clk); @(posedge clk); #1;
    chk("start-up period (fs)", longint'(period * 1000.0), 9632000, 2);
    check_nf(12);
    check_nf(8);
    check_nf(10);
    chk("bursts seen", bursts > 10, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
