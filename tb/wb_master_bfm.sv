// wb_master_bfm: WISHBONE classic single-access master for testbenches.
//
// Drives requests and samples responses on the falling edge of clk, so the
// rising edge that the slave uses never races with the testbench. read() and
// write() each perform one single access and return the number of rising
// clock edges from the edge that first sees STB to the edge at which ACK is
// sampled by the master (1 for a zero-wait-state slave). A request that sees
// no ACK within TIMEOUT clocks is abandoned and reported with cycles = -1.
`timescale 1ps/1fs
module wb_master_bfm
  import sdpll_pkg::*;
#(
  parameter int TIMEOUT = 64
) (
  input  logic    clk,
  output wb_m2s_t m_o,
  input  wb_s2m_t s_i
);

  initial m_o = WB_M2S_IDLE;

  task automatic access(input logic we, input logic [31:0] adr, input logic [31:0] wdat,
                        input logic [3:0] sel, output logic [31:0] rdat, output int cycles);
    @(negedge clk);
    m_o.adr = adr;
    m_o.dat = wdat;
    m_o.sel = sel;
    m_o.we  = we;
    m_o.stb = 1'b1;
    m_o.cyc = 1'b1;
    cycles  = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!s_i.ack && cycles < TIMEOUT);
    rdat = s_i.dat;
    if (!s_i.ack) cycles = -1;
    m_o = WB_M2S_IDLE;
  endtask

  task automatic write(input logic [31:0] adr, input logic [31:0] wdat, output int cycles);
    logic [31:0] unused;
    access(1'b1, adr, wdat, 4'hF, unused, cycles);
  endtask

  task automatic read(input logic [31:0] adr, output logic [31:0] rdat, output int cycles);
    access(1'b0, adr, '0, 4'hF, rdat, cycles);
  endtask

endmodule
