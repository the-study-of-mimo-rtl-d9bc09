// mimo_sdpll_top: the 2x2 MIMO software-defined PLL platform.
//
// A software-defined PLL keeps only the clock-facing parts of an all-digital
// PLL in hardware (divider, phase frequency detector, TDC, DCO) and runs the
// loop filter and tracking algorithm as software on a CPU. This top joins
// two such PLLs (A and B, each with its own reference clock) to the CPU over
// one shared WISHBONE bus, together with the storage (memory and program
// flash) and SACA, which makes the system clock as a burst of fast cycles
// after each reference edge.
//
// The CPU itself (a 32-bit RISC with separate data and instruction bus
// channels) is not part of this RTL: its two master channels are ports, and
// it must be clocked by sys_clk_o. The data channel has priority.
//
// Memory map (byte addresses):
//   0x0000_0000  memory (8 MB)       0x0080_0000  flash (8 MB)
//   0x0100_0000  reserved            0x9500_0000  PLL A registers
//   0x9600_0000  SACA registers      0x9700_0000  PLL B registers
// See pll_module and saca for the registers.
//
// SACA takes PLL A's reference clock; the platform does not say which of the
// two reference clocks it follows, so that is this design's choice. All bus
// logic runs on sys_clk_o and is reset asynchronously by rst_n.
`timescale 1ps/1fs
module mimo_sdpll_top
  import sdpll_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 2 ** 21,
  parameter int unsigned FLASH_WORDS = 2 ** 21,
  parameter int unsigned NF_RESET    = 4096
) (
  input  logic        rst_n,
  input  logic        ref_clk_a_i,
  input  logic        ref_clk_b_i,
  output logic        sys_clk_o,
  // CPU data channel (master 0) and instruction channel (master 1)
  input  wb_m2s_t     cpu_dbus_i,
  output wb_s2m_t     cpu_dbus_o,
  input  wb_m2s_t     cpu_ibus_i,
  output wb_s2m_t     cpu_ibus_o,
  // clock outputs and detector observation, index 0 = A, 1 = B
  output logic [1:0]  dco_clk_o,
  output logic [1:0]  div_clk_o,
  output logic [1:0]  lead_o,
  output logic [1:0]  lag_o,
  // flash programming port
  input  logic        prog_we_i,
  input  logic [31:0] prog_adr_i,
  input  logic [31:0] prog_dat_i
);

  wb_m2s_t m2s [N_MASTERS];
  wb_s2m_t s2m [N_MASTERS];
  wb_m2s_t s_req [N_SLAVES];
  wb_s2m_t s_rsp [N_SLAVES];

  assign m2s[0]     = cpu_dbus_i;
  assign m2s[1]     = cpu_ibus_i;
  assign cpu_dbus_o = s2m[0];
  assign cpu_ibus_o = s2m[1];

  wb_shared_bus u_bus (
    .clk   (sys_clk_o),
    .rst_n (rst_n),
    .m_i   (m2s),
    .m_o   (s2m),
    .s_o   (s_req),
    .s_i   (s_rsp)
  );

  wb_storage #(.MEM_WORDS(MEM_WORDS), .FLASH_WORDS(FLASH_WORDS)) u_storage (
    .clk        (sys_clk_o),
    .rst_n      (rst_n),
    .wb_i       (s_req[IDX_STORAGE]),
    .wb_o       (s_rsp[IDX_STORAGE]),
    .prog_we_i  (prog_we_i),
    .prog_adr_i (prog_adr_i),
    .prog_dat_i (prog_dat_i)
  );

  pll_module u_pll_a (
    .clk       (sys_clk_o),
    .rst_n     (rst_n),
    .wb_i      (s_req[IDX_PLL_A]),
    .wb_o      (s_rsp[IDX_PLL_A]),
    .ref_clk_i (ref_clk_a_i),
    .dco_clk_o (dco_clk_o[0]),
    .div_clk_o (div_clk_o[0]),
    .lead_o    (lead_o[0]),
    .lag_o     (lag_o[0])
  );

  pll_module u_pll_b (
    .clk       (sys_clk_o),
    .rst_n     (rst_n),
    .wb_i      (s_req[IDX_PLL_B]),
    .wb_o      (s_rsp[IDX_PLL_B]),
    .ref_clk_i (ref_clk_b_i),
    .dco_clk_o (dco_clk_o[1]),
    .div_clk_o (div_clk_o[1]),
    .lead_o    (lead_o[1]),
    .lag_o     (lag_o[1])
  );

  saca #(.NF_RESET(NF_RESET)) u_saca (
    .ref_clk_i (ref_clk_a_i),
    .rst_n     (rst_n),
    .clk_o     (sys_clk_o),
    .wb_i      (s_req[IDX_SACA]),
    .wb_o      (s_rsp[IDX_SACA])
  );

endmodule
