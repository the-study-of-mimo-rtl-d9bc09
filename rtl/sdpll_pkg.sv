// sdpll_pkg: types and constants shared by the MIMO-SDPLL platform.
//
// The platform joins a bus master (a 32-bit RISC CPU with separate data and
// instruction channels) to phase-locked-loop peripherals over a single shared
// WISHBONE bus. This package holds the WISHBONE request/response bundles, the
// system memory map (storage at the bottom of the address space, PLL A, SACA
// and PLL B at 16 MB windows from 0x9500_0000), and the register offsets of
// the peripherals. The memory map follows the platform's published map; the
// register offsets inside each window are this design's own choice.
`timescale 1ps/1fs
package sdpll_pkg;

  localparam int unsigned WB_AW = 32;
  localparam int unsigned WB_DW = 32;

  // Master-to-slave half of a WISHBONE classic bus cycle.
  typedef struct packed {
    logic [WB_AW-1:0] adr;
    logic [WB_DW-1:0] dat;
    logic [3:0]       sel;
    logic             we;
    logic             stb;
    logic             cyc;
  } wb_m2s_t;

  // Slave-to-master half.
  typedef struct packed {
    logic [WB_DW-1:0] dat;
    logic             ack;
  } wb_s2m_t;

  localparam wb_m2s_t WB_M2S_IDLE = '0;
  localparam wb_s2m_t WB_S2M_IDLE = '0;

  // Slaves on the shared bus, in the order of the bus' slave ports.
  typedef enum logic [2:0] {
    SLV_STORAGE = 3'd0,   // memory and flash
    SLV_PLL_A   = 3'd1,
    SLV_SACA    = 3'd2,
    SLV_PLL_B   = 3'd3,
    SLV_NONE    = 3'd4    // reserved space
  } slave_e;

  localparam int unsigned N_SLAVES  = 4;
  // Slave port indices of the same order.
  localparam int unsigned IDX_STORAGE = 0;
  localparam int unsigned IDX_PLL_A   = 1;
  localparam int unsigned IDX_SACA    = 2;
  localparam int unsigned IDX_PLL_B   = 3;
  localparam int unsigned N_MASTERS = 2;  // 0: data channel, 1: instruction channel

  // Memory map.
  localparam logic [31:0] MEM_BASE   = 32'h0000_0000;
  localparam logic [31:0] FLASH_BASE = 32'h0080_0000;
  localparam logic [31:0] RSVD_BASE  = 32'h0100_0000;
  localparam logic [31:0] PLLA_BASE  = 32'h9500_0000;
  localparam logic [31:0] SACA_BASE  = 32'h9600_0000;
  localparam logic [31:0] PLLB_BASE  = 32'h9700_0000;
  localparam logic [31:0] MAP_TOP    = 32'h9800_0000;

  // PLL module registers (word offsets inside the PLL window, adr[4:2]).
  localparam logic [2:0] PLL_REG_CTRL   = 3'd0;  // [0] DCO enable, [2:1] TDC source
  localparam logic [2:0] PLL_REG_DIVN   = 3'd1;  // divider ratio N, 1..1023
  localparam logic [2:0] PLL_REG_CTW    = 3'd2;  // DCO control tuning word
  localparam logic [2:0] PLL_REG_STATUS = 3'd3;  // [0] error flag, [1] last sign lead, [2] up, [3] dn
  localparam logic [2:0] PLL_REG_ERR    = 3'd4;  // signed TDC result; reading clears the flag

  // TDC input selection inside a PLL module.
  typedef enum logic [1:0] {
    TDC_SRC_PFD = 2'd0,  // PFD error pulse: phase error
    TDC_SRC_REF = 2'd1,  // reference clock extended to a full-period pulse
    TDC_SRC_DCO = 2'd2   // DCO clock extended to a full-period pulse
  } tdc_src_e;

  // SACA registers (adr[3:2]).
  localparam logic [1:0] SACA_REG_NF     = 2'd0;  // frequency multiplication factor N_f
  localparam logic [1:0] SACA_REG_STATUS = 2'd1;  // [6] valid, [5:0] selected stage
  localparam logic [1:0] SACA_REG_TCODE  = 2'd2;  // measured reference period, TDC codes
  localparam logic [1:0] SACA_REG_Z      = 2'd3;  // Z = floor(T / (4*N_f))

endpackage
