// wb_addr_decoder: the address comparator of the shared bus.
//
// Compares a 32-bit byte address against the platform memory map and names
// the slave that owns it: 0x0000_0000-0x00FF_FFFF is the storage module
// (memory below 0x0080_0000, flash above), 0x9500_0000 PLL A,
// 0x9600_0000 SACA, 0x9700_0000 PLL B, each 16 MB. Everything else is
// reserved and decodes to SLV_NONE. Purely combinational.
`timescale 1ps/1fs
module wb_addr_decoder
  import sdpll_pkg::*;
(
  input  logic [31:0] adr_i,
  output slave_e      slave_o,
  output logic [N_SLAVES-1:0] sel_o   // one-hot slave select, zero for reserved space
);

  always_comb begin
    if (adr_i < RSVD_BASE)                             slave_o = SLV_STORAGE;
    else if (adr_i >= PLLA_BASE && adr_i < SACA_BASE)  slave_o = SLV_PLL_A;
    else if (adr_i >= SACA_BASE && adr_i < PLLB_BASE)  slave_o = SLV_SACA;
    else if (adr_i >= PLLB_BASE && adr_i < MAP_TOP)    slave_o = SLV_PLL_B;
    else                                               slave_o = SLV_NONE;
  end

  always_comb begin
    sel_o = '0;
    if (slave_o != SLV_NONE) sel_o[slave_o[1:0]] = 1'b1;
  end

endmodule
