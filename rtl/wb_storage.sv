// wb_storage: the storage slave, working memory plus program flash.
//
// One WISHBONE slave holds both: byte addresses below 0x0080_0000 are the
// memory, the next 8 MB the flash that keeps the CPU's program. Both are
// 32-bit word arrays (MEM_WORDS and FLASH_WORDS words, 8 MB each by default;
// the platform places both on the FPGA board). The memory is read and written
// by the bus with byte selects. The flash is read-only from the bus, writes
// are acknowledged and dropped; it is loaded through a separate programming
// port (prog_we_i, word address, data), standing in for the flash programmer.
// Addresses beyond a smaller array wrap. Each access is acknowledged one
// clock after STB, with the read data registered. The address split follows
// the memory map; the programming port and the write-drop rule are this
// design's own choices.
`timescale 1ps/1fs
module wb_storage
  import sdpll_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 2 ** 21,   // 8 MB
  parameter int unsigned FLASH_WORDS = 2 ** 21    // 8 MB
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wb_m2s_t     wb_i,
  output wb_s2m_t     wb_o,
  input  logic        prog_we_i,
  input  logic [31:0] prog_adr_i,   // flash word address
  input  logic [31:0] prog_dat_i
);

  localparam int unsigned MAW = $clog2(MEM_WORDS);
  localparam int unsigned FAW = $clog2(FLASH_WORDS);

  logic [31:0] mem   [MEM_WORDS];
  logic [31:0] flash [FLASH_WORDS];

  logic           bus_hit, is_flash;
  logic [MAW-1:0] madr;
  logic [FAW-1:0] fadr;

  assign bus_hit  = wb_i.cyc && wb_i.stb && !wb_o.ack;
  assign is_flash = wb_i.adr[23];
  assign madr     = wb_i.adr[MAW+1:2];
  assign fadr     = wb_i.adr[FAW+1:2];

  always_ff @(posedge clk) begin
    if (bus_hit && wb_i.we && !is_flash)
      for (int b = 0; b < 4; b++)
        if (wb_i.sel[b]) mem[madr][8*b +: 8] <= wb_i.dat[8*b +: 8];
    if (prog_we_i) flash[prog_adr_i[FAW-1:0]] <= prog_dat_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_o <= WB_S2M_IDLE;
    end else begin
      wb_o.ack <= bus_hit;
      wb_o.dat <= is_flash ? flash[fadr] : mem[madr];
    end
  end

endmodule
