// wb_shared_bus: WISHBONE shared-bus interconnect of the MIMO-SDPLL platform.
//
// Two masters (0: CPU data channel, 1: CPU instruction channel) share one bus
// to four slaves (storage, PLL A, SACA, PLL B). The arbiter picks the master
// (data channel first) and holds it for the whole bus cycle; the address
// comparator decodes the granted master's address and forwards STB/CYC to
// the one selected slave only. Address, data, SEL and WE are broadcast to all
// slaves. The selected slave's ACK and read data return to the granted
// master; the other master sees no ACK and waits.
//
// Timing: no registers in the request or response paths, so a slave that
// acks one clock after STB gives the two-edge single read/write of the
// WISHBONE classic cycle. A cycle to reserved space is acknowledged by the
// interconnect itself one clock later with zero read data, so a stray access
// cannot hang the CPU; the platform does not say what happens there, so this
// is this design's own choice.
`timescale 1ps/1fs
module wb_shared_bus
  import sdpll_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  wb_m2s_t m_i [N_MASTERS],
  output wb_s2m_t m_o [N_MASTERS],
  output wb_m2s_t s_o [N_SLAVES],
  input  wb_s2m_t s_i [N_SLAVES]
);

  logic [1:0]          gnt;
  wb_m2s_t             req;
  slave_e              slave;
  logic [N_SLAVES-1:0] ssel;
  logic                none_ack_q;
  wb_s2m_t             rsp;

  wb_arbiter u_arb (
    .clk   (clk),
    .rst_n (rst_n),
    .cyc_i ({m_i[1].cyc, m_i[0].cyc}),
    .gnt_o (gnt)
  );

  always_comb begin
    unique case (gnt)
      2'b01:   req = m_i[0];
      2'b10:   req = m_i[1];
      default: req = WB_M2S_IDLE;
    endcase
  end

  wb_addr_decoder u_dec (
    .adr_i   (req.adr),
    .slave_o (slave),
    .sel_o   (ssel)
  );

  always_comb begin
    for (int s = 0; s < N_SLAVES; s++) begin
      s_o[s]     = req;
      s_o[s].stb = req.stb & ssel[s];
      s_o[s].cyc = req.cyc & ssel[s];
    end
  end

  // Default slave for reserved addresses.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) none_ack_q <= 1'b0;
    else        none_ack_q <= req.cyc && req.stb && (slave == SLV_NONE) && !none_ack_q;
  end

  always_comb begin
    rsp = WB_S2M_IDLE;
    for (int s = 0; s < N_SLAVES; s++)
      if (ssel[s]) rsp = s_i[s];
    if (slave == SLV_NONE) rsp.ack = none_ack_q;
  end

  always_comb begin
    for (int m = 0; m < N_MASTERS; m++) begin
      m_o[m]     = rsp;
      m_o[m].ack = rsp.ack & gnt[m];
    end
  end

endmodule
