// saca: modified semi-asynchronous clock access, the system clock generator.
//
// The CPU cannot run from the reference clock (too slow) nor from a DCO (not
// yet stable), so the system clock is a burst of N_f fast cycles that starts
// on each rising edge of the reference clock and then stops. The burst
// frequency is chosen so that N_f cycles roughly fill one reference period:
//   1. a toggle register turns the reference clock into a pulse one whole
//      period T long (clock re-generation);
//   2. a TDC measures T in 15 ps steps;
//   3. a divider computes Z = floor(T / (4*N_f)), the target clock period
//      T/N_f expressed in units of 4 TDC steps (60 ps);
//   4. an encoder maps Z to the nearest of the 64 settings of the clocker,
//      whose period is 812 ps + 140 ps * s;
//   5. a counter opens a window at the reference edge and closes it after
//      N_f rising edges of the output clock; the clocker (sac_osc) runs only
//      inside the window.
// Before the first measurement the slowest setting (63, about 103 MHz) is
// used, so the system never starts above its frequency limit.
//
// Clock domains. The window opens in the reference domain and closes in the
// output-clock domain; each side owns one toggle register and the window is
// their XOR. A reference edge that arrives while a burst is still running is
// ignored. The measured code, Z and the setting are quasi-static (they change
// once per two reference periods) and are used without further
// synchronisation; Z and the setting are combinational from them.
//
// Bus registers (adr[3:2]), clocked by the output clock itself, one-clock ack:
//   0 NF     [15:0] N_f, read/write, reset NF_RESET
//   1 STATUS [6] measurement valid, [5:0] clocker setting in use
//   2 TCODE  measured reference period in TDC steps
//   3 Z      Z
// The platform fixes the structure, the 64 settings and the 140 ps step, and
// states that N_f is user-defined and above 2048 in this design; the register
// layout, the reset value 4096 and the start-up setting are this design's
// own choices.
`timescale 1ps/1fs
module saca
  import sdpll_pkg::*;
#(
  parameter int unsigned CODE_W   = 27,
  parameter int unsigned NF_W     = 16,
  parameter int unsigned NF_RESET = 4096,
  parameter int unsigned STAGES   = 64,
  parameter int unsigned T0_PS    = 812,
  parameter int unsigned STEP_PS  = 140,
  parameter int unsigned TDC_PS   = 15
) (
  input  logic    ref_clk_i,
  input  logic    rst_n,
  output logic    clk_o,       // system clock
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o
);

  localparam int unsigned STAGE_W = $clog2(STAGES);

  logic [NF_W-1:0]    nf_q;
  logic               ref_ext_q;
  logic [CODE_W-1:0]  tcode;
  logic               tdone, tdone_seen_q, valid_q;
  logic [CODE_W-1:0]  z;
  logic [STAGE_W-1:0] stage;
  logic               start_q, stop_q, win;
  logic [NF_W-1:0]    cnt_q;
  logic               bus_hit;

  // 1. clock re-generation
  always_ff @(posedge ref_clk_i or negedge rst_n)
    if (!rst_n) ref_ext_q <= 1'b0;
    else        ref_ext_q <= ~ref_ext_q;

  // 2. TDC
  tdc #(.CODE_W(CODE_W), .RES_FS(TDC_PS * 1000)) u_tdc (
    .in_i   (ref_ext_q),
    .rst_n  (rst_n),
    .code_o (tcode),
    .done_o (tdone)
  );

  // The code is valid once the first measurement has finished.
  always_ff @(posedge ref_clk_i or negedge rst_n)
    if (!rst_n) begin
      tdone_seen_q <= 1'b0;
      valid_q      <= 1'b0;
    end else begin
      tdone_seen_q <= tdone;
      if (tdone_seen_q != tdone) valid_q <= 1'b1;
    end

  // 3. divider
  always_comb begin
    if (nf_q == '0) z = '0;
    else            z = tcode / CODE_W'({nf_q, 2'b00});
  end

  // 4. encoder: nearest setting to a period of 4*Z TDC steps
  always_comb begin
    longint unsigned p_ps, s;
    p_ps = longint'(z) * 4 * TDC_PS;
    if (!valid_q)                 s = STAGES - 1;
    else if (p_ps <= T0_PS)       s = 0;
    else                          s = (p_ps - T0_PS + STEP_PS / 2) / STEP_PS;
    if (s > STAGES - 1) s = STAGES - 1;
    stage = STAGE_W'(s);
  end

  // 5. window counter
  assign win = start_q ^ stop_q;

  always_ff @(posedge ref_clk_i or negedge rst_n)
    if (!rst_n)    start_q <= 1'b0;
    else if (!win) start_q <= ~start_q;

  always_ff @(posedge clk_o or negedge rst_n)
    if (!rst_n) begin
      cnt_q  <= '0;
      stop_q <= 1'b0;
    end else if (win) begin
      if (cnt_q >= nf_q - NF_W'(1)) begin
        cnt_q  <= '0;
        stop_q <= ~stop_q;
      end else begin
        cnt_q <= cnt_q + NF_W'(1);
      end
    end

  sac_osc #(.STAGE_W(STAGE_W), .T0_PS(T0_PS), .STEP_PS(STEP_PS)) u_ssc (
    .win_i   (win),
    .stage_i (stage),
    .clk_o   (clk_o)
  );

  // bus registers
  assign bus_hit = wb_i.cyc && wb_i.stb && !wb_o.ack;

  always_ff @(posedge clk_o or negedge rst_n) begin
    if (!rst_n) begin
      nf_q <= NF_W'(NF_RESET);
      wb_o <= WB_S2M_IDLE;
    end else begin
      if (bus_hit && wb_i.we && wb_i.adr[3:2] == SACA_REG_NF)
        nf_q <= (wb_i.dat[NF_W-1:0] == '0) ? NF_W'(1) : wb_i.dat[NF_W-1:0];
      wb_o.ack <= bus_hit;
      unique case (wb_i.adr[3:2])
        SACA_REG_NF:     wb_o.dat <= 32'(nf_q);
        SACA_REG_STATUS: wb_o.dat <= 32'({valid_q, stage});
        SACA_REG_TCODE:  wb_o.dat <= 32'(tcode);
        default:         wb_o.dat <= 32'(z);
      endcase
    end
  end

endmodule
