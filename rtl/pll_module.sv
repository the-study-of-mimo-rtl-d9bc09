// pll_module: one PLL peripheral of the platform, an error detector and a
// DCO behind a WISHBONE slave port.
//
// The loop filter of an all-digital PLL is taken out of hardware and run as
// software on the CPU; what stays in hardware is split into an input part,
// the error detector (divider N, phase frequency detector, TDC), and an
// output part, the DCO. The CPU reads phase errors from the first and
// writes control words to the second.
//
// Error detector. The DCO clock is divided by N (freq_divider) and compared
// with the reference clock (pfd). The TDC measures one of three pulses,
// chosen by CTRL[2:1]:
//   TDC_SRC_PFD  the PFD error pulse: the result is the phase error, positive
//                when the divided clock leads the reference, negative when
//                it lags;
//   TDC_SRC_REF  the reference clock divided by two by a toggle register, so
//                a pulse of one whole reference period that does not depend on
//                its duty cycle: the result is T_ref in TDC steps (frequency
//                search);
//   TDC_SRC_DCO  the DCO clock extended the same way: T_dco in TDC steps, to
//                train the TDC-to-control-word relation.
// Each finished measurement is brought into the system clock domain through
// a three-flop toggle synchroniser, stored in ERR and raises the error flag
// (STATUS[0]). Reading ERR clears the flag; a measurement that finishes in
// that same clock wins over the clear.
//
// DCO. CTRL[0] enables it and CTW is its control word. DIVN sets N.
//
// Registers (word offsets, all 32 bits wide, reset to zero except DIVN = 1):
//   0 CTRL   [0] DCO enable, [2:1] TDC source
//   1 DIVN   [9:0] N
//   2 CTW    [CTW_W-1:0] DCO control word
//   3 STATUS [0] error flag, [1] sign of last PFD error (1 = lead),
//            [2] PFD UP, [3] PFD DN (both synchronised, for observation)
//   4 ERR    signed result of the last measurement (read clears the flag)
// Bus timing: every access is acknowledged one clock after STB with no wait
// states. The register layout, the flag clearing and the synchroniser are
// this design's own choices; the platform gives the blocks and their roles.
`timescale 1ps/1fs
module pll_module
  import sdpll_pkg::*;
#(
  parameter int unsigned N_W    = 10,
  parameter int unsigned CODE_W = 27,
  parameter int unsigned CTW_W  = 28
) (
  input  logic    clk,        // system clock (from SACA)
  input  logic    rst_n,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o,
  input  logic    ref_clk_i,  // reference clock
  output logic    dco_clk_o,  // DCO clock output
  output logic    div_clk_o,  // divided-by-N clock
  output logic    lead_o,     // PFD DN: divided clock leads
  output logic    lag_o       // PFD UP: divided clock lags
);

  logic             dco_en_q;
  tdc_src_e         src_q;
  logic [N_W-1:0]   divn_q;
  logic [CTW_W-1:0] ctw_q;
  logic             flag_q, sign_q;
  logic [31:0]      err_q;

  logic             up, dn, err_pulse, pfd_lead;
  logic             ref_ext_q, dco_ext_q, tdc_in;
  logic [CODE_W-1:0] code;
  logic             done;
  logic [2:0]       done_sync_q;
  logic [1:0]       up_sync_q, dn_sync_q;
  logic             meas_done, bus_hit, rd_err;

  // ---------------------------------------------------------------- DCO
  dco #(.CTW_W(CTW_W)) u_dco (
    .en_i  (dco_en_q),
    .ctw_i (ctw_q),
    .clk_o (dco_clk_o)
  );

  // ---------------------------------------------------------- error detector
  freq_divider #(.N_W(N_W)) u_div (
    .clk_i (dco_clk_o),
    .rst_n (rst_n),
    .n_i   (divn_q),
    .clk_o (div_clk_o)
  );

  pfd u_pfd (
    .ref_i  (ref_clk_i),
    .div_i  (div_clk_o),
    .rst_n  (rst_n),
    .up_o   (up),
    .dn_o   (dn),
    .err_o  (err_pulse),
    .lead_o (pfd_lead)
  );

  assign lead_o = dn;
  assign lag_o  = up;

  // Half-rate registers: their high phase lasts exactly one input period.
  always_ff @(posedge ref_clk_i or negedge rst_n)
    if (!rst_n) ref_ext_q <= 1'b0;
    else        ref_ext_q <= ~ref_ext_q;

  always_ff @(posedge dco_clk_o or negedge rst_n)
    if (!rst_n) dco_ext_q <= 1'b0;
    else        dco_ext_q <= ~dco_ext_q;

  always_comb begin
    unique case (src_q)
      TDC_SRC_REF: tdc_in = ref_ext_q;
      TDC_SRC_DCO: tdc_in = dco_ext_q;
      default:     tdc_in = err_pulse;
    endcase
  end

  tdc #(.CODE_W(CODE_W)) u_tdc (
    .in_i   (tdc_in),
    .rst_n  (rst_n),
    .code_o (code),
    .done_o (done)
  );

  // ------------------------------------------------------- clock crossing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_sync_q <= '0;
      up_sync_q   <= '0;
      dn_sync_q   <= '0;
    end else begin
      done_sync_q <= {done_sync_q[1:0], done};
      up_sync_q   <= {up_sync_q[0], up};
      dn_sync_q   <= {dn_sync_q[0], dn};
    end
  end

  assign meas_done = done_sync_q[2] ^ done_sync_q[1];

  // ------------------------------------------------------------ registers
  assign bus_hit = wb_i.cyc && wb_i.stb && !wb_o.ack;
  assign rd_err  = bus_hit && !wb_i.we && (wb_i.adr[4:2] == PLL_REG_ERR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dco_en_q <= 1'b0;
      src_q    <= TDC_SRC_PFD;
      divn_q   <= N_W'(1);
      ctw_q    <= '0;
      flag_q   <= 1'b0;
      sign_q   <= 1'b0;
      err_q    <= '0;
    end else begin
      if (bus_hit && wb_i.we) begin
        unique case (wb_i.adr[4:2])
          PLL_REG_CTRL: begin
            dco_en_q <= wb_i.dat[0];
            src_q    <= tdc_src_e'(wb_i.dat[2:1]);
          end
          PLL_REG_DIVN: divn_q <= wb_i.dat[N_W-1:0];
          PLL_REG_CTW:  ctw_q  <= wb_i.dat[CTW_W-1:0];
          default: ;
        endcase
      end
      if (rd_err) flag_q <= 1'b0;
      if (meas_done) begin
        flag_q <= 1'b1;
        if (src_q == TDC_SRC_PFD) begin
          sign_q <= pfd_lead;
          err_q  <= pfd_lead ? 32'(code) : -32'(code);
        end else begin
          err_q  <= 32'(code);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_o <= WB_S2M_IDLE;
    end else begin
      wb_o.ack <= bus_hit;
      unique case (wb_i.adr[4:2])
        PLL_REG_CTRL:   wb_o.dat <= {29'd0, src_q, dco_en_q};
        PLL_REG_DIVN:   wb_o.dat <= 32'(divn_q);
        PLL_REG_CTW:    wb_o.dat <= 32'(ctw_q);
        PLL_REG_STATUS: wb_o.dat <= {28'd0, dn_sync_q[1], up_sync_q[1], sign_q, flag_q};
        PLL_REG_ERR:    wb_o.dat <= err_q;
        default:        wb_o.dat <= '0;
      endcase
    end
  end

endmodule
