// tb_mimo_sdpll_top: the whole 2x2 platform, end to end, at its default size.
//
// A behavioural CPU stands on the two master ports: its instruction channel
// keeps fetching a program from flash (loaded through the programming port
// and checked word by word), and its data channel runs a simplified version
// of the tracking software for PLL A and then PLL B, with the reference
// clocks of the published evaluation (23333.333 ns and 25555.555 ns, N = 100):
//   - SACA is programmed to N_f = 3000 so each burst fits one reference period;
//   - frequency search: the TDC measures T_ref; the TDC-to-control-word
//     relation is trained from two control words; the control word for
//     T_ref / N is computed and set;
//   - watchdog: two successive phase errors that differ by more than two DCO
//     periods send the loop back to frequency search (PLL A's first search
//     deliberately trains the relation over too short a span, so this
//     happens once);
//   - coarse tracking: two errors give the frequency error; the control word
//     is corrected and, for one divided period, offset to cancel the phase
//     error, then restored, until |error| <= TDC_min (3 steps = 45 ps);
//   - fine tracking: period steps by a gain in the direction of the lead/lag
//     sign, a wait slot when the sign does not change, half-range step back
//     and halved gain when it does, down to one control-word LSB;
//   - maintain: small proportional-derivative corrections; an error above
//     2*TDC_min returns to coarse tracking.
// PLL B is started only once PLL A is in maintain; after that the CPU
// services both. The test counts every mechanism and fails if one never
// happens, and checks that both PLLs end locked: the last 30 errors of each
// within 2*TDC_min, and the divided clock period within 0.01 % of the
// reference period.
`timescale 1ps/1fs
module tb_mimo_sdpll_top;
  import sdpll_pkg::*;

  localparam real TREF_A = 23333333.0;   // ps
  localparam real TREF_B = 25555555.0;
  localparam int  N_DIV  = 100;
  localparam int  TDC_MIN = 3;           // 45 ps in 15 ps steps
  localparam int  PROG_WORDS = 256;

  logic rst_n = 1, refa = 0, refb = 0, sys_clk;
  wb_m2s_t dbus_m, ibus_m;
  wb_s2m_t dbus_s, ibus_s;
  logic [1:0] dco_clk, div_clk, lead, lag;
  logic prog_we = 0;
  logic [31:0] prog_adr = 0, prog_dat = 0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_freq_search = 0, n_k_train = 0, n_watchdog_bark = 0, n_coarse = 0, n_fine = 0;
  int n_wait_slot = 0, n_phase_change = 0, n_maintain = 0, n_err_flag = 0, n_timeout = 0;
  int n_contention = 0, n_fetch = 0, n_bursts = 0, n_b_waited = 0;
  bit maintain_reached [2];
  bit done = 0;
  longint last_err [2][$];

  initial #1 rst_n = 0;

  mimo_sdpll_top dut (
    .rst_n(rst_n), .ref_clk_a_i(refa), .ref_clk_b_i(refb), .sys_clk_o(sys_clk),
    .cpu_dbus_i(dbus_m), .cpu_dbus_o(dbus_s), .cpu_ibus_i(ibus_m), .cpu_ibus_o(ibus_s),
    .dco_clk_o(dco_clk), .div_clk_o(div_clk), .lead_o(lead), .lag_o(lag),
    .prog_we_i(prog_we), .prog_adr_i(prog_adr), .prog_dat_i(prog_dat));

  wb_master_bfm #(.TIMEOUT(100000)) bfm_d (.clk(sys_clk), .m_o(dbus_m), .s_i(dbus_s));
  wb_master_bfm #(.TIMEOUT(100000)) bfm_i (.clk(sys_clk), .m_o(ibus_m), .s_i(ibus_s));

  always #(TREF_A / 2.0) refa = ~refa;
  always #(TREF_B / 2.0) refb = ~refb;
  always @(posedge refa) n_bursts++;
  int n_dcyc = 0, n_icyc = 0;
  always @(posedge sys_clk) begin
    if (dbus_m.cyc && ibus_m.cyc) n_contention++;
    if (dbus_m.cyc) n_dcyc++;
    if (ibus_m.cyc) n_icyc++;
  end

  // watchdog
  initial begin
    #200_000_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ data channel
  semaphore bus = new(1);

  function automatic logic [31:0] pll_base(input int p);
    return p == 0 ? PLLA_BASE : PLLB_BASE;
  endfunction

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    int cyc;
    bus.get(1);
    bfm_d.write(a, d, cyc);
    bus.put(1);
    if (cyc < 0) chk("write acknowledged", 0);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    int cyc;
    bus.get(1);
    bfm_d.read(a, d, cyc);
    bus.put(1);
    if (cyc < 0) chk("read acknowledged", 0);
  endtask

  // poll the error flag; without a measurement for 2.5 reference periods the
  // error is taken as zero (edges closer than the detector can resolve)
  task automatic get_err(input int p, output longint e);
    logic [31:0] st, d;
    realtime t0;
    real tref;
    tref = (p == 0) ? TREF_A : TREF_B;
    t0 = $realtime;
    forever begin
      rd(pll_base(p) + 32'(PLL_REG_STATUS) * 4, st);
      if (st[0]) begin
        rd(pll_base(p) + 32'(PLL_REG_ERR) * 4, d);
        e = longint'($signed(d));
        n_err_flag++;
        return;
      end
      if ($realtime - t0 > 2.5 * tref) begin
        e = 0;
        n_timeout++;
        return;
      end
    end
  endtask

  task automatic set_ctw(input int p, input longint c);
    if (c < 0) c = 0;
    wr(pll_base(p) + 32'(PLL_REG_CTW) * 4, 32'(c));
  endtask

  function automatic longint sgn(input longint v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  function automatic longint labs(input longint v);
    return v < 0 ? -v : v;
  endfunction

  // the tracking software for one PLL
  task automatic track(input int p);
    typedef enum {FREQ, COARSE, FINE, MAINTAIN} state_e;
    state_e state;
    longint dref, s1, s2, e, e1, e2, eprev, base, gain, range, dir, prev_sgn;
    real lpc;                                   // control-word LSBs per TDC step
    longint c1, c2;
    bit wait_fin;
    int in_maintain;
    logic [31:0] b;
    b = pll_base(p);
    c1 = 0;
    // PLL A's first search trains over only 14 bits: too short a span for a
    // precise relation, so the watchdog should bark and the search repeat
    // over 24 bits
    c2 = (p == 0) ? (64'd1 << 14) - 1 : (64'd1 << 24) - 1;
    wr(b + 32'(PLL_REG_DIVN) * 4, N_DIV);
    state = FREQ;
    in_maintain = 0;
    forever begin
      case (state)
        FREQ: begin
          // reference period
          wr(b + 32'(PLL_REG_CTRL) * 4, {29'd0, TDC_SRC_REF, 1'b0});
          get_err(p, e); get_err(p, e); get_err(p, dref);
          // TDC / control-word relation from two control words, 8 samples each
          s1 = 0; s2 = 0;
          set_ctw(p, c1);
          wr(b + 32'(PLL_REG_CTRL) * 4, {29'd0, TDC_SRC_DCO, 1'b1});
          get_err(p, e); get_err(p, e);
          for (int i = 0; i < 8; i++) begin get_err(p, e); s1 += e; end
          set_ctw(p, c2);
          get_err(p, e); get_err(p, e);
          for (int i = 0; i < 8; i++) begin get_err(p, e); s2 += e; end
          n_k_train++;
          lpc  = real'(c2 - c1) * 8.0 / real'(s2 - s1);
          base = c1 + longint'((real'(dref) * 8.0 / real'(N_DIV) - real'(s1)) / 8.0 * lpc);
          set_ctw(p, base);
          wr(b + 32'(PLL_REG_CTRL) * 4, {29'd0, TDC_SRC_PFD, 1'b1});
          n_freq_search++;
          get_err(p, e); get_err(p, e1); get_err(p, e2);
          // watchdog: the error must not move by more than two DCO periods
          if (labs(e2 - e1) > 2 * dref / N_DIV) begin
            n_watchdog_bark++;
            c2 = (64'd1 << 24) - 1;
          end else state = COARSE;
        end
        COARSE: begin
          get_err(p, e1);
          get_err(p, e2);
          // divided clock gains (e2-e1) per reference period: lengthen the DCO
          base += longint'(real'(e2 - e1) * lpc / real'(N_DIV));
          // for one divided period, also stretch it by the remaining error
          set_ctw(p, base + longint'(real'(e2) * lpc / real'(N_DIV)));
          get_err(p, e);
          set_ctw(p, base);
          n_coarse++;
          get_err(p, e);
          if (labs(e) <= TDC_MIN) begin
            state = FINE;
            gain = longint'(real'(TDC_MIN) * lpc / real'(N_DIV));
            range = 0;
            wait_fin = 0;
            prev_sgn = sgn(e);
            dir = (e >= 0) ? 1 : -1;
            base += dir * gain; range += gain;
            set_ctw(p, base);
          end
        end
        FINE: begin
          get_err(p, e);
          n_fine++;
          if (labs(e) > 2 * TDC_MIN) begin
            state = COARSE;
          end else if (sgn(e) != prev_sgn && sgn(e) != 0) begin
            // phase changed: the target lies in the last range
            n_phase_change++;
            base -= dir * range / 2;
            gain /= 2;
            range = 0;
            prev_sgn = sgn(e);
            dir = (e >= 0) ? 1 : -1;
            set_ctw(p, base);
            if (gain < 1) begin state = MAINTAIN; eprev = e; end
          end else if (!wait_fin) begin
            wait_fin = 1;
            n_wait_slot++;
          end else begin
            wait_fin = 0;
            base += dir * gain; range += gain;
            set_ctw(p, base);
          end
        end
        MAINTAIN: begin
          if (!maintain_reached[p]) begin maintain_reached[p] = 1; n_maintain++; end
          get_err(p, e);
          last_err[p].push_back(e);
          if (last_err[p].size() > 30) void'(last_err[p].pop_front());
          in_maintain++;
          if (labs(e) > 2 * TDC_MIN) begin
            state = COARSE;
          end else begin
            base += sgn(e) + (e - eprev);
            eprev = e;
            set_ctw(p, base);
          end
          if (in_maintain >= 150) return;
        end
      endcase
    end
  endtask

  // ----------------------------------------------------- instruction channel
  function automatic logic [31:0] prog_word(input int i);
    return 32'h7426_0000 ^ (32'(i) * 32'h9E37_79B9);
  endfunction

  initial begin
    logic [31:0] d;
    int cyc, i;
    @(posedge rst_n);
    for (int k = 0; k < PROG_WORDS; k++) begin
      @(negedge sys_clk);
      prog_we = 1; prog_adr = 32'(k); prog_dat = prog_word(k);
    end
    @(negedge sys_clk) prog_we = 0;
    i = 0;
    while (!done) begin
      bfm_i.read(FLASH_BASE + 32'(i) * 4, d, cyc);
      n_fetch++;
      if (d != prog_word(i)) chk("instruction fetch data", 0);
      i = (i + 1) % PROG_WORDS;
      repeat ($urandom_range(1, 20)) @(negedge sys_clk);
    end
  end

  // ------------------------------------------------------------- the CPU
  initial begin
    logic [31:0] d;
    realtime t0, t1;
    #1000;
    rst_n = 1;
    repeat (PROG_WORDS + 10) @(negedge sys_clk);
    // memory and reserved space sanity
    wr(MEM_BASE + 32'h100, 32'hCAFE_0001);
    rd(MEM_BASE + 32'h100, d);
    chk("memory word", d == 32'hCAFE_0001);
    rd(32'h1000_0000, d);
    chk("reserved space reads zero", d == 0);
    wr(SACA_BASE + 32'(SACA_REG_NF) * 4, 3000);
    fork
      track(0);
      begin
        // B waits until A is in maintain (simple scheduling)
        while (!maintain_reached[0]) begin n_b_waited++; @(posedge refb); end
        track(1);
      end
    join
    done = 1;
    // lock quality
    for (int p = 0; p < 2; p++) begin
      longint worst = 0;
      foreach (last_err[p][k]) if (labs(last_err[p][k]) > worst) worst = labs(last_err[p][k]);
      $display("PLL %s: worst of last %0d errors = %0d TDC steps", p ? "B" : "A", last_err[p].size(), worst);
      chk("phase error within 2*TDC_min in maintain", worst <= 2 * TDC_MIN && last_err[p].size() == 30);
      @(posedge div_clk[p]); t0 = $realtime;
      @(posedge div_clk[p]); t1 = $realtime;
      $display("PLL %s: divided period %f ps", p ? "B" : "A", t1 - t0);
      chk("divided period equals reference period",
          (t1 - t0) > (p ? TREF_B : TREF_A) * 0.9999 && (t1 - t0) < (p ? TREF_B : TREF_A) * 1.0001);
    end
    rd(SACA_BASE + 32'(SACA_REG_STATUS) * 4, d);
    $display("SACA setting %0d", d[5:0]);
    $display("mechanisms: freq_search=%0d k_train=%0d watchdog_bark=%0d coarse=%0d fine=%0d wait_slot=%0d phase_change=%0d maintain=%0d err_flag=%0d no_error_timeouts=%0d bus_contention=%0d fetches=%0d bursts=%0d b_waited=%0d",
             n_freq_search, n_k_train, n_watchdog_bark, n_coarse, n_fine, n_wait_slot, n_phase_change,
             n_maintain, n_err_flag, n_timeout, n_contention, n_fetch, n_bursts, n_b_waited);
    chk("frequency search happened", n_freq_search >= 3);
    chk("relation training happened", n_k_train >= 3);
    chk("watchdog barked", n_watchdog_bark > 0);
    chk("coarse tracking happened", n_coarse > 0);
    chk("fine tracking happened", n_fine > 0);
    chk("wait slot happened", n_wait_slot > 0);
    chk("phase change happened", n_phase_change > 0);
    chk("both PLLs reached maintain", n_maintain == 2);
    chk("error flags raised", n_err_flag > 0);
    $display("data cycles %0d instruction cycles %0d", n_dcyc, n_icyc);
    chk("bus contention happened", n_contention > 0);
    chk("instruction fetches", n_fetch > 0);
    chk("B waited for A", n_b_waited > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
