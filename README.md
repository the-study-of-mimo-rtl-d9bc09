# 2x2 MIMO software-defined PLL platform

An all-digital PLL usually hard-wires its loop filter, the logic between the
time-to-digital converter (TDC) and the digitally controlled oscillator (DCO)
that turns measured phase errors into control words. Changing how the loop
acquires frequency, tracks phase or shares resources then means redesigning
silicon. This platform moves that logic into software. A small 32-bit RISC
CPU sits on a WISHBONE bus. It reads phase errors from error-detector
peripherals and writes control words to DCO peripherals. Anything that
would be a loop filter is a C program in flash. One CPU serves several PLLs
by scheduling them. This RTL is the two-PLL (2x2) configuration: two
reference clocks in, two locked DCO clocks out.

```
           ref A ──► ┌────────────┐ DCO A          ref B ──► ┌────────────┐ DCO B
                     │ pll_module │───►                      │ pll_module │───►
                     │  ÷N PFD TDC│                          │  ÷N PFD TDC│
                     │     DCO    │                          │     DCO    │
                     └─────┬──────┘                          └─────┬──────┘
                           │            WISHBONE shared bus        │
   CPU data ch. ─►═══╤═════╧══════════╤═════════════╤══════════════╧═══
   CPU instr ch. ─►  │ (arbiter,      │             │
                     │  address comp.)│             │
               ┌─────┴─────┐    ┌─────┴─────┐  ┌────┴────┐
               │ wb_storage│    │   saca    │◄─┤ ref A   │
               │ mem+flash │    │ sys clock │  └─────────┘
               └───────────┘    └─────┬─────┘
                                      └──► sys_clk_o (CPU, bus, registers)
```

The CPU itself is not in this RTL. `mimo_sdpll_top` brings out its two
master channels as ports, and the CPU must be clocked by `sys_clk_o`.

## The PLL peripheral (`pll_module`)

A classic ADPLL is cut in two at the loop filter:

* **Error detector (input half).** `freq_divider` divides the DCO clock by
  N (1..1023). `pfd` compares the divided clock with the reference. The
  behavioural model `tdc` turns a pulse width into a count of 15 ps steps.
  A 2-bit source select picks the pulse the TDC measures:

  | source | pulse measured | use |
  |---|---|---|
  | `TDC_SRC_PFD` | PFD error pulse | signed phase error, positive when the divided clock **leads** |
  | `TDC_SRC_REF` | reference ÷2 by a register (high for exactly one period) | reference period, unaffected by duty cycle; used for frequency search |
  | `TDC_SRC_DCO` | DCO clock ÷2 the same way | DCO period, to train the TDC-to-control-word relation |

  Each finished measurement crosses into the system clock through a
  three-flop toggle synchroniser. It is stored in `ERR` and sets the error
  flag. Software polls the flag. Reading `ERR` clears it.
* **DCO (output half).** The behavioural model `dco` has period
  `T = 2173.913 ps + 10 fs × CTW`. That spans 460 MHz down to 660 kHz,
  where it clamps. It reads the control word at every edge, so a word can
  be held for only half a period. The coarse tracking step relies on this.

Registers (byte offset from the PLL base; PLL A at `0x9500_0000`, PLL B at
`0x9700_0000`):

| offset | name | bits |
|---|---|---|
| 0x00 | CTRL | [0] DCO enable, [2:1] TDC source |
| 0x04 | DIVN | [9:0] N (reset 1) |
| 0x08 | CTW | [27:0] DCO control word |
| 0x0C | STATUS | [0] error flag, [1] sign of last PFD error (1 = lead), [2] PFD UP, [3] PFD DN |
| 0x10 | ERR | signed 32-bit result of the last measurement; read clears the flag |

The PFD is the usual pair of flip-flops with a shared asynchronous clear. In
RTL the clear takes no time, so edges that coincide give no pulse and no
measurement. Software has to treat "no flag for more than two reference
periods" as zero error. The 200 ps minimum pulse and 45 ps dead zone of a
real detector are not modelled.

## The system clock (`saca`)

The reference clock is too slow to run software from, and a DCO that is
still being tuned is not a safe clock. SACA (semi-asynchronous clock
access) instead makes a burst of N_f fast cycles after every rising edge of
reference A, then stops the clock until the next edge. The burst frequency
is chosen so the burst nearly fills one reference period:

1. A toggle register stretches the reference to a pulse exactly one period
   T long. A TDC measures it in 15 ps steps.
2. `Z = floor(T / (4·N_f))` is the target clock period in units of 60 ps.
3. An encoder picks the nearest of the 64 settings of the gated ring
   oscillator `sac_osc`. Setting s has period `812 ps + 140 ps·s`
   (1231 MHz down to about 103 MHz).
4. A window opens at the reference edge, in the reference domain. It closes
   after N_f rising output edges, in the output domain. Each side owns one
   toggle register and the window is their XOR, so no signal crosses
   domains unsynchronised. A reference edge that arrives while a burst is
   still running is skipped. The clock rests low and each burst starts with
   a rising edge.

Until the first measurement has finished, the slowest setting is used.
N_f is a bus register, reset to 4096. Software sets it so that
`N_f × period` stays under one reference period. With a 23.33 µs reference,
N_f = 3000 gives setting 49: 7.67 ns, 130 MHz, and 23.0 µs per burst. The
reset value 4096 gives bursts slightly longer than the period at that
reference, so only every other edge starts a burst until software lowers
N_f.

A small case shows the arithmetic. A 30 MHz reference (33333 ps) measures
2222 steps. With N_f = 4, Z = floor(2222/16) = 138, a target of 8280 ps. The
nearest setting is 53, at 8232 ps. So each burst is four cycles at
121.5 MHz, against the 120 MHz asked for. `tb_saca_example` runs this case.

SACA registers at `0x9600_0000`: `0x0` NF, `0x4` STATUS ([6] measurement
valid, [5:0] setting), `0x8` measured period in TDC steps, `0xC` Z.

## Bus and memory map

`wb_shared_bus` is a WISHBONE classic shared bus with two masters (0 = CPU
data channel, 1 = CPU instruction channel) and four slaves:
- `wb_arbiter` gives the data channel priority and holds a grant until CYC
  drops.
- `wb_addr_decoder` routes by address.
- Only the selected slave sees STB/CYC.
- Only the granted master sees ACK.

Every slave acknowledges one clock after STB with no wait states. An access
to reserved space is acknowledged by the bus with zero data, so it cannot
hang the CPU.

| address | slave |
|---|---|
| `0x0000_0000`–`0x007F_FFFF` | memory, 8 MB, byte-writable |
| `0x0080_0000`–`0x00FF_FFFF` | flash, 8 MB, read-only from the bus; loaded through the `prog_*` port |
| `0x0100_0000`–`0x94FF_FFFF` | reserved |
| `0x9500_0000` | PLL A |
| `0x9600_0000` | SACA |
| `0x9700_0000` | PLL B |

Shared types (`wb_m2s_t`, `wb_s2m_t`, `slave_e`, register offsets) live in
`rtl/sdpll_pkg.sv`.

## How software closes the loop

The tracking algorithm is software, so no RTL implements it. The top-level
testbench's CPU model runs a simplified version over the bus, and it shows
what the hardware is built for:

1. **Frequency search.** Measure T_ref with `TDC_SRC_REF`. Train the
   relation between TDC steps and control-word LSBs: set two control words,
   measure the DCO period at each with `TDC_SRC_DCO`, and take the slope.
   Then set the word for `T_ref / N`.
2. **Watchdog.** If two successive phase errors differ by more than two DCO
   periods, the frequency is wrong, so search again.
3. **Coarse tracking.** Two successive errors give the frequency error.
   Correct the word for it. For one divided period, also offset the word to
   cancel the phase error, then restore it. Repeat until |error| ≤ TDC_min
   (3 steps, 45 ps).
4. **Fine tracking.** This is a binary search on the DCO period using only
   the lead/lag sign. Step the period by a gain in the direction that
   reduces the error. If the sign does not change, insert one wait slot,
   then step again. When the sign flips, step back by half the range covered
   and halve the gain. Finish when the gain falls below one LSB.
5. **Maintain.** Apply small corrections. An error above 2·TDC_min returns
   to coarse tracking.

PLL B starts only once PLL A is in maintain. After that the CPU polls both.
Every step must finish within one reference period of the PLL it serves.

## Files

| file | kind | what |
|---|---|---|
| `rtl/mimo_sdpll_top.sv` | RTL | the platform |
| `rtl/wb_shared_bus.sv`, `wb_arbiter.sv`, `wb_addr_decoder.sv` | RTL | interconnect |
| `rtl/pll_module.sv`, `freq_divider.sv`, `pfd.sv` | RTL | PLL peripheral |
| `rtl/saca.sv` | RTL | system clock generator (control part) |
| `rtl/wb_storage.sv` | RTL | memory and flash |
| `rtl/tdc.sv`, `rtl/dco.sv`, `rtl/sac_osc.sv` | behavioural | delay-line and oscillator circuits, modelled with real-valued delays |
| `rtl/sdpll_pkg.sv` | package | types and constants |
| `tb/tb_<block>.sv` | testbench | one self-checking bench per block |
| `tb/tb_saca_example.sv` | testbench | SACA on a 30 MHz reference with N_f = 4 |
| `tb/wb_master_bfm.sv` | testbench helper | single-access WISHBONE master |

The three behavioural models stand in for circuits that exist only as
placed gates or custom cells: a gated ring of delay cells with a wrap
counter (TDC), the DCO, and the selectable ring oscillator. Each keeps the
real part's ports and its published numbers: 15 ps resolution,
460 MHz–660 kHz at 10 fs per LSB, and 64 settings 140 ps apart. None of
them synthesizes.

## Simulating

Every file starts with `` `timescale 1ps/1fs `` (the DCO needs femtosecond
precision). Compile the package first:

```
verilator --binary --timing --assert --top-module tb_mimo_sdpll_top \
    rtl/sdpll_pkg.sv $(ls rtl/*.sv | grep -v sdpll_pkg) tb/*.sv -o sim
obj_dir/sim
```

Replace the top module to run any other bench. Each prints
`TB_RESULT checks=N failures=M`. Drive a real falling edge on `rst_n`: the
resets are asynchronous, and a reset held low from time zero has no edge.

`tb_mimo_sdpll_top` runs the whole platform at its default sizes (8 MB
memory and flash). It uses the reference periods 23333.333 ns (A) and
25555.555 ns (B) with N = 100. It runs about 370 reference periods (8.6 ms
of simulated time) in roughly 10 s. It checks:
- both PLLs reach maintain, with the last 30 phase errors within 2·TDC_min;
- each divided period matches its reference to within 0.01 %;
- every instruction fetched from flash matches what was loaded;
- every mechanism happened at least once: frequency search, relation
  training, a watchdog bark, coarse and fine steps, wait slots, sign changes,
  maintain, error flags, bus contention, and B waiting for A.

To make the watchdog bark, PLL A's first search deliberately trains the
relation over too short a span of control words. The search then repeats
over a wider one.

In this run, both PLLs end with phase errors below one TDC step (< 15 ps).

## Where this design departs from, or adds to, its source

* **Added details.** The source leaves these open, so they are this
  design's choices:
  - the register layouts inside each 16 MB window;
  - the error-flag rule (set by each measurement, cleared by reading);
  - the synchronisers;
  - zero-wait-state slaves and the default acknowledge for reserved space;
  - SACA following reference A, its N_f reset value (4096; the source says
    only "above 2048") and its slowest-setting start;
  - the flash programming port.
* **SACA idle level.** One description says the SACA clock "maintains high"
  after its burst. Its timing diagram shows each burst triggered by a rising
  edge at the reference edge. The RTL rests low, so every burst starts with
  a rising edge.
* **Z.** The printed divider formula `Z = floor(T/(4·N_f))` is used as
  given. Its unit (60 ps of target period) is inferred so that the output
  comes out near `N_f × f_ref`.
* **DCO.** The DCO is one linear stage. The real one has several tuning
  stages of different resolution, and the software's multi-factor
  control-word mapping is meant for those stages.
* **PFD.** Dead zone and minimum pulse are not modelled.
* **Not included.** The CPU (an existing open-source core) and the tracking
  software. The testbench's CPU model is an approximation of that software,
  not a port of it.
* **Lock accuracy.** The source reports residual errors of ±3 ps and ±9 ps.
  A 15 ps TDC cannot show that, so the benches check lock to within 90 ps,
  and observe < 15 ps.
