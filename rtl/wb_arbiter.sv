// wb_arbiter: grants the shared WISHBONE bus to one of two masters.
//
// Master 0 is the CPU's data channel and master 1 its instruction channel;
// the data channel wins when both request, as the platform specifies, because
// a pending load or store holds up the pipeline. A grant, once given, is held
// for as long as the granted master keeps CYC asserted, so a bus cycle is
// never cut in two. The choice of which master wins is combinational in the
// cycle CYC rises (no added latency); the held grant is a register. Idle bus
// leaves no master granted. Reset behaviour is this design's own choice.
`timescale 1ps/1fs
module wb_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] cyc_i,   // CYC of master 0 (data) and 1 (instruction)
  output logic [1:0] gnt_o    // one-hot grant, zero when the bus is idle
);

  logic [1:0] gnt_q;

  always_comb begin
    if ((gnt_q & cyc_i) != 2'b00) gnt_o = gnt_q;      // hold for the whole cycle
    else if (cyc_i[0])            gnt_o = 2'b01;      // data channel first
    else if (cyc_i[1])            gnt_o = 2'b10;
    else                          gnt_o = 2'b00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gnt_q <= 2'b00;
    else        gnt_q <= gnt_o;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_o));
  a_hold:   assert property (@(posedge clk) disable iff (!rst_n)
                             (gnt_o[1] && cyc_i[1]) |=> gnt_o[1] || !cyc_i[1]);

endmodule
