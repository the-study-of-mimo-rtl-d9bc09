// pfd: phase frequency detector between the reference and divided clocks.
//
// The classic two-flip-flop detector: a rising reference edge sets UP, a
// rising divided-clock edge sets DN, and as soon as both are set they are
// cleared together. Exactly one of them is therefore high between the two
// edges, for as long as the phase difference; err_o (UP or DN) is the error
// pulse the TDC measures. UP means the reference edge came first (divided
// clock lags), DN means the divided clock came first (divided clock leads).
// lead_o is captured when the error pulse starts and holds the sign of the
// last error until the next one.
//
// The platform's detector has a 200 ps minimum error pulse and resolves
// 45 ps clock differences; those are properties of its gates and are not
// modelled here: in this RTL the clearing is immediate, so edges that coincide
// give no pulse at all. The asynchronous clear through UP and DN is the
// structure of the circuit and intended; it is not a timing path of the
// system clock.
`timescale 1ps/1fs
module pfd (
  input  logic ref_i,    // reference clock
  input  logic div_i,    // divided-by-N clock
  input  logic rst_n,
  output logic up_o,     // reference leads: divided clock lags
  output logic dn_o,     // divided clock leads
  output logic err_o,    // error pulse to the TDC
  output logic lead_o    // sign of the last error: 1 = divided clock led
);

  logic up_q, dn_q, clr;

  assign clr = (up_q & dn_q) | ~rst_n;

  always_ff @(posedge ref_i or posedge clr) begin
    if (clr) up_q <= 1'b0;
    else     up_q <= 1'b1;
  end

  always_ff @(posedge div_i or posedge clr) begin
    if (clr) dn_q <= 1'b0;
    else     dn_q <= 1'b1;
  end

  assign up_o  = up_q;
  assign dn_o  = dn_q;
  assign err_o = up_q | dn_q;

  always_ff @(posedge err_o or negedge rst_n) begin
    if (!rst_n) lead_o <= 1'b0;
    else        lead_o <= dn_q;
  end

endmodule
