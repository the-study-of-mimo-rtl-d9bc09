// freq_divider: programmable divide-by-N of the DCO clock.
//
// Produces the divided-by-N clock that the phase frequency detector compares
// with the reference clock (f_div = f_dco / N). N is 10 bits, 1..1023, the
// divider range of the platform; N = 0 is treated as 1. A counter clocked by
// the DCO clock runs from 0 to N-1; the output is high for the first
// ceil(N/2) counts, so it rises once every N DCO periods, on the DCO edge
// that wraps the counter. A new N takes effect at the next wrap. N = 1
// passes the DCO clock through. The counter and the output flop, not the
// duty cycle, are this design's own choice; only the rising edge is used.
`timescale 1ps/1fs
module freq_divider #(
  parameter int unsigned N_W = 10
) (
  input  logic           clk_i,    // DCO clock
  input  logic           rst_n,
  input  logic [N_W-1:0] n_i,      // division ratio
  output logic           clk_o     // divided-by-N clock
);

  logic [N_W-1:0] cnt_q, n_q;
  logic           div_q;
  logic [N_W-1:0] n_eff;

  assign n_eff = (n_i == '0) ? N_W'(1) : n_i;

  always_ff @(posedge clk_i or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      n_q   <= N_W'(1);
      div_q <= 1'b0;
    end else if (cnt_q >= n_q - N_W'(1)) begin
      cnt_q <= '0;
      n_q   <= n_eff;
      div_q <= 1'b1;
    end else begin
      cnt_q <= cnt_q + N_W'(1);
      div_q <= ({1'b0, cnt_q} + 1) < ({1'b0, n_q} + 1) / 2;
    end
  end

  // With N = 1 there is no room for a registered low phase: pass the clock.
  assign clk_o = (n_q == N_W'(1)) ? clk_i : div_q;

endmodule
