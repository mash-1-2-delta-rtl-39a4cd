// mmd_divider: multi-modulus frequency divider of the fractional-N loop.
//
// Divides the VCO clock by R = n_int + dn, where dn is the modulus offset from
// the delta-sigma modulator (-1 .. +2), so one output period lasts R VCO cycles.
// A counter runs from 0 to R-1; in its last cycle div_pulse is high, and on the
// following edge the counter restarts and a new ratio is taken from n_int + dn.
// div_pulse is the clock enable that advances the modulator, so the modulator is
// clocked once per divided period, as the divider's "dN" control input requires.
// div_out is a registered square wave, high for the first floor(R/2) cycles of
// each period, so that its rising edge marks the start of a period.
//
// The division by N + dN with the offset taken from the modulator follows the
// source design; the counter structure, the duty cycle and the one-period latency from
// a modulator output to the ratio it selects are this design's choices.
//
// Interface: clk is the VCO clock; n_int and dn are sampled in the cycle where
// div_pulse is high. R must be at least 2. Synchronous active-low reset starts a
// period of n_int cycles.
module mmd_divider
  import mash_pkg::*;
#(
  parameter int unsigned NW = 5          // width of the integer ratio and counter
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n_int,
  input  dn_t           dn,
  output logic          div_out,
  output logic          div_pulse
);

  logic [NW-1:0] cnt_q, ratio_q;     // position in the period, current ratio R
  logic [NW-1:0] cnt_next, ratio_next, ratio_new;

  assign ratio_new = NW'(signed'({1'b0, n_int}) + (NW+1)'(dn));
  assign div_pulse = (cnt_q == ratio_q - 1'b1);

  always_comb begin
    if (div_pulse) begin
      cnt_next   = '0;
      ratio_next = ratio_new;
    end else begin
      cnt_next   = cnt_q + 1'b1;
      ratio_next = ratio_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      ratio_q <= n_int;
      div_out <= 1'b1;
    end else begin
      cnt_q   <= cnt_next;
      ratio_q <= ratio_next;
      div_out <= (cnt_next < (ratio_next >> 1));
    end
  end

  a_ratio_min: assert property (@(posedge clk) disable iff (!rst_n)
    div_pulse |-> (ratio_new >= NW'(2)));

endmodule
