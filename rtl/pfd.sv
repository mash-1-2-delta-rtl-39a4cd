// pfd: sampled phase-frequency detector with UP/DN outputs for a charge pump.
//
// A rising edge of the reference sets UP, a rising edge of the divided clock sets
// DN, and as soon as both are set both are cleared. The width of the UP (or DN)
// pulse thus measures how far the reference leads (or lags) the divided clock, and
// a frequency error shows as pulses of one sign only.
//
// The source design's circuit model uses a phase/frequency detector with charge pump
// but does not describe its insides. This one is the usual two-flip-flop
// detector, except that it is sampled by the VCO clock instead of using the two
// input edges as clocks and an asynchronous reset: the reference passes a
// two-flop synchroniser and edges are found by comparing with the previous
// sample. The phase resolution is therefore one VCO cycle, and UP lags the
// reference edge by two to three VCO cycles. Both choices are this design's.
//
// Interface: clk is the VCO clock, div_clk must be synchronous to it (it comes
// from mmd_divider), ref_clk may be asynchronous. Synchronous active-low reset.
module pfd (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_clk,
  input  logic div_clk,
  output logic up,
  output logic dn
);

  logic ref_s1_q, ref_s2_q, ref_prev_q, div_prev_q;
  logic ref_rise, div_rise, up_set, dn_set;

  assign ref_rise = ref_s2_q & ~ref_prev_q;
  assign div_rise = div_clk & ~div_prev_q;
  assign up_set   = up | ref_rise;
  assign dn_set   = dn | div_rise;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_s1_q   <= 1'b0;
      ref_s2_q   <= 1'b0;
      ref_prev_q <= 1'b0;
      div_prev_q <= 1'b0;
      up         <= 1'b0;
      dn         <= 1'b0;
    end else begin
      ref_s1_q   <= ref_clk;
      ref_s2_q   <= ref_s1_q;
      ref_prev_q <= ref_s2_q;
      div_prev_q <= div_clk;
      // Both set: the reset path of the classic detector clears both.
      up         <= up_set & ~dn_set;
      dn         <= dn_set & ~up_set;
    end
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));

endmodule
