// fracn_digital_top: digital core of a fractional-N frequency synthesizer.
//
// The synthesizer locks a VCO to (N + K/MOD) times a reference: with a 20 MHz
// reference, N = 10 and MOD = 10 it covers 200 to 218 MHz in 2 MHz steps (220 MHz
// with N = 11). This module holds the digital part of the loop:
//   - mash12_dsm turns the fractional word K into modulus offsets -1 .. +2
//     whose average is K/MOD;
//   - mmd_divider divides the VCO clock by N + offset and clocks the modulator
//     once per divided period;
//   - xor_pd (the detector of the loop's design specification) and pfd (the
//     phase/frequency detector of its circuit model) compare the divided clock
//     with the reference.
// The loop filter, the charge pump, the control-voltage amplifier and the VCO are
// analog: the detector outputs leave through ports and the VCO clock comes in.
//
// Interface and timing: everything runs on vco_clk; ref_clk may be asynchronous.
// frac_k and n_int are taken at the end of each divided period. Synchronous
// active-low reset.
module fracn_digital_top
  import mash_pkg::*;
#(
  parameter int unsigned MOD = 10,
  parameter int unsigned NW  = 5,
  localparam int unsigned KW = k_width(MOD)
) (
  input  logic          vco_clk,
  input  logic          rst_n,
  input  logic          ref_clk,
  input  logic [NW-1:0] n_int,
  input  logic [KW-1:0] frac_k,
  output logic          div_out,
  output logic          div_pulse,
  output dn_t           dn,
  output logic          pd_xor,
  output logic          pfd_up,
  output logic          pfd_dn
);

  mash12_dsm #(.MOD(MOD)) u_dsm (
    .clk(vco_clk), .rst_n, .en(div_pulse), .frac_k, .dn
  );

  mmd_divider #(.NW(NW)) u_div (
    .clk(vco_clk), .rst_n, .n_int, .dn, .div_out, .div_pulse
  );

  xor_pd u_xor_pd (
    .ref_clk, .div_clk(div_out), .pd_out(pd_xor)
  );

  pfd u_pfd (
    .clk(vco_clk), .rst_n, .ref_clk, .div_clk(div_out), .up(pfd_up), .dn(pfd_dn)
  );

endmodule
