// xor_pd: exclusive-OR phase detector.
//
// The output is high while the reference and the divided VCO clock differ. For
// two square waves of equal frequency its average is VDD * phi / pi for a phase
// difference phi between 0 and pi: 0 in phase, VDD/2 at 90 degrees, VDD at 180
// degrees, a gain of VDD/pi per radian. The loop filter averages this pulse
// train into the tuning voltage, and the loop settles at 90 degrees.
//
// The gate type and its characteristic are the source design's. The detector is purely
// combinational: the output follows either input with no clock and no state.
module xor_pd (
  input  logic ref_clk,
  input  logic div_clk,
  output logic pd_out
);

  assign pd_out = ref_clk ^ div_clk;

endmodule
