// vco_model: behavioural model (not synthesizable) of the control-voltage
// amplifier and the VCO.
//
// The control voltage is amplified by AV (0.3) and tunes the VCO around its
// free-running frequency f0_hz with a sensitivity KVCO_HZ_PER_V (10 MHz/V):
//   f = f0_hz + KVCO_HZ_PER_V * AV * vtune.
// Each half period is computed from the control voltage at its start, so the
// output phase is the integral of the frequency, as in a real oscillator.
// f0_hz, the free-running frequency, stands for the coarse tuning of the
// oscillator and may be changed at any time. Time unit: ns.
module vco_model #(
  parameter real KVCO_HZ_PER_V  = 10.0e6,
  parameter real AV             = 0.3
) (
  input  real  f0_hz,
  input  real  vtune,
  output logic clk
);
  real f_hz;

  initial begin
    clk = 1'b0;
    forever begin
      f_hz = f0_hz + KVCO_HZ_PER_V * AV * vtune;
      #(0.5e9 / f_hz);
      clk = ~clk;
    end
  end
endmodule
