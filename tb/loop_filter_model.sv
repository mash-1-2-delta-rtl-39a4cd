// loop_filter_model: behavioural model (not synthesizable) of the analog loop
// filter driven by the XOR phase detector.
//
// The detector output swings between 0 and VDD. The filter is a second-order
// Butterworth low-pass, H(s) = 1 / ((s/W0)^2 + sqrt(2) s/W0 + 1), with unit DC
// gain. W0 = 1.881e6 rad/s matches the closed-loop denominator
// s^3 + 2.666e6 s^2 + 3.537e12 s + 2.352e18 of the synthesizer
// (sqrt(3.537e12) = 1.881e6). It is integrated with forward Euler in steps of
// DT_NS nanoseconds (W0 * DT = 1.9e-4, far inside the stable range). vtune is
// the filter output in volts. Time unit: ns.
module loop_filter_model #(
  parameter real VDD   = 1.1,
  parameter real W0    = 1.881e6,
  parameter real DT_NS = 0.1,
  parameter real V_INIT = 0.0
) (
  input  logic pd_in,
  output real  vtune
);
  real x1 = V_INIT, x2 = 0.0;   // output and its time derivative
  real u, dt;

  assign vtune = x1;

  initial begin
    dt = DT_NS * 1.0e-9;
    forever begin
      #(DT_NS);
      u  = pd_in ? VDD : 0.0;
      x1 = x1 + dt * x2;
      x2 = x2 + dt * (W0 * W0 * (u - x1) - 1.4142135623730951 * W0 * x2);
    end
  end
endmodule
