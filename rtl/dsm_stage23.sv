// dsm_stage23: second and third stage of the MASH 1-2 delta-sigma modulator.
//
// A second-order loop built from two integrator + quantiser stages. The
// stage-1 error e1 enters the second integrator together with the third-stage
// output delayed by two samples (negated); the quantised second-stage output
// enters the third integrator together with the third-stage output delayed by
// one sample (negated):
//   w2[n] = w2[n-1] + e1[n] - MOD*y3[n-2],  y2[n] = (w2[n] >= MOD)
//   w3[n] = w3[n-1] + MOD*y2[n] - MOD*y3[n-1], y3[n] = (w3[n] >= MOD)
// In z-terms Y2 = (E1 - z^-2 Y3)/(1 - z^-1) + Q2 and Y3 = (Y2 - z^-1 Y3)/(1 - z^-1) + Q3.
// The quantiser after the second integrator and the second z^-1 that makes the
// z^-2 path are the two elements that set this modulator apart from the
// conventional MASH 1-2.
//
// The connection of every summer, delay and quantiser follows the modulator's
// block diagram. The one-bit carry-style quantisers (threshold MOD, levels 0 and
// MOD) and the integer scaling are this design's choices; with them w2 stays in
// [-MOD, 3*MOD) and w3 in [0, MOD], which the register widths and assertions cover.
//
// Interface: y2 and y3 are combinational for the current sample; the state
// advances on a rising clk edge when en is high. Synchronous active-low reset.
module dsm_stage23 #(
  parameter int unsigned MOD = 10,
  localparam int unsigned KW = mash_pkg::k_width(MOD),
  localparam int unsigned EW = KW + 1,     // width of the signed stage-1 error
  localparam int unsigned WW = KW + 3      // width of the signed integrators
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [EW-1:0] e1,
  output logic                 y2,
  output logic                 y3
);

  localparam logic signed [WW-1:0] MOD_S = WW'(MOD);

  logic signed [WW-1:0] s2_q, s3_q;   // integrator states w2[n-1], w3[n-1]
  logic                 y3_d1_q;      // y3[n-1]  (shared z^-1 after Y3)
  logic                 y3_d2_q;      // y3[n-2]  (the added z^-1 in front of stage 2)
  logic signed [WW-1:0] w2, w3;

  always_comb begin
    w2 = s2_q + WW'(e1) - (y3_d2_q ? MOD_S : '0);
    y2 = (w2 >= MOD_S);
    w3 = s3_q + (y2 ? MOD_S : '0) - (y3_d1_q ? MOD_S : '0);
    y3 = (w3 >= MOD_S);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_q    <= '0;
      s3_q    <= '0;
      y3_d1_q <= 1'b0;
      y3_d2_q <= 1'b0;
    end else if (en) begin
      s2_q    <= w2;
      s3_q    <= w3;
      y3_d1_q <= y3;
      y3_d2_q <= y3_d1_q;
    end
  end

  a_w2_range: assert property (@(posedge clk) disable iff (!rst_n)
    (w2 >= -MOD_S) && (w2 < 3 * MOD_S));
  a_w3_range: assert property (@(posedge clk) disable iff (!rst_n)
    (w3 >= 0) && (w3 <= MOD_S));

endmodule
