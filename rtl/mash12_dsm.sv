// mash12_dsm: MASH 1-2 delta-sigma modulator with a quantiser in the second stage.
//
// Turns a constant fractional word K into a stream of modulus offsets whose
// average is K/MOD, with the quantisation noise pushed to high frequencies. It is
// a cascade of a first-order stage (dsm_stage1) and a second-order loop
// (dsm_stage23) fed with the first stage's quantisation error. The
// error-cancellation network adds the first-difference of the third-stage output
// to the first-stage output:
//   dn[n] = y1[n] + y3[n] - y3[n-1]
// so dn takes the four values -1, 0, +1, +2. In z-terms
//   Y = X + [z^-1 (1 - z^-1)^2 E1 + (1 - z^-1)^2 Q2 + (1 - z^-1)^3 Q3] / (1 - z^-1 + z^-2)
// where E1 is the stage-1 error and Q2, Q3 the errors of the later quantisers:
// the signal passes with unit gain and every noise term has at least a
// second-order zero at DC.
//
// The cascade and the cancellation network follow the modulator's block diagram;
// the accumulator modulus MOD = 10 gives the 1/10 fractional step that a 20 MHz
// reference needs for 2 MHz channel spacing. The registered output is this
// design's choice.
//
// Interface and timing: on every rising clk edge with en high the modulator takes
// one sample of frac_k and dn is updated with that sample's output, so dn is
// valid from the cycle after en. Synchronous active-low reset sets dn to 0.
module mash12_dsm
  import mash_pkg::*;
#(
  parameter int unsigned MOD = 10,
  localparam int unsigned KW = k_width(MOD),
  localparam int unsigned EW = KW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [KW-1:0] frac_k,
  output dn_t           dn
);

  logic                 y1, y3;
  logic signed [EW-1:0] e1;
  logic                 y3_prev_q;   // z^-1 of the cancellation network's (1 - z^-1)
  dn_t                  dn_next;

  dsm_stage1 #(.MOD(MOD)) u_stage1 (
    .clk, .rst_n, .en, .frac_k, .y1, .e1
  );

  dsm_stage23 #(.MOD(MOD)) u_stage23 (
    .clk, .rst_n, .en, .e1, .y2(), .y3
  );

  assign dn_next = dn_t'({2'b00, y1}) + dn_t'({2'b00, y3}) - dn_t'({2'b00, y3_prev_q});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y3_prev_q <= 1'b0;
      dn        <= '0;
    end else if (en) begin
      y3_prev_q <= y3;
      dn        <= dn_next;
    end
  end

  a_dn_levels: assert property (@(posedge clk) disable iff (!rst_n)
    (dn >= DN_MIN) && (dn <= DN_MAX));

endmodule
