// dsm_stage1: first stage of the MASH 1-2 delta-sigma modulator.
//
// A first-order loop: the input K is summed with the negated, delayed quantiser
// output, integrated by an accumulator 1/(1-z^-1) and quantised to one bit:
//   v1[n] = v1[n-1] + K - MOD*y1[n-1],   y1[n] = (v1[n] >= MOD),
//   e1[n] = v1[n] - MOD*y1[n]             (0 <= e1 < MOD)
// which gives Y1 = X - E1*(1 - z^-1): the average of y1 is K/MOD. All values are
// integers in units of 1/MOD, so the quantiser is the accumulator's carry.
//
// The structure (accumulator, quantiser, z^-1 feedback, error tap between
// accumulator and quantiser) follows the modulator's block diagram. The
// carry-style quantiser threshold (MOD, one full unit) and the integer scaling are
// this design's choices.
//
// Interface: y1 and e1 are combinational functions of the state and frac_k for the
// current sample; the state (integrator and delay element) advances on a rising
// clk edge when en is high. Synchronous active-low reset clears the state.
module dsm_stage1 #(
  parameter int unsigned MOD = 10,
  localparam int unsigned KW = mash_pkg::k_width(MOD),
  localparam int unsigned EW = KW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [KW-1:0]        frac_k,
  output logic                 y1,
  output logic signed [EW-1:0] e1
);

  localparam logic [EW:0] MOD_V = (EW+1)'(MOD);

  logic [EW:0] acc_q;     // integrator state v1[n-1], 0 .. 2*MOD-1
  logic        y1_q;      // delay element: y1[n-1]
  logic [EW:0] v1;        // integrator output of the current sample

  always_comb begin
    v1 = acc_q + (EW+1)'(frac_k) - (y1_q ? MOD_V : '0);
    y1 = (v1 >= MOD_V);
    e1 = signed'(EW'(v1 - (y1 ? MOD_V : '0)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
      y1_q  <= 1'b0;
    end else if (en) begin
      acc_q <= v1;
      y1_q  <= y1;
    end
  end

  // The accumulator never holds more than two units: v1 = e1[n-1] + K < 2*MOD.
  a_acc_range: assert property (@(posedge clk) disable iff (!rst_n) v1 < 2 * MOD_V);

endmodule
