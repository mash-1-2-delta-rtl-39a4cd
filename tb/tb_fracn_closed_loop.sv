// tb_fracn_closed_loop: closed-loop runs of the synthesizer, digital core at its
// default parameters plus behavioural models of the analog parts.
//
// Loop: 20 MHz reference and divided clock -> xor_pd (inside the top) ->
// loop_filter_model (2nd-order Butterworth, W0 = 1.881e6 rad/s) -> vco_model
// (amplifier 0.3, 10 MHz/V) -> vco_clk of the top. The detector swing VDD = 1.1 V
// makes the loop gain Kpd*Av*Kvco/N = (VDD/pi)*0.3*2*pi*10 MHz/10 = 6.6e5 1/s,
// the value implied by the closed-loop transfer function
// 2.352e18 / (s^3 + 2.666e6 s^2 + 3.537e12 s + 2.352e18).
//
// Channels 210 MHz (N = 10, K = 5), 200 MHz (N = 10, K = 0) and 220 MHz
// (N = 11, K = 0) are selected in turn. For each, the VCO's coarse setting is
// moved to 1.65 MHz below the channel and the new channel word is applied, so
// the loop has to pull in and re-acquire phase. For each channel:
//   - the settling time, after which the VCO frequency given by the control
//     voltage stays within 0.1 % of the channel, is below 10 us; it is printed;
//   - afterwards the mean VCO frequency over each of five 2 us windows, from the
//     times of its first and last edge, is the channel within 0.1 %;
//   - over those 10 us the reference and divided clocks have the same number of
//     rising edges within 1 (phase lock, not just frequency).
// Time unit: ns.
module tb_fracn_closed_loop;
  import mash_pkg::*;

  localparam real F_REF = 20.0e6;
  localparam real T_REF = 1.0e9 / F_REF;
  localparam real F_PULL = 1.65e6;    // coarse setting below the channel

  logic       rst_n = 1'b0, ref_clk = 1'b0, vco_clk;
  logic [4:0] n_int  = 5'd10;
  logic [3:0] frac_k = 4'd5;
  logic       div_out, div_pulse, pd_xor, pfd_up, pfd_dn;
  dn_t        dn;
  real        vtune;
  real        f0_hz = 210.0e6 - F_PULL;

  fracn_digital_top dut (.*);
  loop_filter_model #(.VDD(1.1)) u_lf (.pd_in(pd_xor), .vtune);
  vco_model u_vco (.f0_hz, .vtune, .clk(vco_clk));

  int checks = 0, failures = 0;

  always #(T_REF / 2.0) ref_clk = ~ref_clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rising-edge counters and the time of the latest VCO edge
  longint  vco_edges = 0, ref_edges = 0, div_edges = 0;
  realtime t_vco_last = 0.0;
  always @(posedge vco_clk) begin
    vco_edges++;
    t_vco_last = $realtime;
  end
  always @(posedge ref_clk) ref_edges++;
  always @(posedge div_out) div_edges++;

  task automatic run_channel(input int n, input int k);
    real f_target, t_settle, f_inst, f_win;
    longint r0, d0;
    f_target = F_REF * (real'(n) + real'(k) / 10.0);
    f0_hz  = f_target - F_PULL;
    n_int  = 5'(n);
    frac_k = 4'(k);
    t_settle = 0.0;
    // instantaneous VCO frequency from the control voltage, every 10 ns for 30 us
    for (int i = 1; i <= 3000; i++) begin
      #10;
      f_inst = f0_hz + 10.0e6 * 0.3 * vtune;
      if (f_inst < f_target * 0.999 || f_inst > f_target * 1.001) t_settle = real'(i) * 10.0;
      if (i % 500 == 0) $display("  t = %5.1f us  f_vco = %8.4f MHz  vtune = %5.3f V",
                                 real'(i) * 0.01, f_inst / 1.0e6, vtune);
    end
    $display("channel %0.0f MHz: settling time to within 0.1 %%: %0.2f us", f_target / 1.0e6, t_settle / 1000.0);
    checks++;
    if (t_settle >= 10000.0) begin
      failures++;
      $display("FAIL: not settled within 10 us");
    end
    r0 = ref_edges; d0 = div_edges;
    for (int w = 0; w < 5; w++) begin
      longint n0;
      realtime t0;
      @(posedge vco_clk);
      #0.001;
      n0 = vco_edges; t0 = t_vco_last;
      #2000;
      f_win = real'(vco_edges - n0) / ((t_vco_last - t0) * 1.0e-9);
      checks++;
      if (f_win < f_target * 0.999 || f_win > f_target * 1.001) begin
        failures++;
        $display("FAIL: window %0d mean VCO frequency %9.5f MHz", w, f_win / 1.0e6);
      end
    end
    $display("  last window mean %9.5f MHz; last 10 us: %0d reference, %0d divided edges",
             f_win / 1.0e6, ref_edges - r0, div_edges - d0);
    checks++;
    if (ref_edges - r0 - (div_edges - d0) > 1 || div_edges - d0 - (ref_edges - r0) > 1) begin
      failures++;
      $display("FAIL: reference and divided edge counts differ");
    end
  endtask

  initial begin
    #20 rst_n = 1'b1;
    run_channel(10, 5);
    run_channel(10, 0);
    run_channel(11, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
