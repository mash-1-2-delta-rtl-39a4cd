// tb_fracn_digital_top: end-to-end testbench of the synthesizer's digital core,
// with every parameter at its default (MOD = 10, NW = 5).
//
// The analog loop is replaced by ideal sources: the VCO clock runs at 210 MHz
// (period 4.76 ns) and the reference period is set to exactly (N + K/10) VCO
// periods, which is what the locked loop would produce. Time is in ns.
//
// Channel phase: the channels (N, K) = (10,0), (10,5), (11,0), (10,3), (10,9),
// (10,1) are selected one after another without a reset (channel switches).
// For every divided period the testbench checks that it lasts n_int + dn VCO
// cycles for the n_int and dn presented when the previous period ended, and that
// the modulus offset is one of -1 .. +2. Over 300 periods of each channel the
// mean division ratio must be N + K/10 within 3/300, and the number of divided
// and reference rising edges may differ by at most 2 (the divided clock tracks
// the reference in frequency). The XOR detector output is compared with
// ref XOR div in every cycle.
// Frequency-error phase: the reference is made 5 % faster, then 5 % slower;
// the PFD must then give mostly UP pulses, then mostly DN pulses.
// Mechanisms counted, each of which must occur: the four modulus offsets, channel
// switches, PFD UP pulses, PFD DN pulses, XOR detector pulses.
module tb_fracn_digital_top;
  import mash_pkg::*;

  localparam real TV = 4.76;   // VCO period, ns (210 MHz)

  logic       vco_clk = 1'b0, rst_n = 1'b0, ref_clk = 1'b0;
  logic [4:0] n_int  = 5'd10;
  logic [3:0] frac_k = 4'd0;
  logic       div_out, div_pulse, pd_xor, pfd_up, pfd_dn;
  dn_t        dn;

  fracn_digital_top dut (.*);

  int  checks = 0, failures = 0;
  real ref_half = TV * 10.0 / 2.0;

  always #(TV / 2.0) vco_clk = ~vco_clk;

  // reference: its half period may be changed by the stimulus
  initial begin
    #1.1;
    forever begin
      #(ref_half) ref_clk = ~ref_clk;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- monitor, sampling at the falling VCO edge ----
  int  expected_ratio = 10, cyc_in_period = 0;
  bit  monitor_on = 0;
  int  level_used[4] = '{0, 0, 0, 0};
  longint win_cycles = 0, win_periods = 0;
  int  win_ref_rises = 0, win_div_rises = 0;
  int  up_pulses = 0, dn_pulses = 0, xor_pulses = 0;
  logic prev_ref = 0, prev_div = 0, prev_up = 0, prev_dn = 0, prev_xor = 0;

  always @(negedge vco_clk) begin
    if (monitor_on) begin
      check(pd_xor == (ref_clk ^ div_out), "XOR detector output differs from ref ^ div");
      if (ref_clk && !prev_ref) win_ref_rises++;
      if (div_out && !prev_div) win_div_rises++;
      if (pfd_up && !prev_up) up_pulses++;
      if (pfd_dn && !prev_dn) dn_pulses++;
      if (pd_xor && !prev_xor) xor_pulses++;
      if (div_pulse) begin
        check(cyc_in_period + 1 == expected_ratio,
              $sformatf("period of %0d cycles, expected %0d", cyc_in_period + 1, expected_ratio));
        check(dn >= -3'sd1 && dn <= 3'sd2, $sformatf("modulus offset %0d out of range", dn));
        if (dn >= -3'sd1 && dn <= 3'sd2) level_used[int'(dn) + 1]++;
        win_cycles  += longint'(cyc_in_period) + 1;
        win_periods += 1;
        expected_ratio = int'(n_int) + int'(dn);
        cyc_in_period = 0;
      end else begin
        cyc_in_period++;
      end
    end
    prev_ref = ref_clk; prev_div = div_out; prev_up = pfd_up; prev_dn = pfd_dn; prev_xor = pd_xor;
  end

  task automatic wait_periods(input int n);
    repeat (n) begin
      @(posedge vco_clk);
      while (!div_pulse) @(posedge vco_clk);
    end
    #0.1;
  endtask

  task automatic clear_window();
    win_cycles = 0; win_periods = 0; win_ref_rises = 0; win_div_rises = 0;
    up_pulses = 0; dn_pulses = 0;
  endtask

  int channel_switches = 0;

  task automatic run_channel(input int n, input int k);
    real ratio, mean;
    // new channel word, presented just after a rising edge
    @(posedge vco_clk);
    #0.1;
    if (monitor_on) channel_switches++;
    n_int  = 5'(n);
    frac_k = 4'(k);
    ratio  = real'(n) + real'(k) / 10.0;
    ref_half = TV * ratio / 2.0;
    wait_periods(50);               // let the reference period change settle in
    clear_window();
    wait_periods(300);
    mean = real'(win_cycles) / real'(win_periods);
    $display("channel N=%0d K=%0d: mean ratio %f over %0d periods -> %f MHz from 20 MHz",
             n, k, mean, win_periods, 20.0 * mean);
    check(win_cycles * 10 - win_periods * (longint'(10 * n) + longint'(k)) <= 30 &&
          win_periods * (longint'(10 * n) + longint'(k)) - win_cycles * 10 <= 30,
          $sformatf("N=%0d K=%0d: %0d cycles in %0d periods", n, k, win_cycles, win_periods));
    check(win_ref_rises - win_div_rises <= 2 && win_div_rises - win_ref_rises <= 2,
          $sformatf("N=%0d K=%0d: %0d reference edges, %0d divided edges", n, k, win_ref_rises, win_div_rises));
  endtask

  initial begin
    repeat (4) @(posedge vco_clk);
    #0.1 rst_n = 1'b1;
    monitor_on = 1'b1;
    run_channel(10, 0);    // 200 MHz
    run_channel(10, 5);    // 210 MHz: N = 10, dN = 0.5
    run_channel(11, 0);    // 220 MHz
    run_channel(10, 3);
    run_channel(10, 9);
    run_channel(10, 1);

    // frequency error: reference 5 % fast, then 5 % slow, at N = 10, K = 5
    ref_half = TV * 10.5 / 1.05 / 2.0;
    wait_periods(20);
    clear_window();
    wait_periods(200);
    $display("reference fast: %0d UP pulses, %0d DN pulses", up_pulses, dn_pulses);
    check(up_pulses > 10 * dn_pulses, "reference fast: UP pulses do not dominate");
    ref_half = TV * 10.5 * 1.05 / 2.0;
    wait_periods(20);
    clear_window();
    wait_periods(200);
    $display("reference slow: %0d UP pulses, %0d DN pulses", up_pulses, dn_pulses);
    check(dn_pulses > 10 * up_pulses, "reference slow: DN pulses do not dominate");

    $display("offsets -1/0/+1/+2 used %0d/%0d/%0d/%0d times, %0d channel switches, %0d XOR pulses",
             level_used[0], level_used[1], level_used[2], level_used[3], channel_switches, xor_pulses);
    for (int l = 0; l < 4; l++) check(level_used[l] > 0, $sformatf("offset %0d never used", l - 1));
    check(channel_switches > 0, "no channel switch");
    check(xor_pulses > 0, "no XOR detector pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
