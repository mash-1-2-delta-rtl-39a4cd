// tb_pfd: self-checking testbench of the sampled phase-frequency detector.
//
// Each trial raises the reference half-way through a VCO cycle (just before
// rising edge a) and the divided clock just after rising edge b. The reference
// passes two synchroniser stages, so UP is set at edge a+2; the divided clock is
// seen at once, so DN is set at edge b+1. Whichever is set first stays high until
// the other is set and both clear together. With L = b - a - 1 the expected
// result is an UP pulse of L cycles for L > 0, a DN pulse of -L cycles for L < 0
// and no pulse for L = 0; UP and DN are never high together. Trials sweep the
// lead from -6 to +6 cycles.
module tb_pfd;
  logic clk = 1'b0, rst_n = 1'b0, ref_clk = 1'b0, div_clk = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;

  pfd dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int up_cycles, dn_cycles;
  bit both;
  always @(posedge clk) begin
    #1;
    up_cycles += int'(up);
    dn_cycles += int'(dn);
    if (up && dn) both = 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (12) @(posedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      for (int lead = -6; lead <= 6; lead++) begin
        int a, b, start;
        // choose edges a and b (in cycles from now) so that b - a - 1 == lead
        a = 10;
        b = a + 1 + lead;
        up_cycles = 0; dn_cycles = 0; both = 1'b0;
        start = 0;
        for (int c = 1; c <= 30; c++) begin
          @(negedge clk);
          if (c == a) ref_clk = 1'b1;          // before edge a
          @(posedge clk);
          if (c == b) div_clk <= 1'b1;         // just after edge b
        end
        checks++;
        if (up_cycles != ((lead > 0) ? lead : 0) || dn_cycles != ((lead < 0) ? -lead : 0) || both) begin
          failures++;
          $display("lead %0d: UP %0d cycles, DN %0d cycles, both=%0d", lead, up_cycles, dn_cycles, both);
        end
        // return both inputs low and let the detector settle
        @(negedge clk);
        ref_clk = 1'b0;
        div_clk = 1'b0;
        repeat (6) @(posedge clk);
        checks++;
        if (up || dn) begin
          failures++;
          $display("lead %0d: outputs not idle after the trial", lead);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
