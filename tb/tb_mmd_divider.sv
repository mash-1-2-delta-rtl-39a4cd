// tb_mmd_divider: self-checking testbench of the multi-modulus divider.
//
// A random modulus offset from -1 to +2 is presented for each period and the
// integer ratio is switched between 10 and 11 now and then. For every period the
// testbench checks that it lasts exactly n_int + dn VCO cycles, using the values
// presented when the previous period ended, that div_pulse is high in its last
// cycle only, and that div_out is high for the first floor(R/2) cycles.
module tb_mmd_divider;
  import mash_pkg::*;
  localparam int unsigned NW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NW-1:0] n_int = NW'(10);
  dn_t dn = '0;
  logic div_out, div_pulse;
  int checks = 0, failures = 0;
  int ratio_seen[16];

  mmd_divider #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected_ratio, pos, high_cycles;
    foreach (ratio_seen[i]) ratio_seen[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    expected_ratio = 10;   // first period after reset uses n_int
    pos = 0; high_cycles = 0;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      @(negedge clk);
      high_cycles += int'(div_out);
      checks++;
      if (div_pulse != (pos == expected_ratio - 1)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: div_pulse=%0d at position %0d of %0d", cyc, div_pulse, pos, expected_ratio);
      end
      checks++;
      if (div_out != (pos < expected_ratio / 2)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: div_out=%0d at position %0d of %0d", cyc, div_out, pos, expected_ratio);
      end
      if (pos == expected_ratio - 1) begin
        ratio_seen[expected_ratio]++;
        // the ratio of the next period comes from the inputs now presented
        expected_ratio = int'(n_int) + int'(dn);
        pos = 0;
        high_cycles = 0;
      end else begin
        if (pos == 0) begin
          // new inputs, presented well away from the edge that samples them
          dn = dn_t'($urandom_range(3)) - 3'sd1;
          if ($urandom_range(19) == 0) n_int = (n_int == NW'(10)) ? NW'(11) : NW'(10);
        end
        pos++;
      end
    end
    for (int r = 9; r <= 13; r++) begin
      checks++;
      if (ratio_seen[r] == 0) begin
        failures++;
        $display("ratio %0d never used", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
