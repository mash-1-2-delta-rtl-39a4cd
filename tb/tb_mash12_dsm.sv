// tb_mash12_dsm: self-checking testbench of the MASH 1-2 modulator.
//
// For every fractional word K = 0 .. MOD-1 the modulator is reset and run for
// 2000 samples. Checked:
//   - every output against an integer reference model of the three stages and
//     the cancellation network dn = y1 + y3 - y3[n-1];
//   - the output stays within the four levels -1 .. +2;
//   - the running sum of dn stays within 3 of n*K/MOD (the mean is exactly K/MOD);
//   - dn changes only on the edge where en is high, one cycle after the sample;
//   - the noise-transfer identity, with D = MOD*dn - K and the model's stage
//     errors E1, Q2 = MOD*y2 - w2, Q3 = MOD*y3 - w3 (all in units of 1/MOD):
//       (1 - z^-1 + z^-2) D = z^-1 (1 - z^-1)^2 E1 + (1 - z^-1)^2 Q2 + (1 - z^-1)^3 Q3
// The four levels must all appear over the whole run.
module tb_mash12_dsm;
  import mash_pkg::*;
  localparam int unsigned MOD = 10;
  localparam int unsigned KW  = k_width(MOD);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [KW-1:0] frac_k = '0;
  dn_t dn;
  int checks = 0, failures = 0;
  int level_seen[4] = '{0, 0, 0, 0};

  mash12_dsm #(.MOD(MOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < int'(MOD); k++) begin
      int a1, y1d, w2, w3, d1, d2, y3p, v1, y1, e, y2, y3, expd, sum;
      int hd[4], he[4], hq2[4], hq3[4];   // histories, index 0 = current sample
      int lhs, rhs;
      dn_t prev;
      a1 = 0; y1d = 0; w2 = 0; w3 = 0; d1 = 0; d2 = 0; y3p = 0; sum = 0;
      for (int i = 0; i < 4; i++) begin hd[i] = 0; he[i] = 0; hq2[i] = 0; hq3[i] = 0; end
      frac_k = KW'(k);
      rst_n  = 1'b0;
      en     = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      for (int n = 0; n < 2000; n++) begin
        // one idle cycle between samples: dn must hold
        @(negedge clk);
        en = 1'b0;
        prev = dn;
        @(negedge clk);
        check(dn == prev, $sformatf("K=%0d n=%0d dn changed without en", k, n));
        en = 1'b1;
        // reference model
        v1 = a1 + k - int'(MOD) * y1d;  y1 = (v1 >= int'(MOD)) ? 1 : 0; e = v1 - int'(MOD) * y1;
        a1 = v1; y1d = y1;
        w2 = w2 + e - int'(MOD) * d2;   y2 = (w2 >= int'(MOD)) ? 1 : 0;
        w3 = w3 + int'(MOD) * y2 - int'(MOD) * d1; y3 = (w3 >= int'(MOD)) ? 1 : 0;
        d2 = d1; d1 = y3;
        expd = y1 + y3 - y3p; y3p = y3;
        @(negedge clk);
        en = 1'b0;
        check(int'(dn) == expd, $sformatf("K=%0d n=%0d dn=%0d expected %0d", k, n, dn, expd));
        check(dn >= -3'sd1 && dn <= 3'sd2, $sformatf("K=%0d level %0d out of range", k, dn));
        if (dn >= -3'sd1 && dn <= 3'sd2) level_seen[int'(dn) + 1]++;
        sum += int'(dn);
        for (int i = 3; i > 0; i--) begin
          hd[i] = hd[i-1]; he[i] = he[i-1]; hq2[i] = hq2[i-1]; hq3[i] = hq3[i-1];
        end
        hd[0]  = int'(MOD) * int'(dn) - k;
        he[0]  = e;
        hq2[0] = int'(MOD) * y2 - w2;
        hq3[0] = int'(MOD) * y3 - w3;
        if (n >= 3) begin
          lhs = hd[0] - hd[1] + hd[2];
          rhs = he[1] - 2 * he[2] + he[3]
              + hq2[0] - 2 * hq2[1] + hq2[2]
              + hq3[0] - 3 * hq3[1] + 3 * hq3[2] - hq3[3];
          check(lhs == rhs, $sformatf("K=%0d n=%0d noise-transfer identity: %0d vs %0d", k, n, lhs, rhs));
        end
        check((sum * int'(MOD) - (n + 1) * k) <= 3 * int'(MOD) &&
              ((n + 1) * k - sum * int'(MOD)) <= 3 * int'(MOD),
              $sformatf("K=%0d n=%0d running sum %0d drifts from %0d/%0d", k, n, sum, (n + 1) * k, MOD));
      end
    end
    for (int l = 0; l < 4; l++)
      check(level_seen[l] > 0, $sformatf("level %0d never produced", l - 1));
    $display("levels -1/0/+1/+2 seen %0d/%0d/%0d/%0d", level_seen[0], level_seen[1], level_seen[2], level_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
