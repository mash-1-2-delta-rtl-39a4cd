// tb_dsm_stage23: self-checking testbench of the second-order loop (stages 2, 3).
//
// A reference model steps the loop's difference equations in plain integers:
//   w2 += e1 - MOD*y3[n-2];  y2 = w2 >= MOD
//   w3 += MOD*y2 - MOD*y3[n-1];  y3 = w3 >= MOD
// and both quantiser outputs are compared every sample. The input is a random
// stage-1 error in [0, MOD). Since the loop's signal transfer function has unit
// gain at DC, the number of y3 ones times MOD must track the sum of the inputs
// within a few units; that is checked at the end as well.
module tb_dsm_stage23;
  localparam int unsigned MOD = 10;
  localparam int unsigned KW  = mash_pkg::k_width(MOD);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [KW:0] e1 = '0;
  logic y2, y3;
  int checks = 0, failures = 0;

  dsm_stage23 #(.MOD(MOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w2, w3, d1, d2, nw2, nw3, ey2, ey3;
    longint sum_in, sum_y3;
    w2 = 0; w3 = 0; d1 = 0; d2 = 0; sum_in = 0; sum_y3 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      e1 = (KW+1)'($urandom_range(MOD - 1));
      en = ($urandom_range(7) != 0);
      #1;
      nw2 = w2 + int'(e1) - int'(MOD) * d2;
      ey2 = (nw2 >= int'(MOD)) ? 1 : 0;
      nw3 = w3 + int'(MOD) * ey2 - int'(MOD) * d1;
      ey3 = (nw3 >= int'(MOD)) ? 1 : 0;
      checks++;
      if (int'(y2) != ey2 || int'(y3) != ey3) begin
        failures++;
        if (failures < 10) $display("n=%0d: got y2=%0d y3=%0d, expected %0d %0d", n, y2, y3, ey2, ey3);
      end
      if (en) begin
        w2 = nw2; w3 = nw3; d2 = d1; d1 = ey3;
        sum_in += longint'(e1);
        sum_y3 += longint'(MOD) * ey3;
      end
    end
    checks++;
    if (sum_in - sum_y3 > 3 * longint'(MOD) || sum_y3 - sum_in > 3 * longint'(MOD)) begin
      failures++;
      $display("DC gain: inputs %0d, outputs %0d", sum_in, sum_y3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
