// tb_xor_pd: self-checking testbench of the XOR phase detector.
//
// First the four input combinations are checked against the truth table. Then
// two square waves of period 360 time units are applied with the divided clock
// delayed by 0, 45, 90, 135 and 180 degrees, and the fraction of time the
// output is high is measured: it must equal phi/180 degrees (0, 1/4, 1/2, 3/4,
// 1), the detector's VDD/pi-per-radian characteristic.
module tb_xor_pd;
  logic ref_clk = 1'b0, div_clk = 1'b0;
  logic pd_out;
  int checks = 0, failures = 0;

  xor_pd dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      ref_clk = i[0];
      div_clk = i[1];
      #1;
      checks++;
      if (pd_out != (i == 1 || i == 2)) begin
        failures++;
        $display("ref=%0d div=%0d pd=%0d", ref_clk, div_clk, pd_out);
      end
    end
    for (int ph = 0; ph <= 180; ph += 45) begin
      int high;
      high = 0;
      // 20 periods of 360 units, sampled every unit
      for (int t = 0; t < 20 * 360; t++) begin
        ref_clk = ((t % 360) < 180);
        div_clk = (((t - ph + 360) % 360) < 180);
        #1;
        high += int'(pd_out);
      end
      checks++;
      if (high != 20 * 2 * ph) begin
        failures++;
        $display("phase %0d deg: high for %0d of %0d units, expected %0d", ph, high, 20 * 360, 20 * 2 * ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
