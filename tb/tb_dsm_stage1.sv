// tb_dsm_stage1: self-checking testbench of the first modulator stage.
//
// The expected output is worked out from the running sum S of all fractional
// words taken so far: the stage is a modulo-MOD accumulator, so after a sample
// e1 = S mod MOD and y1 = floor(S/MOD) - floor(S_prev/MOD). The fractional word
// changes every 37 samples and en is held low now and then, which must freeze
// the state.
module tb_dsm_stage1;
  localparam int unsigned MOD = 10;
  localparam int unsigned KW  = mash_pkg::k_width(MOD);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [KW-1:0] frac_k = '0;
  logic y1;
  logic signed [KW:0] e1;
  int checks = 0, failures = 0;
  longint s_sum = 0;

  dsm_stage1 #(.MOD(MOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s_new;
    int ones;
    ones = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (n % 37 == 0) frac_k = KW'($urandom_range(MOD - 1));
      en = ($urandom_range(9) != 0);
      #1;
      s_new = s_sum + longint'(frac_k);
      checks++;
      if (int'(e1) != int'(s_new % longint'(MOD)) ||
          int'(y1) != int'(s_new / longint'(MOD) - s_sum / longint'(MOD))) begin
        failures++;
        if (failures < 10)
          $display("n=%0d K=%0d: got y1=%0d e1=%0d, expected y1=%0d e1=%0d", n, frac_k,
                   y1, e1, s_new / longint'(MOD) - s_sum / longint'(MOD), s_new % longint'(MOD));
      end
      if (en) begin
        s_sum = s_new;
        ones += int'(y1);
      end
    end
    // Density: the number of carries equals floor(S/MOD).
    checks++;
    if (longint'(ones) != s_sum / longint'(MOD)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
