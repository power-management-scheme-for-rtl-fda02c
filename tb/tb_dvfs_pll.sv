// tb_dvfs_pll: measures the period of each of the six PLL outputs and
// compares it with 1000 / (40 - 4*i) ns, the published frequencies
// 40, 36, 32, 28, 24 and 20 MHz, to within 2 ps. Each high and each low
// phase of ten cycles is also checked to be half a period (50 % duty).
module tb_dvfs_pll;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk100 = 1'b0;
  logic [5:0] clk;
  int         checks = 0, failures = 0;

  always #5 clk100 = !clk100;

  dvfs_pll dut (.clk_in (clk100), .clk_out (clk));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < 6; i++) begin : g_meas
    initial begin
      realtime t0, t1, exp;
      exp = 1000.0 / (40.0 - 4.0 * i);
      @(posedge clk[i]);
      @(posedge clk[i]) t0 = $realtime;
      for (int k = 0; k < 10; k++) begin
        realtime th, tl;
        th = $realtime;
        @(negedge clk[i]) tl = $realtime;
        checks++;
        if (tl - th > exp / 2 + 0.002 || tl - th < exp / 2 - 0.002) begin
          failures++;
          $display("clk_out[%0d] high for %f ns", i, tl - th);
        end
        @(posedge clk[i]);
        checks++;
        if ($realtime - tl > exp / 2 + 0.002 || $realtime - tl < exp / 2 - 0.002) begin
          failures++;
          $display("clk_out[%0d] low for %f ns", i, $realtime - tl);
        end
      end
      t1 = $realtime;
      checks++;
      if ((t1 - t0) / 10.0 > exp + 0.002 || (t1 - t0) / 10.0 < exp - 0.002) begin
        failures++;
        $display("clk_out[%0d] period %f ns, expected %f", i, (t1 - t0) / 10.0, exp);
      end
    end
  end

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
