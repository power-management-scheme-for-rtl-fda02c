// tb_clk_mux6: exhaustive check of the clock selector as a combinational
// function: every input pattern, select value and reset. The output must be
// the selected input, the slowest input for selects above 5, and 0 in
// reset.
module tb_clk_mux6;
  timeunit 1ns;
  timeprecision 1ps;

  logic [5:0] cin;
  logic [2:0] sel;
  logic       rst, cout, exp;
  int         checks = 0, failures = 0;

  clk_mux6 dut (.clk_in (cin), .sel (sel), .rst (rst), .clk_out (cout));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 10); v++) begin
      {rst, sel, cin} = 10'(v);
      #1;
      if (rst)           exp = 1'b0;
      else if (sel >= 6) exp = cin[5];
      else               exp = cin[sel];
      checks++;
      if (cout !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
