// clk_mux6: six-to-one clock selector, one per clock source (clk1 and clk2)
// of the DVFS scheme.
//
// It passes the PLL output chosen by the f-v index sel, and holds its
// output low while rst is set (the "reset clk1 / reset clk2" of the DVFS
// control unit). Indexes above 5 select the slowest clock. The selector
// glitches if sel changes while the output is in use; the DVFS control unit
// only changes sel while the output is held in reset, and lets it run for
// four 100 MHz cycles before using it.
module clk_mux6 (
  input  logic [5:0] clk_in,
  input  logic [2:0] sel,
  input  logic       rst,
  output logic       clk_out
);
  timeunit 1ns;
  timeprecision 1ps;


  always_comb begin
    if (rst)            clk_out = 1'b0;
    else if (sel > 3'd5) clk_out = clk_in[5];
    else                clk_out = clk_in[sel];
  end

endmodule
