// dvfs_pll: behavioural model of the phase-locked loop that derives the six
// core clock frequencies of the DVFS scheme from the 100 MHz board clock.
//
// Behavioural model, not synthesizable logic: on the FPGA this is a vendor
// PLL with six outputs. clk_out[i] runs at 40 - 4*i MHz (40, 36, 32, 28, 24
// and 20 MHz), the frequencies of f-v index i. The outputs are free-running
// delay loops that start at time zero; lock time and the phase relation to
// clk_in are not modelled, so clk_in is only carried for the interface. clk_out[5] (20 MHz) is also the slowest clock given to the IO
// units.
module dvfs_pll #(
  parameter int unsigned NUM_FV = 6
) (
  input  logic              clk_in,
  output logic [NUM_FV-1:0] clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar i = 0; i < NUM_FV; i++) begin : g_out
    // Half period in ns of a (40 - 4*i) MHz clock.
    localparam realtime HALF = 500.0ns / (40.0 - 4.0 * i);
    logic osc;
    initial osc = 1'b0;
    always #(HALF) osc = !osc;
    assign clk_out[i] = osc;
  end

  logic unused_clk_in;
  assign unused_clk_in = clk_in;

endmodule
