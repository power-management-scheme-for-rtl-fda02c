// bufgmux_ctrl: behavioural model of a glitch-free 2:1 clock multiplexer
// (the Xilinx BUFGMUX_CTRL primitive) that hands the core clock between the
// two clock sources clk1 and clk2 of the DVFS scheme.
//
// Behavioural model, not synthesizable logic. It is the usual
// cross-coupled handshake: when S changes, the currently selected input is
// released on its own falling edge, and only after that is the other input
// enabled on its falling edge. The output is therefore low for a moment
// between the two clocks but never carries a runt pulse. A switch takes at
// most one period of each clock; the DVFS control unit waits nine 100 MHz
// cycles for it, which covers two 20 MHz half periods plus margin. Both
// inputs must be running while a switch is in progress.
//
// Ports: I0 (selected when S = 0), I1 (selected when S = 1), S, O.
module bufgmux_ctrl (
  input  logic I0,
  input  logic I1,
  input  logic S,
  output logic O
);
  timeunit 1ns;
  timeprecision 1ps;


  logic en0, en1;

  initial begin
    en0 = 1'b1;
    en1 = 1'b0;
  end

  always @(negedge I0) en0 <= !S && !en1;
  always @(negedge I1) en1 <= S && !en0;

  assign O = (I0 & en0) | (I1 & en1);

endmodule
