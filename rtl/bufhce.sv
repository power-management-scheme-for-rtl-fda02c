// bufhce: behavioural model of a clock buffer with clock enable (the
// Xilinx BUFHCE primitive), one of which drives the clock tree of every
// gated module.
//
// Behavioural model, not synthesizable logic: on the FPGA this is a
// dedicated clock buffer. The enable is captured while the input clock is
// low (a transparent-low latch), so the output never produces a partial
// pulse. An enable that rises after a rising edge therefore takes effect
// only at the next rising edge: the output lags the enable by one clock
// cycle, which is why the clock-gating units raise the enable one pipeline
// stage before the gated module is used. While disabled the output is held
// low. The latch is intended, as it is the buffer's glitch-free mechanism.
//
// Ports follow the vendor primitive: I (clock in), CE (enable), O (clock).
module bufhce (
  input  logic I,
  input  logic CE,
  output logic O
);
  timeunit 1ns;
  timeprecision 1ps;


  logic ce_q;

  initial ce_q = 1'b0;

  always_latch begin
    if (!I) ce_q = CE;
  end

  assign O = I & ce_q;

endmodule
