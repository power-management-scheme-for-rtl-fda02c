// sync2ff: two flip-flop synchroniser for a multi-bit value that changes by
// at most one bit at a time (a Gray-coded pointer or a slowly changing
// index). The value is sampled by two flops in series in the destination
// clock; q lags d by two destination clock edges. Reset clears both flops.
module sync2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
