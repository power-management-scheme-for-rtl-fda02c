// tb_bufgmux_ctrl: switches the glitch-free clock multiplexer back and forth
// between a 40 MHz and a 21.7 MHz clock at random times. Every output high and
// low phase must be at least the shorter input half period (no runt
// pulses), each switch must complete within one period of each clock
// (75 ns), and after it the output period must be that of the selected
// clock.
module tb_bufgmux_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  logic c0 = 1'b0, c1 = 1'b0, s = 1'b0, o;
  int   checks = 0, failures = 0;
  int   switches = 0;

  always #12.5 c0 = !c0;    // 40 MHz
  always #23   c1 = !c1;    // about 21.7 MHz, not a multiple of the other

  bufgmux_ctrl dut (.I0 (c0), .I1 (c1), .S (s), .O (o));

  realtime t_edge = 0;
  always @(o) begin
    if ($realtime > 1.0) begin
      checks++;
      if ($realtime - t_edge < 12.49) begin
        failures++;
        $display("runt phase of %f ns at %t", $realtime - t_edge, $realtime);
      end
    end
    t_edge = $realtime;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime p0, p1;
    #101;
    repeat (40) begin
      s = !s;
      switches++;
      #75;                                   // switch complete
      @(posedge o) p0 = $realtime;
      @(posedge o) p1 = $realtime;
      checks++;
      if ((p1 - p0) != (s ? 46.0 : 25.0)) begin
        failures++;
        $display("period %f after switch to %0d", p1 - p0, s);
      end
      #($urandom_range(1, 97));
    end
    checks++;
    if (switches != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
