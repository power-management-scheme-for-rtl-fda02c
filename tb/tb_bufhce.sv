// tb_bufhce: checks the clock buffer model. The output must be low whenever
// the input is low, must never start or cut a pulse part-way, and an
// enable raised just after a rising edge must pass the following edge, not
// the current one (one cycle of latency); a disable likewise lets the
// current pulse finish.
module tb_bufhce;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, ce = 1'b0, o;
  int   checks = 0, failures = 0;
  int   o_rises = 0;

  bufhce dut (.I (clk), .CE (ce), .O (o));

  always #5 clk = !clk;                 // 100 MHz, rising edges at 5, 15, ...
  always @(posedge o) o_rises++;

  // No output pulse outside an input pulse, and no runt pulses.
  realtime t_rise;
  always @(posedge o) t_rise = $realtime;
  always @(negedge o) if ($realtime > 1.0) begin
    checks++;
    if ($realtime - t_rise < 4.99) begin
      failures++;
      $display("runt pulse at %t", $realtime);
    end
  end
  always @(negedge clk) begin
    #0.1;
    checks++;
    if (o !== 1'b0) failures++;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Enable rises 1 ns after the rising edge at 25 ns.
    #26 ce = 1'b1;
    #1 checks++;
    if (o !== 1'b0) begin failures++; $display("enable passed the current pulse"); end
    @(posedge clk) #0.1;               // 35 ns
    checks++;
    if (o !== 1'b1) begin failures++; $display("enable not applied at next edge"); end
    // Disable 1 ns after a rising edge: the current pulse completes.
    @(posedge clk) #1 ce = 1'b0;        // at 46 ns
    checks++;
    if (o !== 1'b1) begin failures++; $display("pulse cut by disable"); end
    @(posedge clk) #0.1;
    checks++;
    if (o !== 1'b0) begin failures++; $display("disable not applied"); end
    // Count: between 26 ns and now, pulses at 35 and 45 only.
    checks++;
    if (o_rises != 2) begin failures++; $display("o_rises=%0d", o_rises); end
    // Toggle the enable at random times for a while.
    repeat (200) begin
      #($urandom_range(1, 40)) ce = $urandom_range(0, 1) == 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
