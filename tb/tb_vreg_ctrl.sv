// tb_vreg_ctrl: moves the requested voltage level around and watches the
// SPI commands that reach a potentiometer model. Each accepted command must
// be the calibrated word of the level one step from the previous one, in
// the direction of the target; no command may start while holdcmd is
// high; cmd_sent must rise only once the model holds the target level; and
// a change of n levels must take n commands.
module tb_vreg_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import pmu_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, hold = 1'b1;
  fv_idx_t     target = '0, vidx;
  logic        cmd_sent, mosi, ss_n, sclk;
  logic [15:0] rx;
  logic [2:0]  lvl;
  int unsigned ncmd, nbad;
  int          checks = 0, failures = 0;
  int          prev_lvl = 0;

  always #5 clk = !clk;

  vreg_ctrl #(.SCLK_DIV(2)) dut (.clk (clk), .rst (rst), .holdcmd (hold),
    .target (target), .cmd_sent (cmd_sent), .vidx (vidx), .mosi (mosi),
    .ss_n (ss_n), .sclk (sclk));

  mcp42100_model pot (.cs_n (ss_n), .sck (sclk), .si (mosi), .last_cmd (rx),
    .ncmd (ncmd), .nbad (nbad), .level (lvl));

  // Every accepted word is a neighbour of the previous level.
  always @(ncmd) if (ncmd > 0) begin
    #0;
    checks++;
    if (lvl == 7 || (int'(lvl) != prev_lvl + 1 && int'(lvl) != prev_lvl - 1)) begin
      failures++;
      $display("command %h (level %0d) after level %0d", rx, lvl, prev_lvl);
    end
    prev_lvl = int'(lvl);
  end

  // A command only starts while the control unit allows it.
  always @(negedge ss_n) if ($realtime > 1.0) begin
    checks++;
    if (hold) begin failures++; $display("command started under holdcmd"); end
  end

  task automatic move_to(int t);
    int n0, steps;
    n0 = int'(ncmd);
    steps = (t > prev_lvl) ? t - prev_lvl : prev_lvl - t;
    @(negedge clk);
    target = fv_idx_t'(t);
    repeat (5) @(negedge clk);                // held: nothing may happen
    checks++;
    if (int'(ncmd) != n0 || cmd_sent) failures++;
    hold = 1'b0;
    @(negedge clk);
    while (!cmd_sent) @(negedge clk);
    hold = 1'b1;
    checks++;
    if (int'(lvl) != t || vidx != fv_idx_t'(t)) begin
      failures++;
      $display("cmd_sent with level %0d/%0d, target %0d", lvl, vidx, t);
    end
    checks++;
    if (int'(ncmd) - n0 != steps) begin
      failures++;
      $display("%0d commands for %0d steps", int'(ncmd) - n0, steps);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (vidx != 0 || ncmd != 0) failures++;
    move_to(5);
    move_to(2);
    move_to(3);
    move_to(0);
    move_to(0);
    for (int i = 0; i < 10; i++) move_to($urandom_range(0, 5));
    checks++;
    if (nbad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
