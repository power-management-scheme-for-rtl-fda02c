// tb_dvfs_cu: drives the DVFS control unit through a frequency decrease and
// a frequency increase, with the voltage acknowledge (cmd_sent) delayed.
// A reference sequence of states and the number of cycles spent in each
// (4 for SET_CLK1/2, 9 for SOURCE_CLK1/2, 1 for RESET_CLK1, the wait for
// cmd_sent in WAIT_VOLT1/2) is compared with the unit's state at every
// clock, and the outputs of every state with an independent copy of the
// output table.
module tb_dvfs_cu;
  timeunit 1ns;
  timeprecision 1ps;
  import pmu_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [1:0]  fchange = 2'b00;
  logic        cmd_sent = 1'b0;
  logic        holdcmd, busy, clk1_rst, clk2_rst, fready, clkssel, load1, load2;
  dvfs_state_t state;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  dvfs_cu dut (.sbifs_clk (clk), .sbifs_rst (rst), .sbifs_fchange (fchange),
    .sbifs_cmd_sent (cmd_sent), .sbofs_holdcmd (holdcmd), .sbofs_busy (busy),
    .sbofs_clk1_rst (clk1_rst), .sbofs_clk2_rst (clk2_rst),
    .sbofs_fready (fready), .sbofs_clkssel (clkssel),
    .sbofs_load_clk1 (load1), .sbofs_load_clk2 (load2), .state (state));

  // {holdcmd, busy, clk1_rst, clk2_rst, fready, clkssel}
  function automatic logic [5:0] exp_out(dvfs_state_t s);
    case (s)
      RESET_CLK2:  return 6'b100100;
      SET_CLK2:    return 6'b110000;
      WAIT_VOLT1:  return 6'b010000;
      SOURCE_CLK2: return 6'b110001;
      RESET_CLK1:  return 6'b111011;
      SET_CLK1:    return 6'b110001;
      SOURCE_CLK1: return 6'b110000;
      WAIT_VOLT2:  return 6'b010000;
      default:     return 6'b000000;
    endcase
  endfunction

  task automatic expect_state(dvfs_state_t s, int cycles);
    for (int c = 0; c < cycles; c++) begin
      checks++;
      if (state !== s) begin
        failures++;
        $display("%t: state %s, expected %s (cycle %0d of %0d)", $realtime, state.name(), s.name(), c, cycles);
      end
      checks++;
      if ({holdcmd, busy, clk1_rst, clk2_rst, fready, clkssel} !== exp_out(state)) begin
        failures++;
        $display("%t: outputs %b in %s", $realtime, {holdcmd, busy, clk1_rst, clk2_rst, fready, clkssel}, state.name());
      end
      @(negedge clk);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_state(RESET_CLK2, 3);              // equal: stay idle
    // Lower frequency: no WAIT_VOLT1, voltage lowered in WAIT_VOLT2.
    fchange = 2'b10;
    expect_state(RESET_CLK2, 1);
    expect_state(SET_CLK2, 4);
    expect_state(SOURCE_CLK2, 9);
    fchange = 2'b00;                          // clk1 now at the new frequency
    expect_state(RESET_CLK1, 1);
    expect_state(SET_CLK1, 4);
    expect_state(SOURCE_CLK1, 9);
    expect_state(WAIT_VOLT2, 6);              // waits for the voltage
    cmd_sent = 1'b1;
    expect_state(WAIT_VOLT2, 1);
    cmd_sent = 1'b0;
    expect_state(RESET_CLK2, 2);
    // Higher frequency: voltage raised first in WAIT_VOLT1.
    fchange = 2'b11;
    expect_state(RESET_CLK2, 1);
    expect_state(SET_CLK2, 4);
    expect_state(WAIT_VOLT1, 5);
    cmd_sent = 1'b1;
    expect_state(WAIT_VOLT1, 1);
    expect_state(SOURCE_CLK2, 9);
    fchange = 2'b00;
    expect_state(RESET_CLK1, 1);
    expect_state(SET_CLK1, 4);
    expect_state(SOURCE_CLK1, 9);
    expect_state(WAIT_VOLT2, 1);              // voltage already set
    expect_state(RESET_CLK2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
