// dvfs_cu: DVFS control unit, the finite state machine that changes the
// core's frequency-voltage pair without stopping the core.
//
// The core clock comes from one of two clock sources, clk1 and clk2, each a
// selector on the PLL outputs, through a glitch-free clock multiplexer. At
// rest (RESET_CLK2) the core runs on clk1 and clk2 is stopped. On a request
// (sbifs_fchange[1]) the unit starts clk2 at the new frequency (SET_CLK2,
// four cycles to settle). For a faster pair it first waits for the
// regulator to reach the higher voltage (WAIT_VOLT1). It then moves the core
// onto clk2 (SOURCE_CLK2, nine cycles for the multiplexer), stops clk1 and
// loads its selector (RESET_CLK1), restarts it at the new frequency
// (SET_CLK1, four cycles), moves the core back to clk1 (SOURCE_CLK1, nine
// cycles) and finally, for a slower pair, waits for the voltage to come
// down (WAIT_VOLT2). So the voltage always rises before and falls after the
// frequency change. sbofs_holdcmd is low only in the two WAIT_VOLT states,
// which are the only times the voltage sequencer may change the regulator
// command.
//
// States, transitions, the 4- and 9-cycle counts and the output table are
// the published design. This implementation's own choices: WAIT_VOLT2 waits
// in itself (the published table has it fall back to WAIT_VOLT1, which its
// state diagram does not); sbofs_clk1_rst is raised in RESET_CLK1 (the
// published output table sets it nowhere); sbofs_clkssel is also raised in
// SOURCE_CLK2, so that the nine-cycle wait covers the switch to clk2; and
// sbofs_load_clk1/2 tell the surrounding unit when to load the selectors.
//
// Clock: sbifs_clk, 100 MHz. Reset: synchronous, active high.
module dvfs_cu
  import pmu_pkg::*;
#(
  parameter int unsigned BUFGMUX_CYCLES    = 9,
  parameter int unsigned CLKCOUNTER_CYCLES = 4
) (
  input  logic       sbifs_clk,
  input  logic       sbifs_rst,
  input  logic [1:0] sbifs_fchange,
  input  logic       sbifs_cmd_sent,
  output logic       sbofs_holdcmd,
  output logic       sbofs_busy,
  output logic       sbofs_clk1_rst,
  output logic       sbofs_clk2_rst,
  output logic       sbofs_fready,
  output logic       sbofs_clkssel,
  output logic       sbofs_load_clk1,
  output logic       sbofs_load_clk2,
  output dvfs_state_t state
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned MAXC = (BUFGMUX_CYCLES > CLKCOUNTER_CYCLES) ?
                                 BUFGMUX_CYCLES : CLKCOUNTER_CYCLES;
  localparam int unsigned CW = $clog2(MAXC) + 1;

  dvfs_state_t state_d;
  logic [CW-1:0] bufgmux_cnt, clkcounter_cnt;
  logic bufgmux_cnt_rst, clkcounter_cnt_rst;
  logic bufgmux_terminate, clkcounter_terminate;

  assign bufgmux_terminate    = (bufgmux_cnt    == CW'(BUFGMUX_CYCLES - 1));
  assign clkcounter_terminate = (clkcounter_cnt == CW'(CLKCOUNTER_CYCLES - 1));

  always_comb begin
    state_d = state;
    unique case (state)
      RESET_CLK2:  if (sbifs_fchange[1]) state_d = SET_CLK2;
      SET_CLK2:    if (clkcounter_terminate)
                     state_d = sbifs_fchange[0] ? WAIT_VOLT1 : SOURCE_CLK2;
      WAIT_VOLT1:  if (sbifs_cmd_sent) state_d = SOURCE_CLK2;
      SOURCE_CLK2: if (bufgmux_terminate) state_d = RESET_CLK1;
      RESET_CLK1:  state_d = SET_CLK1;
      SET_CLK1:    if (clkcounter_terminate) state_d = SOURCE_CLK1;
      SOURCE_CLK1: if (bufgmux_terminate) state_d = WAIT_VOLT2;
      WAIT_VOLT2:  if (sbifs_cmd_sent) state_d = RESET_CLK2;
      default:     state_d = RESET_CLK2;
    endcase
  end

  // Output table, one row per state.
  always_comb begin
    sbofs_holdcmd      = 1'b0;
    sbofs_busy         = 1'b0;
    sbofs_clk1_rst     = 1'b0;
    sbofs_clk2_rst     = 1'b0;
    sbofs_fready       = 1'b0;
    sbofs_clkssel      = 1'b0;
    bufgmux_cnt_rst    = 1'b0;
    clkcounter_cnt_rst = 1'b0;
    unique case (state)
      RESET_CLK2: begin
        sbofs_holdcmd = 1'b1; sbofs_clk2_rst = 1'b1;
        bufgmux_cnt_rst = 1'b1; clkcounter_cnt_rst = 1'b1;
      end
      SET_CLK2: begin
        sbofs_holdcmd = 1'b1; sbofs_busy = 1'b1; bufgmux_cnt_rst = 1'b1;
      end
      WAIT_VOLT1: begin
        sbofs_busy = 1'b1; bufgmux_cnt_rst = 1'b1; clkcounter_cnt_rst = 1'b1;
      end
      SOURCE_CLK2: begin
        sbofs_holdcmd = 1'b1; sbofs_busy = 1'b1; sbofs_clkssel = 1'b1;
        clkcounter_cnt_rst = 1'b1;
      end
      RESET_CLK1: begin
        sbofs_holdcmd = 1'b1; sbofs_busy = 1'b1; sbofs_fready = 1'b1;
        sbofs_clkssel = 1'b1; sbofs_clk1_rst = 1'b1;
        bufgmux_cnt_rst = 1'b1; clkcounter_cnt_rst = 1'b1;
      end
      SET_CLK1: begin
        sbofs_holdcmd = 1'b1; sbofs_busy = 1'b1; sbofs_clkssel = 1'b1;
        bufgmux_cnt_rst = 1'b1;
      end
      SOURCE_CLK1: begin
        sbofs_holdcmd = 1'b1; sbofs_busy = 1'b1; clkcounter_cnt_rst = 1'b1;
      end
      WAIT_VOLT2: begin
        sbofs_busy = 1'b1; bufgmux_cnt_rst = 1'b1; clkcounter_cnt_rst = 1'b1;
      end
      default: ;
    endcase
  end

  assign sbofs_load_clk2 = (state == RESET_CLK2);
  assign sbofs_load_clk1 = (state == RESET_CLK1);

  always_ff @(posedge sbifs_clk) begin
    if (sbifs_rst) begin
      state          <= RESET_CLK2;
      bufgmux_cnt    <= '0;
      clkcounter_cnt <= '0;
    end else begin
      state          <= state_d;
      bufgmux_cnt    <= bufgmux_cnt_rst    ? '0 : bufgmux_cnt + 1'b1;
      clkcounter_cnt <= clkcounter_cnt_rst ? '0 : clkcounter_cnt + 1'b1;
    end
  end

  // The selectors only change while their clock is stopped or not in use.
  a_clkssel_safe: assert property (@(posedge sbifs_clk) disable iff (sbifs_rst)
    sbofs_load_clk1 |-> sbofs_clkssel);

endmodule
