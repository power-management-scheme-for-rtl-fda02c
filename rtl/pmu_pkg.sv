// pmu_pkg: types and constants shared by the power management unit.
//
// The unit supports six frequency-voltage (f-v) pairs, selected by a
// 3-bit index written into the DVFS frequency index register (DVFSFIR).
// Index 0 is the fastest pair (40 MHz, 1.00 V) and index 5 the slowest
// (20 MHz, 0.90 V), in steps of 4 MHz and 20 mV. For each pair the
// package holds the 16-bit SPI word that sets the digital potentiometer
// of the external regulator to that voltage. The six frequencies, the
// voltages and the SPI words are the published calibration values of the
// design; the state encoding of the DVFS control unit is this
// implementation's own (plain binary).
package pmu_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NUM_FV = 6;           // number of f-v pairs
  localparam int unsigned FV_IDX_W = 3;         // width of an f-v index

  typedef logic [FV_IDX_W-1:0] fv_idx_t;

  localparam fv_idx_t FV_FASTEST = 3'd0;        // 40 MHz, 1.00 V (reset)
  localparam fv_idx_t FV_SLOWEST = 3'd5;        // 20 MHz, 0.90 V

  // SPI command words for the digital potentiometer, one per f-v index.
  function automatic logic [15:0] fv_spi_cmd(fv_idx_t idx);
    case (idx)
      3'd0:    return 16'h12F9;  // 1.00 V
      3'd1:    return 16'h1277;  // 0.98 V
      3'd2:    return 16'h1242;  // 0.96 V
      3'd3:    return 16'h1229;  // 0.94 V
      3'd4:    return 16'h1218;  // 0.92 V
      default: return 16'h120D;  // 0.90 V
    endcase
  endfunction

  // Core clock frequency of an f-v index, in MHz: 40 - 4*idx.
  function automatic int unsigned fv_freq_mhz(fv_idx_t idx);
    return 40 - 4 * int'(idx);
  endfunction

  // Supply voltage of an f-v index, in mV: 1000 - 20*idx.
  function automatic int unsigned fv_millivolt(fv_idx_t idx);
    return 1000 - 20 * int'(idx);
  endfunction

  // Frequency-change request seen by the DVFS control unit.
  typedef enum logic [1:0] {
    FCHG_EQUAL  = 2'b00,
    FCHG_LOWER  = 2'b10,  // new frequency below the current one
    FCHG_HIGHER = 2'b11   // new frequency above the current one
  } fchange_t;

  // States of the DVFS control unit.
  typedef enum logic [2:0] {
    RESET_CLK2  = 3'd0,
    SET_CLK2    = 3'd1,
    WAIT_VOLT1  = 3'd2,
    SOURCE_CLK2 = 3'd3,
    RESET_CLK1  = 3'd4,
    SET_CLK1    = 3'd5,
    SOURCE_CLK1 = 3'd6,
    WAIT_VOLT2  = 3'd7
  } dvfs_state_t;

endpackage
