// vreg_ctrl: voltage sequencer of the DVFS scheme. It moves the external
// regulator's output to the voltage of the requested f-v pair, one 20 mV
// level at a time.
//
// The regulator's voltage is set by a digital potentiometer that takes a
// 16-bit SPI command; the command of each level is the calibrated word of
// that f-v pair. While holdcmd is low (the DVFS control unit's two
// voltage-wait states) and the applied level vidx differs from target, the
// sequencer sends the command of the next level toward target and, once the
// word has gone out, records that level as applied. cmd_sent is high when
// holdcmd is low, the applied level equals target and no command is in
// flight: it is the acknowledge the DVFS control unit waits for. While
// holdcmd is high no new command starts (one in flight is completed).
// After reset the level is 0 (1.00 V), the regulator's default, and no
// command is sent. Stepping through every level rather than jumping is this
// design's reading of "step-by-step". Clock: 100 MHz.
module vreg_ctrl
  import pmu_pkg::*;
#(
  parameter int unsigned SCLK_DIV = 5
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    holdcmd,
  input  fv_idx_t target,
  output logic    cmd_sent,
  output fv_idx_t vidx,
  output logic    mosi,
  output logic    ss_n,
  output logic    sclk
);
  timeunit 1ns;
  timeprecision 1ps;


  fv_idx_t     next_lvl, pend_lvl;
  logic        spi_start, spi_busy, spi_done, inflight;
  logic [15:0] spi_cmd;

  assign next_lvl  = (vidx > target) ? vidx - 1'b1 : vidx + 1'b1;
  assign spi_start = !holdcmd && !inflight && (vidx != target);
  assign spi_cmd   = fv_spi_cmd(next_lvl);
  assign cmd_sent  = !holdcmd && !inflight && (vidx == target);

  always_ff @(posedge clk) begin
    if (rst) begin
      vidx     <= FV_FASTEST;
      pend_lvl <= FV_FASTEST;
      inflight <= 1'b0;
    end else if (spi_start) begin
      pend_lvl <= next_lvl;
      inflight <= 1'b1;
    end else if (spi_done) begin
      vidx     <= pend_lvl;
      inflight <= 1'b0;
    end
  end

  spi_master #(.WIDTH(16), .SCLK_DIV(SCLK_DIV)) u_spi (
    .clk   (clk),
    .rst   (rst),
    .start (spi_start),
    .cmd   (spi_cmd),
    .busy  (spi_busy),
    .done  (spi_done),
    .mosi  (mosi),
    .ss_n  (ss_n),
    .sclk  (sclk)
  );

  a_one_level_steps: assert property (@(posedge clk) disable iff (rst)
    spi_done |-> (pend_lvl == vidx + 1'b1) || (pend_lvl + 1'b1 == vidx));
  a_busy_matches: assert property (@(posedge clk) disable iff (rst)
    spi_busy |-> inflight);

endmodule
