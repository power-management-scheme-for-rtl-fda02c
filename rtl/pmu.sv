// pmu: power management unit. It holds the two power-saving mechanisms of
// the sensor node that run in hardware: clock gating of idle units, and
// dynamic voltage and frequency scaling (DVFS) of the core.
//
// Clock gating: two combinational look-up units (io_cgcu, core_cgcu) turn
// busy flags and pipeline-stage access signals into the enables of the
// clock buffers of GPIO, UART, SPI, data/stack RAM, multiplier and register
// file.
//
// DVFS: software writes an f-v index (0 = 40 MHz / 1.00 V ... 5 = 20 MHz /
// 0.90 V) into DVFSFIR over the Wishbone port. The index, written in the
// core clock domain, is brought into the 100 MHz domain by a two-flop
// synchroniser and taken once two successive samples agree. The DVFS
// control unit (dvfs_cu) then walks the core clock from clk1 to clk2 and
// back, each a six-to-one selector on the PLL outputs feeding a glitch-free
// clock multiplexer, and lets the voltage sequencer (vreg_ctrl) step the
// external regulator over SPI before a frequency rise or after a fall.
// The core keeps running throughout. The clk2 selector follows the request
// while the unit is idle, the clk1 selector takes it in RESET_CLK1, and
// the current index is that of clk1. An f-v change takes, at 100 MHz,
// 4 + 9 + 1 + 4 + 9 + 1 cycles of clock switching plus about 170 cycles per
// voltage level.
//
// Ports follow the published pin list; uopm_dvfs_busy, uopm_dvfs_cur_idx and
// uopm_dvfs_vidx are added so that the surroundings can observe a change.
// uipm_dvfs_clk_rst resets the DVFS part and returns the core clock to
// 40 MHz; uipm_dvfs_rst resets the rest (the index synchroniser).
//
// Synthesis note: the PLL (dvfs_pll) is a timed behavioural model of the
// FPGA's clock generator and has no synthesizable body, so a synthesis
// tool reports its six clock wires as used but undriven. In an FPGA build
// the model is replaced by the vendor's PLL with the same ports; the
// warning stands for that reason.
module pmu
  import pmu_pkg::*;
#(
  parameter int unsigned SCLK_DIV = 5
) (
  input  logic        clk_100mhz,
  input  logic        uipm_dvfs_clk_rst,
  input  logic        uipm_dvfs_rst,
  // DVFSFIR Wishbone port (core clock domain)
  input  logic [7:0]  uipm_dvfs_wb_w_din,
  input  logic        uipm_dvfs_wb_w_we,
  input  logic        uipm_dvfs_wb_w_stb,
  input  logic        uipm_dvfs_wb_r_we,
  input  logic        uipm_dvfs_wb_r_stb,
  output logic        uopm_dvfs_wb_w_ack,
  output logic [31:0] uopm_dvfs_wb_r_dout,
  // SPI to the regulator's digital potentiometer
  output logic        uopm_dvfs_MOSI,
  output logic        uopm_dvfs_SS_n,
  output logic        uopm_dvfs_SCLK,
  // clocks
  output logic        uopm_dvfs_clk,
  output logic        uopm_dvfs_clk_slowest,
  // observation
  output logic        uopm_dvfs_busy,
  output fv_idx_t     uopm_dvfs_cur_idx,
  output fv_idx_t     uopm_dvfs_vidx,
  // clock gating inputs
  input  logic        uipm_cg_gpio_busy,
  input  logic        uipm_cg_uart_busy,
  input  logic        uipm_cg_spi_busy,
  input  logic        uipm_cg_dmem_busy,
  input  logic        uipm_cg_dpex_we,
  input  logic        uipm_cg_dpmem_we,
  input  logic [7:0]  uipm_cg_dpmem_io_en,
  input  logic        uipm_cg_dpmem_dmem_en,
  input  logic        uipm_cg_dpex_mult_en,
  input  logic        uipm_cg_dpmem_mult_busy,
  input  logic        uipm_cg_dpwb_rf_wr,
  input  logic        uipm_cg_dp_rf_wr_en,
  // clock gating outputs
  output logic        uopm_cg_gpio_en,
  output logic        uopm_cg_uart_en,
  output logic        uopm_cg_spi_en,
  output logic        uopm_cg_dmem_en,
  output logic        uopm_cg_mult_en,
  output logic        uopm_cg_rf_en
);
  timeunit 1ns;
  timeprecision 1ps;


  // ---------------- clock gating ----------------
  io_cgcu u_io_cgcu (
    .uipm_cg_gpio_busy     (uipm_cg_gpio_busy),
    .uipm_cg_uart_busy     (uipm_cg_uart_busy),
    .uipm_cg_spi_busy      (uipm_cg_spi_busy),
    .uipm_cg_dmem_busy     (uipm_cg_dmem_busy),
    .uipm_cg_dpex_we       (uipm_cg_dpex_we),
    .uipm_cg_dpmem_we      (uipm_cg_dpmem_we),
    .uipm_cg_dpmem_io_en   (uipm_cg_dpmem_io_en),
    .uipm_cg_dpmem_dmem_en (uipm_cg_dpmem_dmem_en),
    .uopm_cg_gpio_en       (uopm_cg_gpio_en),
    .uopm_cg_uart_en       (uopm_cg_uart_en),
    .uopm_cg_spi_en        (uopm_cg_spi_en),
    .uopm_cg_dmem_en       (uopm_cg_dmem_en)
  );

  core_cgcu u_core_cgcu (
    .uipm_cg_dpex_mult_en    (uipm_cg_dpex_mult_en),
    .uipm_cg_dpmem_mult_busy (uipm_cg_dpmem_mult_busy),
    .uipm_cg_dpwb_rf_wr      (uipm_cg_dpwb_rf_wr),
    .uipm_cg_dp_rf_wr_en     (uipm_cg_dp_rf_wr_en),
    .uopm_cg_mult_en         (uopm_cg_mult_en),
    .uopm_cg_rf_en           (uopm_cg_rf_en)
  );

  // ---------------- DVFSFIR (core clock domain) ----------------
  fv_idx_t fir;

  dvfs_fir u_fir (
    .clk       (uopm_dvfs_clk),
    .rst       (uipm_dvfs_clk_rst),
    .wb_w_din  (uipm_dvfs_wb_w_din),
    .wb_w_we   (uipm_dvfs_wb_w_we),
    .wb_w_stb  (uipm_dvfs_wb_w_stb),
    .wb_w_ack  (uopm_dvfs_wb_w_ack),
    .wb_r_we   (uipm_dvfs_wb_r_we),
    .wb_r_stb  (uipm_dvfs_wb_r_stb),
    .wb_r_dout (uopm_dvfs_wb_r_dout),
    .fir       (fir)
  );

  // ---------------- index into the 100 MHz domain ----------------
  fv_idx_t fir_q2, fir_q3, fir_req;
  logic    sync_rst;
  assign sync_rst = uipm_dvfs_rst | uipm_dvfs_clk_rst;

  sync2ff #(.WIDTH(FV_IDX_W)) u_fir_sync (
    .clk (clk_100mhz), .rst (sync_rst), .d (fir), .q (fir_q2));

  always_ff @(posedge clk_100mhz) begin
    if (sync_rst) begin
      fir_q3  <= FV_FASTEST;
      fir_req <= FV_FASTEST;
    end else begin
      fir_q3 <= fir_q2;
      if (fir_q2 == fir_q3) fir_req <= fir_q2;
    end
  end

  // ---------------- DVFS control unit ----------------
  dvfs_state_t cu_state;
  logic        holdcmd, cmd_sent, clk1_rst, clk2_rst, fready, clkssel;
  logic        load_clk1, load_clk2;
  fv_idx_t     clk1_sel, clk2_sel, new_idx;
  logic [1:0]  fchange;

  // The request compared with the current frequency: the live request
  // while idle, the one being applied afterwards.
  assign new_idx = (cu_state == RESET_CLK2) ? fir_req : clk2_sel;

  always_comb begin
    if (new_idx == clk1_sel)     fchange = FCHG_EQUAL;
    else if (new_idx < clk1_sel) fchange = FCHG_HIGHER;  // smaller index = faster
    else                         fchange = FCHG_LOWER;
  end

  dvfs_cu u_cu (
    .sbifs_clk       (clk_100mhz),
    .sbifs_rst       (uipm_dvfs_clk_rst),
    .sbifs_fchange   (fchange),
    .sbifs_cmd_sent  (cmd_sent),
    .sbofs_holdcmd   (holdcmd),
    .sbofs_busy      (uopm_dvfs_busy),
    .sbofs_clk1_rst  (clk1_rst),
    .sbofs_clk2_rst  (clk2_rst),
    .sbofs_fready    (fready),
    .sbofs_clkssel   (clkssel),
    .sbofs_load_clk1 (load_clk1),
    .sbofs_load_clk2 (load_clk2),
    .state           (cu_state)
  );

  always_ff @(posedge clk_100mhz) begin
    if (uipm_dvfs_clk_rst) begin
      clk1_sel <= FV_FASTEST;
      clk2_sel <= FV_FASTEST;
    end else begin
      if (load_clk2) clk2_sel <= fir_req;
      if (load_clk1) clk1_sel <= clk2_sel;
    end
  end

  assign uopm_dvfs_cur_idx = clk1_sel;

  // ---------------- voltage sequencer and SPI ----------------
  vreg_ctrl #(.SCLK_DIV(SCLK_DIV)) u_vreg (
    .clk      (clk_100mhz),
    .rst      (uipm_dvfs_clk_rst),
    .holdcmd  (holdcmd),
    .target   (clk2_sel),
    .cmd_sent (cmd_sent),
    .vidx     (uopm_dvfs_vidx),
    .mosi     (uopm_dvfs_MOSI),
    .ss_n     (uopm_dvfs_SS_n),
    .sclk     (uopm_dvfs_SCLK)
  );

  // ---------------- clocks ----------------
  logic [NUM_FV-1:0] pll_clk;
  logic              clk1, clk2;

  dvfs_pll #(.NUM_FV(NUM_FV)) u_pll (.clk_in (clk_100mhz), .clk_out (pll_clk));

  clk_mux6 u_clk1_mux (.clk_in (pll_clk), .sel (clk1_sel), .rst (clk1_rst), .clk_out (clk1));
  clk_mux6 u_clk2_mux (.clk_in (pll_clk), .sel (clk2_sel), .rst (clk2_rst), .clk_out (clk2));

  bufgmux_ctrl u_bufgmux (.I0 (clk1), .I1 (clk2), .S (clkssel), .O (uopm_dvfs_clk));

  assign uopm_dvfs_clk_slowest = pll_clk[FV_SLOWEST];

  // The voltage is never below what the running clock needs: a higher
  // index means a lower voltage and must not be applied to a faster clock.
  a_volt_safe: assert property (@(posedge clk_100mhz) disable iff (uipm_dvfs_clk_rst)
    (cu_state == RESET_CLK2) |-> (uopm_dvfs_vidx <= clk1_sel));

  logic unused_fready;
  assign unused_fready = fready;

endmodule
