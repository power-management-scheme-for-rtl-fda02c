// risc32lp_pm_top: the power-management hardware of the RISC32-LP sensor
// node, i.e. everything between the processor core, memories and IO units
// and their clocks.
//
// It contains the power management unit (clock-gating control, DVFS
// register and control unit, voltage sequencer, PLL and clock switching),
// one glitch-free clock buffer per gated module, the two clock-domain
// crossing FIFOs that carry bytes from the core (variable clock, 20 to
// 40 MHz) to the UART and SPI units (fixed IO clock), and the
// partial-reconfiguration controller that swaps the core between its
// pipelined and multi-cycle datapaths on a TMA instruction.
//
// The core, memories, IO units, flash controller and ICAP are outside:
// their signals are ports. Gated clocks: GPIO, UART and SPI get the slowest
// (20 MHz) clock, and the multiplier, register file, stack RAM and data
// RAM the core clock, each through its own buffer; the stack and data RAM
// buffers share one enable. The FIFOs' read sides run on the ungated
// 20 MHz IO clock, so that they can be reset and drained whatever the
// gating. Resets: uipm_dvfs_clk_rst resets the DVFS part (core clock back
// to 40 MHz); uipm_dvfs_rst resets the rest, synchronously to each clock.
//
// Which clock feeds which buffer, the shared RAM enable and the place of
// the FIFOs between core and serial units follow the published block
// diagrams; clocking the FIFO read sides from the ungated IO clock, the
// FIFO width and the flash/ICAP handshakes are this design's choices.
// The undriven-clock warning a synthesis tool gives comes from the
// behavioural PLL inside the PMU (see pmu.sv).
module risc32lp_pm_top
  import pmu_pkg::*;
#(
  parameter int unsigned SCLK_DIV        = 5,
  parameter int unsigned CDC_DATA_SIZE   = 8,
  parameter int unsigned BITSTREAM_WORDS = 43906
) (
  input  logic        clk_100mhz,
  input  logic        uipm_dvfs_clk_rst,
  input  logic        uipm_dvfs_rst,
  // DVFSFIR Wishbone port
  input  logic [7:0]  uipm_dvfs_wb_w_din,
  input  logic        uipm_dvfs_wb_w_we,
  input  logic        uipm_dvfs_wb_w_stb,
  input  logic        uipm_dvfs_wb_r_we,
  input  logic        uipm_dvfs_wb_r_stb,
  output logic        uopm_dvfs_wb_w_ack,
  output logic [31:0] uopm_dvfs_wb_r_dout,
  // regulator SPI
  output logic        uopm_dvfs_MOSI,
  output logic        uopm_dvfs_SS_n,
  output logic        uopm_dvfs_SCLK,
  // clocks
  output logic        uopm_dvfs_clk,
  output logic        uopm_dvfs_clk_slowest,
  output logic        uopm_dvfs_busy,
  output fv_idx_t     uopm_dvfs_cur_idx,
  output fv_idx_t     uopm_dvfs_vidx,
  // clock-gating inputs
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
  // gated clocks
  output logic        gpio_clk,
  output logic        uart_clk,
  output logic        spi_clk,
  output logic        stack_ram_clk,
  output logic        data_ram_clk,
  output logic        mult_clk,
  output logic        rf_clk,
  // core -> UART crossing
  input  logic [CDC_DATA_SIZE-1:0] uart_tx_data,
  input  logic                     uart_tx_put,
  output logic                     uart_tx_wrdy,
  output logic                     uart_tx_wempty,
  input  logic                     uart_tx_get,
  output logic                     uart_tx_rrdy,
  output logic [CDC_DATA_SIZE-1:0] uart_tx_dout,
  // core -> SPI crossing
  input  logic [CDC_DATA_SIZE-1:0] spi_tx_data,
  input  logic                     spi_tx_put,
  output logic                     spi_tx_wrdy,
  output logic                     spi_tx_wempty,
  input  logic                     spi_tx_get,
  output logic                     spi_tx_rrdy,
  output logic [CDC_DATA_SIZE-1:0] spi_tx_dout,
  // partial reconfiguration
  input  logic        tma,
  output logic        pr_stall,
  output logic        pr_mode_pe,
  output logic        pr_busy,
  output logic        flash_req,
  output logic [31:0] flash_addr,
  input  logic        flash_valid,
  input  logic [31:0] flash_data,
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_data
);
  timeunit 1ns;
  timeprecision 1ps;


  logic cg_gpio_en, cg_uart_en, cg_spi_en, cg_dmem_en, cg_mult_en, cg_rf_en;

  pmu #(.SCLK_DIV(SCLK_DIV)) u_pmu (
    .clk_100mhz              (clk_100mhz),
    .uipm_dvfs_clk_rst       (uipm_dvfs_clk_rst),
    .uipm_dvfs_rst           (uipm_dvfs_rst),
    .uipm_dvfs_wb_w_din      (uipm_dvfs_wb_w_din),
    .uipm_dvfs_wb_w_we       (uipm_dvfs_wb_w_we),
    .uipm_dvfs_wb_w_stb      (uipm_dvfs_wb_w_stb),
    .uipm_dvfs_wb_r_we       (uipm_dvfs_wb_r_we),
    .uipm_dvfs_wb_r_stb      (uipm_dvfs_wb_r_stb),
    .uopm_dvfs_wb_w_ack      (uopm_dvfs_wb_w_ack),
    .uopm_dvfs_wb_r_dout     (uopm_dvfs_wb_r_dout),
    .uopm_dvfs_MOSI          (uopm_dvfs_MOSI),
    .uopm_dvfs_SS_n          (uopm_dvfs_SS_n),
    .uopm_dvfs_SCLK          (uopm_dvfs_SCLK),
    .uopm_dvfs_clk           (uopm_dvfs_clk),
    .uopm_dvfs_clk_slowest   (uopm_dvfs_clk_slowest),
    .uopm_dvfs_busy          (uopm_dvfs_busy),
    .uopm_dvfs_cur_idx       (uopm_dvfs_cur_idx),
    .uopm_dvfs_vidx          (uopm_dvfs_vidx),
    .uipm_cg_gpio_busy       (uipm_cg_gpio_busy),
    .uipm_cg_uart_busy       (uipm_cg_uart_busy),
    .uipm_cg_spi_busy        (uipm_cg_spi_busy),
    .uipm_cg_dmem_busy       (uipm_cg_dmem_busy),
    .uipm_cg_dpex_we         (uipm_cg_dpex_we),
    .uipm_cg_dpmem_we        (uipm_cg_dpmem_we),
    .uipm_cg_dpmem_io_en     (uipm_cg_dpmem_io_en),
    .uipm_cg_dpmem_dmem_en   (uipm_cg_dpmem_dmem_en),
    .uipm_cg_dpex_mult_en    (uipm_cg_dpex_mult_en),
    .uipm_cg_dpmem_mult_busy (uipm_cg_dpmem_mult_busy),
    .uipm_cg_dpwb_rf_wr      (uipm_cg_dpwb_rf_wr),
    .uipm_cg_dp_rf_wr_en     (uipm_cg_dp_rf_wr_en),
    .uopm_cg_gpio_en         (cg_gpio_en),
    .uopm_cg_uart_en         (cg_uart_en),
    .uopm_cg_spi_en          (cg_spi_en),
    .uopm_cg_dmem_en         (cg_dmem_en),
    .uopm_cg_mult_en         (cg_mult_en),
    .uopm_cg_rf_en           (cg_rf_en)
  );

  // ---------------- clock buffers of the gated modules ----------------
  bufhce u_gpio_buf  (.I (uopm_dvfs_clk_slowest), .CE (cg_gpio_en), .O (gpio_clk));
  bufhce u_uart_buf  (.I (uopm_dvfs_clk_slowest), .CE (cg_uart_en), .O (uart_clk));
  bufhce u_spi_buf   (.I (uopm_dvfs_clk_slowest), .CE (cg_spi_en),  .O (spi_clk));
  bufhce u_stack_buf (.I (uopm_dvfs_clk),         .CE (cg_dmem_en), .O (stack_ram_clk));
  bufhce u_data_buf  (.I (uopm_dvfs_clk),         .CE (cg_dmem_en), .O (data_ram_clk));
  bufhce u_mult_buf  (.I (uopm_dvfs_clk),         .CE (cg_mult_en), .O (mult_clk));
  bufhce u_rf_buf    (.I (uopm_dvfs_clk),         .CE (cg_rf_en),   .O (rf_clk));

  // ---------------- clock-domain crossings ----------------
  cdc_fifo #(.DATA_SIZE(CDC_DATA_SIZE), .DEPTH(4)) u_cdc_uart (
    .wclk (uopm_dvfs_clk), .wrst (uipm_dvfs_rst), .data_in (uart_tx_data),
    .wput (uart_tx_put), .wrdy (uart_tx_wrdy), .wfifo_empty (uart_tx_wempty),
    .rclk (uopm_dvfs_clk_slowest), .rst (uipm_dvfs_rst), .rget (uart_tx_get),
    .rrdy (uart_tx_rrdy), .data_out (uart_tx_dout));

  cdc_fifo #(.DATA_SIZE(CDC_DATA_SIZE), .DEPTH(4)) u_cdc_spi (
    .wclk (uopm_dvfs_clk), .wrst (uipm_dvfs_rst), .data_in (spi_tx_data),
    .wput (spi_tx_put), .wrdy (spi_tx_wrdy), .wfifo_empty (spi_tx_wempty),
    .rclk (uopm_dvfs_clk_slowest), .rst (uipm_dvfs_rst), .rget (spi_tx_get),
    .rrdy (spi_tx_rrdy), .data_out (spi_tx_dout));

  // ---------------- partial reconfiguration ----------------
  pr_controller #(.BITSTREAM_WORDS(BITSTREAM_WORDS)) u_pr (
    .clk (uopm_dvfs_clk), .rst (uipm_dvfs_rst), .tma (tma),
    .stall (pr_stall), .mode_pe (pr_mode_pe), .busy (pr_busy),
    .flash_req (flash_req), .flash_addr (flash_addr),
    .flash_valid (flash_valid), .flash_data (flash_data),
    .icap_csib (icap_csib), .icap_rdwrb (icap_rdwrb), .icap_data (icap_data));

endmodule
