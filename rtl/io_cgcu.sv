// io_cgcu: clock-gating control unit for the IO units and the data RAM.
//
// A small combinational look-up that decides, cycle by cycle, which of the
// GPIO, UART and SPI controllers and the data/stack RAM must receive a
// clock. A unit is clocked while it reports itself busy, while the memory
// stage addresses it, and whenever a store is in the execute stage (the
// target of that store is not decoded yet, so every unit is woken one cycle
// ahead of its access, which hides the one-cycle latency of the clock
// buffer's enable). The GPIO select is qualified by a MEM-stage store.
// The three terms per unit follow the published truth table of the unit;
// reading each enable as an OR of busy, select and execute-stage store,
// with the GPIO select also needing a memory-stage store, is this design's
// interpretation of that table.
//
// io_en bit map: [1] GPIO, [3] SPI, [4] UART (others unused here).
// Outputs are combinational and drive the CE pins of the clock buffers.
module io_cgcu (
  input  logic       uipm_cg_gpio_busy,
  input  logic       uipm_cg_uart_busy,
  input  logic       uipm_cg_spi_busy,
  input  logic       uipm_cg_dmem_busy,
  input  logic       uipm_cg_dpex_we,
  input  logic       uipm_cg_dpmem_we,
  input  logic [7:0] uipm_cg_dpmem_io_en,
  input  logic       uipm_cg_dpmem_dmem_en,
  output logic       uopm_cg_gpio_en,
  output logic       uopm_cg_uart_en,
  output logic       uopm_cg_spi_en,
  output logic       uopm_cg_dmem_en
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned IO_GPIO = 1;
  localparam int unsigned IO_SPI  = 3;
  localparam int unsigned IO_UART = 4;

  always_comb begin
    uopm_cg_gpio_en = uipm_cg_dpex_we | uipm_cg_gpio_busy
                    | (uipm_cg_dpmem_we & uipm_cg_dpmem_io_en[IO_GPIO]);
    uopm_cg_uart_en = uipm_cg_dpex_we | uipm_cg_uart_busy
                    | uipm_cg_dpmem_io_en[IO_UART];
    uopm_cg_spi_en  = uipm_cg_dpex_we | uipm_cg_spi_busy
                    | uipm_cg_dpmem_io_en[IO_SPI];
    uopm_cg_dmem_en = uipm_cg_dpex_we | uipm_cg_dmem_busy
                    | uipm_cg_dpmem_dmem_en;
  end

  // Bits 0, 2, 5, 6 and 7 select units that are not gated by this table.
  logic unused_io_en;
  assign unused_io_en = ^{uipm_cg_dpmem_io_en[7:5], uipm_cg_dpmem_io_en[2],
                          uipm_cg_dpmem_io_en[0]};

endmodule
