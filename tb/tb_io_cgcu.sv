// tb_io_cgcu: exhaustive check of the IO clock-gating look-up against an
// independent row-by-row model of its truth table: every combination of
// the four busy flags, the two store flags, the eight IO selects and the
// RAM select is applied.
module tb_io_cgcu;
  timeunit 1ns;
  timeprecision 1ps;

  logic       gpio_busy, uart_busy, spi_busy, dmem_busy, ex_we, mem_we, dmem_sel;
  logic [7:0] io_en;
  logic       gpio_en, uart_en, spi_en, dmem_en;
  int         checks = 0, failures = 0;

  io_cgcu dut (
    .uipm_cg_gpio_busy (gpio_busy), .uipm_cg_uart_busy (uart_busy),
    .uipm_cg_spi_busy (spi_busy), .uipm_cg_dmem_busy (dmem_busy),
    .uipm_cg_dpex_we (ex_we), .uipm_cg_dpmem_we (mem_we),
    .uipm_cg_dpmem_io_en (io_en), .uipm_cg_dpmem_dmem_en (dmem_sel),
    .uopm_cg_gpio_en (gpio_en), .uopm_cg_uart_en (uart_en),
    .uopm_cg_spi_en (spi_en), .uopm_cg_dmem_en (dmem_en));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int v = 0; v < (1 << 15); v++) begin
      {gpio_busy, uart_busy, spi_busy, dmem_busy, ex_we, mem_we, dmem_sel, io_en} = 15'(v);
      #1;
      exp = 4'b0000;                                   // {gpio, uart, spi, dmem}
      if (ex_we)                exp = 4'b1111;         // store in EX: wake all
      if (mem_we && io_en[1])   exp[3] = 1'b1;         // store to GPIO
      if (gpio_busy)            exp[3] = 1'b1;
      if (io_en[4])             exp[2] = 1'b1;         // UART selected
      if (uart_busy)            exp[2] = 1'b1;
      if (io_en[3])             exp[1] = 1'b1;         // SPI selected
      if (spi_busy)             exp[1] = 1'b1;
      if (dmem_busy)            exp[0] = 1'b1;
      if (dmem_sel)             exp[0] = 1'b1;
      checks++;
      if ({gpio_en, uart_en, spi_en, dmem_en} !== exp) begin
        failures++;
        if (failures < 10)
          $display("mismatch v=%h got=%b exp=%b", v, {gpio_en, uart_en, spi_en, dmem_en}, exp);
      end
    end
    // Fully idle: no clock at all.
    {gpio_busy, uart_busy, spi_busy, dmem_busy, ex_we, mem_we, dmem_sel, io_en} = '0;
    #1 checks++;
    if ({gpio_en, uart_en, spi_en, dmem_en} != 4'b0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
