// tb_pmu: the power management unit end to end, with its PLL model and a
// potentiometer model on the SPI pins. Software-side writes of DVFSFIR
// (through the Wishbone port, in the core clock domain) move through the
// f-v pairs, slower and faster. Checked: after each change the core clock
// period is 1000/(40-4i) ns, the potentiometer holds the calibrated
// command of level i and the unit reports index i; at every core clock
// edge the voltage in effect is at least that needed by the running
// frequency (never a faster clock on a lower voltage); no core clock phase
// is shorter than 12.5 ns (no glitch while switching); the busy time of a
// change is 28 to 30 cycles of 100 MHz plus 167 per voltage level stepped;
// a read returns the index; and the clock-gating enables follow their
// inputs.
module tb_pmu;
  timeunit 1ns;
  timeprecision 1ps;
  import pmu_pkg::*;

  localparam int unsigned DIV = 5;

  logic        clk100 = 1'b0, clk_rst = 1'b1, rst = 1'b1;
  logic [7:0]  w_din = '0;
  logic        w_we = 1'b0, w_stb = 1'b0, r_we = 1'b1, r_stb = 1'b0, w_ack;
  logic [31:0] r_dout;
  logic        mosi, ss_n, sclk, core_clk, slow_clk, busy;
  fv_idx_t     cur_idx, vidx;
  logic        gpio_busy = 0, uart_busy = 0, spi_busy = 0, dmem_busy = 0;
  logic        ex_we = 0, mem_we = 0, dmem_sel = 0, ex_mult = 0, mult_busy = 0;
  logic        wb_wr = 0, rf_wr = 0;
  logic [7:0]  io_en = '0;
  logic        gpio_en, uart_en, spi_en, dmem_en, mult_en, rf_en;
  logic [15:0] rx;
  logic [2:0]  lvl;
  int unsigned ncmd, nbad;
  int          checks = 0, failures = 0;

  always #5 clk100 = !clk100;

  pmu #(.SCLK_DIV(DIV)) dut (
    .clk_100mhz (clk100), .uipm_dvfs_clk_rst (clk_rst), .uipm_dvfs_rst (rst),
    .uipm_dvfs_wb_w_din (w_din), .uipm_dvfs_wb_w_we (w_we),
    .uipm_dvfs_wb_w_stb (w_stb), .uipm_dvfs_wb_r_we (r_we),
    .uipm_dvfs_wb_r_stb (r_stb), .uopm_dvfs_wb_w_ack (w_ack),
    .uopm_dvfs_wb_r_dout (r_dout), .uopm_dvfs_MOSI (mosi),
    .uopm_dvfs_SS_n (ss_n), .uopm_dvfs_SCLK (sclk), .uopm_dvfs_clk (core_clk),
    .uopm_dvfs_clk_slowest (slow_clk), .uopm_dvfs_busy (busy),
    .uopm_dvfs_cur_idx (cur_idx), .uopm_dvfs_vidx (vidx),
    .uipm_cg_gpio_busy (gpio_busy), .uipm_cg_uart_busy (uart_busy),
    .uipm_cg_spi_busy (spi_busy), .uipm_cg_dmem_busy (dmem_busy),
    .uipm_cg_dpex_we (ex_we), .uipm_cg_dpmem_we (mem_we),
    .uipm_cg_dpmem_io_en (io_en), .uipm_cg_dpmem_dmem_en (dmem_sel),
    .uipm_cg_dpex_mult_en (ex_mult), .uipm_cg_dpmem_mult_busy (mult_busy),
    .uipm_cg_dpwb_rf_wr (wb_wr), .uipm_cg_dp_rf_wr_en (rf_wr),
    .uopm_cg_gpio_en (gpio_en), .uopm_cg_uart_en (uart_en),
    .uopm_cg_spi_en (spi_en), .uopm_cg_dmem_en (dmem_en),
    .uopm_cg_mult_en (mult_en), .uopm_cg_rf_en (rf_en));

  mcp42100_model pot (.cs_n (ss_n), .sck (sclk), .si (mosi), .last_cmd (rx),
    .ncmd (ncmd), .nbad (nbad), .level (lvl));

  // ---- core clock monitor ----
  realtime t_edge = 0, t_rise = 0, period = 0;
  bit      mon_on = 1'b0;
  int      n_volt_checks = 0;
  always @(core_clk) begin
    if (mon_on) begin
      checks++;
      if ($realtime - t_edge < 12.49) begin
        failures++;
        $display("%t: core clock phase of %f ns", $realtime, $realtime - t_edge);
      end
    end
    t_edge = $realtime;
  end
  always @(posedge core_clk) begin
    if (mon_on) begin
      int need;
      period = $realtime - t_rise;
      // Level whose frequency this period needs: the slowest level whose
      // period is no longer than the measured one.
      need = 0;
      for (int i = 5; i >= 0; i--)
        if (period >= 1000.0 / (40.0 - 4.0 * i) - 0.01) begin need = i; break; end
      checks++;
      n_volt_checks++;
      if (int'(lvl) > need) begin
        failures++;
        $display("%t: period %f ns needs level <= %0d, voltage at level %0d", $realtime, period, need, lvl);
      end
    end
    t_rise = $realtime;
  end

  task automatic wb_write(int v);
    @(negedge core_clk);
    w_din = 8'(v); w_we = 1'b1; w_stb = 1'b1;
    @(negedge core_clk);
    checks++;
    if (!w_ack) begin failures++; $display("no ack"); end
    w_stb = 1'b0; w_we = 1'b0;
  endtask

  task automatic measure_period(output realtime p);
    realtime a;
    @(posedge core_clk) a = $realtime;
    repeat (4) @(posedge core_clk);
    p = ($realtime - a) / 4.0;
  endtask

  task automatic change_to(int i);
    int prev, steps, cyc;
    realtime p;
    prev  = int'(cur_idx);
    steps = (i > prev) ? i - prev : prev - i;
    wb_write(i);
    // wait for the unit to start (index crossing) and finish
    cyc = 0;
    while (!busy && cyc < 50) begin @(posedge clk100); cyc++; end
    cyc = 0;
    while (busy) begin @(posedge clk100); cyc++; end
    checks++;
    if (steps != 0 && (cyc < 28 + steps * 167 || cyc > 30 + steps * 167)) begin
      failures++;
      $display("change %0d->%0d busy for %0d cycles", prev, i, cyc);
    end
    measure_period(p);
    checks++;
    if (p < 1000.0 / (40.0 - 4.0 * i) - 0.01 || p > 1000.0 / (40.0 - 4.0 * i) + 0.01) begin
      failures++;
      $display("index %0d: period %f ns", i, p);
    end
    checks++;
    if (int'(lvl) != i || rx !== fv_spi_cmd(fv_idx_t'(i)) || cur_idx != fv_idx_t'(i) || vidx != fv_idx_t'(i)) begin
      failures++;
      $display("index %0d: pot level %0d cmd %h, cur_idx %0d vidx %0d", i, lvl, rx, cur_idx, vidx);
    end
    // read back
    @(negedge core_clk);
    r_we = 1'b0; r_stb = 1'b1;
    #1 checks++;
    if (r_dout !== 32'(i)) failures++;
    @(negedge core_clk);
    r_stb = 1'b0; r_we = 1'b1;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime p;
    repeat (5) @(posedge clk100);
    #1 clk_rst = 1'b0; rst = 1'b0;
    repeat (5) @(posedge core_clk);
    mon_on = 1'b1;
    measure_period(p);
    checks++;
    if (p != 25.0) begin failures++; $display("reset period %f", p); end
    change_to(5);      // slower: frequency first, then voltage down 5 levels
    change_to(2);      // faster: voltage up first
    change_to(3);
    change_to(0);
    change_to(4);
    change_to(4);      // no change
    change_to(1);
    // clock-gating enables
    ex_mult = 1; #1 checks++; if (!mult_en || rf_en) failures++;
    ex_mult = 0; rf_wr = 1; #1 checks++; if (mult_en || !rf_en) failures++;
    rf_wr = 0; io_en = 8'h10; #1 checks++; if ({gpio_en, uart_en, spi_en, dmem_en} != 4'b0100) failures++;
    io_en = 8'h08; #1 checks++; if ({gpio_en, uart_en, spi_en, dmem_en} != 4'b0010) failures++;
    io_en = 0; ex_we = 1; #1 checks++; if ({gpio_en, uart_en, spi_en, dmem_en} != 4'b1111) failures++;
    ex_we = 0; #1 checks++; if ({gpio_en, uart_en, spi_en, dmem_en, mult_en, rf_en} != 0) failures++;
    // slowest clock is always 20 MHz
    begin
      realtime a;
      @(posedge slow_clk) a = $realtime;
      @(posedge slow_clk);
      checks++;
      if ($realtime - a != 50.0) failures++;
    end
    checks++;
    if (nbad != 0 || n_volt_checks < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
