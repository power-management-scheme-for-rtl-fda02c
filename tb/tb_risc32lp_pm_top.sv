// tb_risc32lp_pm_top: end-to-end run of the power-management hardware at
// its default sizes, playing the part of a sensor-node program that
// samples and encrypts at full speed, then transmits slowly:
//   1. at 40 MHz, pipelined: a burst of multiplies and register writes
//      (multiplier and register-file clocks enabled, then gated off);
//   2. TMA: the full 175,624-byte multi-cycle bitstream is streamed from a
//      flash model to the ICAP while the core is stalled;
//   3. an f-v change to 20 MHz / 0.90 V (frequency first, then voltage);
//   4. 64 bytes sent to the UART and 64 to the SPI unit through the clock
//      domain crossings, with the IO side reading slower than the core
//      writes, so that the FIFO fills and the core waits;
//   5. an f-v change back to 40 MHz / 1.00 V (voltage first), and a TMA
//      back to the pipeline.
// Every mechanism is counted (gated-clock pulses while enabled, pulses
// while disabled, DVFS decreases and increases, FIFO-full waits, ICAP
// words, mode switches) and a mechanism that never happened is a failure.
// Data integrity of the FIFOs and bitstream, clock periods, the voltage
// ordering and the PR duration are checked against independent models.
module tb_risc32lp_pm_top;
  timeunit 1ns;
  timeprecision 1ps;
  import pmu_pkg::*;

  localparam int unsigned WORDS = 43906;   // 175,624-byte partial bitstream

  logic        clk100 = 1'b0, clk_rst = 1'b1, rst = 1'b1;
  logic [7:0]  w_din = '0;
  logic        w_we = 1'b0, w_stb = 1'b0, r_we = 1'b1, r_stb = 1'b0, w_ack;
  logic [31:0] r_dout;
  logic        mosi, ss_n, sclk, core_clk, slow_clk, dvfs_busy;
  fv_idx_t     cur_idx, vidx;
  logic        gpio_busy = 0, uart_busy = 0, spi_busy = 0, dmem_busy = 0;
  logic        ex_we = 0, mem_we = 0, dmem_sel = 0, ex_mult = 0, mult_busy = 0;
  logic        wb_wr = 0, rf_wr = 0;
  logic [7:0]  io_en = '0;
  logic        gpio_clk, uart_clk, spi_clk, stack_clk, data_clk, mult_clk, rf_clk;
  logic [7:0]  u_din = '0, u_dout, s_din = '0, s_dout;
  logic        u_put = 0, u_wrdy, u_wempty, u_get = 0, u_rrdy;
  logic        s_put = 0, s_wrdy, s_wempty, s_get = 0, s_rrdy;
  logic        tma = 0, stall, mode_pe, pr_busy, freq, fvalid = 0, csib, rdwrb;
  logic [31:0] faddr, fdata = '0, idata;
  logic [15:0] rx;
  logic [2:0]  lvl;
  int unsigned ncmd, nbad;
  int          checks = 0, failures = 0;

  always #5 clk100 = !clk100;

  risc32lp_pm_top dut (
    .clk_100mhz (clk100), .uipm_dvfs_clk_rst (clk_rst), .uipm_dvfs_rst (rst),
    .uipm_dvfs_wb_w_din (w_din), .uipm_dvfs_wb_w_we (w_we),
    .uipm_dvfs_wb_w_stb (w_stb), .uipm_dvfs_wb_r_we (r_we),
    .uipm_dvfs_wb_r_stb (r_stb), .uopm_dvfs_wb_w_ack (w_ack),
    .uopm_dvfs_wb_r_dout (r_dout), .uopm_dvfs_MOSI (mosi),
    .uopm_dvfs_SS_n (ss_n), .uopm_dvfs_SCLK (sclk), .uopm_dvfs_clk (core_clk),
    .uopm_dvfs_clk_slowest (slow_clk), .uopm_dvfs_busy (dvfs_busy),
    .uopm_dvfs_cur_idx (cur_idx), .uopm_dvfs_vidx (vidx),
    .uipm_cg_gpio_busy (gpio_busy), .uipm_cg_uart_busy (uart_busy),
    .uipm_cg_spi_busy (spi_busy), .uipm_cg_dmem_busy (dmem_busy),
    .uipm_cg_dpex_we (ex_we), .uipm_cg_dpmem_we (mem_we),
    .uipm_cg_dpmem_io_en (io_en), .uipm_cg_dpmem_dmem_en (dmem_sel),
    .uipm_cg_dpex_mult_en (ex_mult), .uipm_cg_dpmem_mult_busy (mult_busy),
    .uipm_cg_dpwb_rf_wr (wb_wr), .uipm_cg_dp_rf_wr_en (rf_wr),
    .gpio_clk (gpio_clk), .uart_clk (uart_clk), .spi_clk (spi_clk),
    .stack_ram_clk (stack_clk), .data_ram_clk (data_clk), .mult_clk (mult_clk),
    .rf_clk (rf_clk),
    .uart_tx_data (u_din), .uart_tx_put (u_put), .uart_tx_wrdy (u_wrdy),
    .uart_tx_wempty (u_wempty), .uart_tx_get (u_get), .uart_tx_rrdy (u_rrdy),
    .uart_tx_dout (u_dout),
    .spi_tx_data (s_din), .spi_tx_put (s_put), .spi_tx_wrdy (s_wrdy),
    .spi_tx_wempty (s_wempty), .spi_tx_get (s_get), .spi_tx_rrdy (s_rrdy),
    .spi_tx_dout (s_dout),
    .tma (tma), .pr_stall (stall), .pr_mode_pe (mode_pe), .pr_busy (pr_busy),
    .flash_req (freq), .flash_addr (faddr), .flash_valid (fvalid),
    .flash_data (fdata), .icap_csib (csib), .icap_rdwrb (rdwrb),
    .icap_data (idata));

  mcp42100_model pot (.cs_n (ss_n), .sck (sclk), .si (mosi), .last_cmd (rx),
    .ncmd (ncmd), .nbad (nbad), .level (lvl));

  // ---------------- mechanism counters ----------------
  int n_mult_pulses = 0, n_rf_pulses = 0, n_uart_pulses = 0, n_spi_pulses = 0;
  int n_gpio_pulses = 0, n_ram_pulses = 0;
  int n_dvfs_down = 0, n_dvfs_up = 0, n_fifo_full = 0, n_icap = 0, n_pr = 0;
  int n_gated_leak = 0;
  always @(posedge mult_clk)  n_mult_pulses++;
  always @(posedge rf_clk)    n_rf_pulses++;
  always @(posedge uart_clk)  n_uart_pulses++;
  always @(posedge spi_clk)   n_spi_pulses++;
  always @(posedge gpio_clk)  n_gpio_pulses++;
  always @(posedge data_clk)  n_ram_pulses++;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t: FAIL %s", $realtime, what);
    end
  endfunction

  // ---------------- voltage safety monitor ----------------
  realtime t_rise = 0;
  bit      mon_on = 1'b0;
  always @(posedge core_clk) begin
    if (mon_on) begin
      realtime period;
      int need;
      period = $realtime - t_rise;
      need = 0;
      for (int i = 5; i >= 0; i--)
        if (period >= 1000.0 / (40.0 - 4.0 * i) - 0.01) begin need = i; break; end
      if (int'(lvl) > need) begin
        failures++;
        $display("%t: voltage level %0d under a %f ns clock", $realtime, lvl, period);
      end
    end
    t_rise = $realtime;
  end

  // ---------------- flash model and ICAP monitor ----------------
  function automatic logic [31:0] word_at(logic [31:0] a);
    return a ^ 32'hC0DE_0000 ^ (a << 11);
  endfunction
  logic [31:0] exp_base;
  int          icap_idx = 0, flash_lat = 0;
  always @(negedge core_clk) begin
    fvalid <= 1'b0;
    if (freq && !fvalid) begin
      fvalid <= 1'b1;
      fdata  <= word_at(faddr);
      flash_lat++;
    end
  end
  always @(posedge core_clk) if (!rst && !csib) begin
    if (idata !== word_at(exp_base + 32'(icap_idx) * 4)) begin
      failures++;
      if (failures < 10) $display("ICAP word %0d wrong", icap_idx);
    end
    icap_idx++;
    n_icap++;
  end

  // ---------------- steps ----------------
  task automatic wb_write(int v);
    @(negedge core_clk);
    w_din = 8'(v); w_we = 1'b1; w_stb = 1'b1;
    @(negedge core_clk);
    check(w_ack, "DVFSFIR write acknowledged");
    w_stb = 1'b0; w_we = 1'b0;
  endtask

  task automatic dvfs_to(int i);
    int prev, n;
    realtime a, p;
    prev = int'(cur_idx);
    wb_write(i);
    n = 0;
    while (!dvfs_busy && n < 50) begin @(posedge clk100); n++; end
    while (dvfs_busy) @(posedge clk100);
    if (i > prev) n_dvfs_down++;
    if (i < prev) n_dvfs_up++;
    @(posedge core_clk) a = $realtime;
    repeat (4) @(posedge core_clk);
    p = ($realtime - a) / 4.0;
    check(p > 1000.0 / (40.0 - 4.0 * i) - 0.01 && p < 1000.0 / (40.0 - 4.0 * i) + 0.01,
          $sformatf("core clock period %f ns at index %0d", p, i));
    check(int'(lvl) == i && cur_idx == fv_idx_t'(i), $sformatf("voltage level %0d at index %0d", lvl, i));
  endtask

  task automatic do_tma(logic [31:0] base);
    int cyc;
    logic m0;
    m0 = mode_pe;
    exp_base = base;
    icap_idx = 0;
    @(negedge core_clk) tma = 1'b1;
    #1 check(stall, "stall on TMA");
    @(negedge core_clk) tma = 1'b0;
    cyc = 1;
    while (stall) begin @(negedge core_clk); cyc++; end
    check(icap_idx == WORDS, $sformatf("%0d bitstream words", icap_idx));
    check(mode_pe == !m0, "mode toggled");
    // one request cycle and one data cycle per word, plus start and end
    check(cyc == 2 * WORDS + 1, $sformatf("PR took %0d cycles", cyc));
    n_pr++;
  endtask

  // CDC traffic: core side writes N bytes to each FIFO; IO side reads at
  // one byte per four slow clocks, as a serial unit would.
  logic [7:0] uq[$], sq[$];
  bit io_reader = 1'b0;
  int io_div = 0, n_u_rx = 0, n_s_rx = 0;
  always @(negedge slow_clk) begin
    io_div = (io_div + 1) % 4;
    u_get <= io_reader && io_div == 0;
    s_get <= io_reader && io_div == 2;
  end
  always @(posedge slow_clk) begin
    if (u_get && u_rrdy) begin
      if (uq.size() == 0 || u_dout !== uq[0]) begin failures++; $display("UART byte wrong"); end
      else void'(uq.pop_front());
      n_u_rx++;
    end
    if (s_get && s_rrdy) begin
      if (sq.size() == 0 || s_dout !== sq[0]) begin failures++; $display("SPI byte wrong"); end
      else void'(sq.pop_front());
      n_s_rx++;
    end
  end

  task automatic send_bytes(int n);
    int sent;
    sent = 0;
    while (sent < n) begin
      @(negedge core_clk);
      // the core holds its store while the FIFO is full
      if (!u_wrdy || !s_wrdy) n_fifo_full++;
      u_put = 1'b0; s_put = 1'b0;
      if (u_wrdy && s_wrdy) begin
        u_din = 8'($urandom); s_din = 8'($urandom);
        u_put = 1'b1; s_put = 1'b1;
        uq.push_back(u_din); sq.push_back(s_din);
        io_en = 8'h18;                         // UART and SPI selected
        sent++;
      end
      @(posedge core_clk) #0.1;
      u_put = 1'b0; s_put = 1'b0;
      io_en = 8'h00;
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m0, r0, g0, leak0;
    repeat (5) @(posedge clk100);
    #1 clk_rst = 1'b0; rst = 1'b0;
    repeat (5) @(posedge core_clk);
    mon_on = 1'b1;
    check(mode_pe && cur_idx == 0, "reset state: pipeline at 40 MHz");

    // 1. compute burst: multiplier and register file clocked only when used
    m0 = n_mult_pulses; r0 = n_rf_pulses;
    repeat (20) @(posedge core_clk);
    check(n_mult_pulses == m0 && n_rf_pulses == r0, "multiplier and register file gated while idle");
    n_gated_leak += (n_mult_pulses - m0) + (n_rf_pulses - r0);
    @(negedge core_clk) ex_mult = 1'b1; wb_wr = 1'b1;
    repeat (10) @(negedge core_clk);
    ex_mult = 1'b0; wb_wr = 1'b0;
    repeat (3) @(negedge core_clk);
    check(n_mult_pulses - m0 == 10 && n_rf_pulses - r0 == 10,
          $sformatf("10 gated pulses expected, got %0d / %0d", n_mult_pulses - m0, n_rf_pulses - r0));
    g0 = n_gpio_pulses;
    @(negedge core_clk) gpio_busy = 1'b1;
    repeat (10) @(negedge core_clk);
    gpio_busy = 1'b0;
    check(n_gpio_pulses > g0, "GPIO clock runs while busy");
    @(negedge core_clk) dmem_sel = 1'b1;
    @(negedge core_clk) dmem_sel = 1'b0;
    repeat (2) @(negedge core_clk);
    check(n_ram_pulses == 1, $sformatf("one RAM clock pulse per access, got %0d", n_ram_pulses));

    // 2. TMA to the multi-cycle datapath
    do_tma(32'h00A0_0000);
    check(!mode_pe, "multi-cycle mode");

    // 3. slow down for the IO-bound part
    dvfs_to(5);

    // 4. transmit through the clock-domain crossings
    io_reader = 1'b1;
    send_bytes(64);
    repeat (400) @(posedge slow_clk);
    check(n_u_rx == 64 && n_s_rx == 64 && uq.size() == 0 && sq.size() == 0,
          $sformatf("bytes received UART %0d SPI %0d", n_u_rx, n_s_rx));
    check(u_wempty && s_wempty && !u_rrdy && !s_rrdy, "FIFOs drained");
    io_reader = 1'b0;
    // each IO clock follows its own unit's busy line only
    begin
      int u0, s0;
      u0 = n_uart_pulses; s0 = n_spi_pulses;
      @(negedge slow_clk) uart_busy = 1'b1;
      repeat (8) @(negedge slow_clk);
      uart_busy = 1'b0;
      repeat (2) @(negedge slow_clk);
      check(n_uart_pulses - u0 == 8 && n_spi_pulses == s0, "UART busy clocks the UART only");
      u0 = n_uart_pulses;
      @(negedge slow_clk) spi_busy = 1'b1;
      repeat (8) @(negedge slow_clk);
      spi_busy = 1'b0;
      repeat (2) @(negedge slow_clk);
      check(n_spi_pulses - s0 == 8 && n_uart_pulses == u0, "SPI busy clocks the SPI unit only");
    end
    check(n_uart_pulses > 0 && n_spi_pulses > 0, "UART and SPI clocks enabled by their selects");
    leak0 = n_uart_pulses;
    repeat (50) @(posedge slow_clk);
    check(n_uart_pulses == leak0, "UART clock gated when idle");

    // 5. back to full speed and the pipeline
    dvfs_to(0);
    do_tma(32'h00A8_0000);
    check(mode_pe, "pipeline mode");

    // mechanism coverage
    $display("mechanisms: mult pulses %0d, rf pulses %0d, uart pulses %0d, spi pulses %0d, gpio pulses %0d",
             n_mult_pulses, n_rf_pulses, n_uart_pulses, n_spi_pulses, n_gpio_pulses);
    $display("            dvfs down %0d, dvfs up %0d, fifo-full waits %0d, icap words %0d, mode switches %0d, SPI commands %0d",
             n_dvfs_down, n_dvfs_up, n_fifo_full, n_icap, n_pr, ncmd);
    check(n_dvfs_down > 0, "DVFS decrease happened");
    check(n_dvfs_up > 0, "DVFS increase happened");
    check(n_fifo_full > 0, "CDC FIFO full happened");
    check(n_pr == 2 && n_icap == 2 * WORDS, "two PR operations");
    check(ncmd == 10 && nbad == 0, $sformatf("ten voltage steps, %0d commands", ncmd));
    check(n_gated_leak == 0, "no gated pulses while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
