// tb_pr_controller: two TMA instructions with a 32-word bitstream and a
// flash model that answers each request after a random 1 to 4 cycles with
// a word derived from its address. Checks that the stall rises with tma
// and holds to the end, that the words reach the ICAP in order from the
// start address of the other microarchitecture (multi-cycle image first,
// since the core starts pipelined), that the mode toggles each time, and
// that the operation takes one cycle to start, one per flash latency cycle
// plus one per word, and one to finish.
module tb_pr_controller;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WORDS = 32;

  logic        clk = 1'b0, rst = 1'b1, tma = 1'b0;
  logic        stall, mode_pe, busy, freq, fvalid = 1'b0, csib, rdwrb;
  logic [31:0] faddr, fdata = '0, idata;
  int          checks = 0, failures = 0;
  int          lat_total = 0, icap_n = 0;
  logic [31:0] exp_base;

  always #12.5 clk = !clk;

  pr_controller #(.BITSTREAM_WORDS(WORDS)) dut (.clk (clk), .rst (rst),
    .tma (tma), .stall (stall), .mode_pe (mode_pe), .busy (busy),
    .flash_req (freq), .flash_addr (faddr), .flash_valid (fvalid),
    .flash_data (fdata), .icap_csib (csib), .icap_rdwrb (rdwrb),
    .icap_data (idata));

  function automatic logic [31:0] word_at(logic [31:0] a);
    return a ^ 32'h5A5A_0000 ^ (a << 7);
  endfunction

  // Flash model: random latency per request.
  initial begin
    forever begin
      @(negedge clk);
      fvalid = 1'b0;
      if (freq) begin
        int lat;
        logic [31:0] a;
        a   = faddr;
        lat = $urandom_range(1, 4);
        lat_total += lat;
        repeat (lat - 1) @(negedge clk);
        checks++;
        if (!freq || faddr !== a) begin failures++; $display("request dropped"); end
        fvalid = 1'b1;
        fdata  = word_at(a);
      end
    end
  end

  // ICAP monitor.
  always @(posedge clk) if (!rst && !csib) begin
    checks++;
    if (rdwrb !== 1'b0 || idata !== word_at(exp_base + 32'(icap_n) * 4)) begin
      failures++;
      $display("ICAP word %0d = %h, expected %h", icap_n, idata, word_at(exp_base + 32'(icap_n) * 4));
    end
    icap_n++;
  end

  task automatic do_tma(logic [31:0] base, logic mode_after);
    int cycles;
    exp_base  = base;
    icap_n    = 0;
    lat_total = 0;
    @(negedge clk);
    tma = 1'b1;
    #1 checks++;
    if (!stall) begin failures++; $display("no stall with tma"); end
    @(negedge clk);
    tma = 1'b0;
    cycles = 1;
    while (stall) begin
      checks++;
      if (!busy) failures++;
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (mode_pe !== mode_after) begin failures++; $display("mode not toggled"); end
    checks++;
    if (icap_n != WORDS) begin failures++; $display("%0d ICAP words", icap_n); end
    checks++;
    if (cycles != 1 + lat_total + 1) begin
      failures++;
      $display("took %0d cycles, expected %0d", cycles, 2 + lat_total);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (!mode_pe || stall || !csib) failures++;
    repeat (3) @(negedge clk);
    do_tma(32'h00A0_0000, 1'b0);      // PE -> ME: load multi-cycle image
    repeat (5) @(negedge clk);
    do_tma(32'h00A8_0000, 1'b1);      // ME -> PE: load pipeline image
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
