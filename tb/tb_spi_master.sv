// tb_spi_master: sends random 16-bit words and receives them with a
// potentiometer model. Checks every word arrives intact (MSB first, mode 0),
// that no frame has the wrong length, that sclk is low whenever ss_n
// changes, that done comes 33 * SCLK_DIV + 1 clocks after start,
// and that a start while busy is ignored.
module tb_spi_master;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DIV = 5;

  logic        clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [15:0] cmd = '0;
  logic        busy, done, mosi, ss_n, sclk;
  logic [15:0] rx;
  logic [2:0]  lvl;
  int unsigned ncmd, nbad;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  spi_master #(.WIDTH(16), .SCLK_DIV(DIV)) dut (.clk (clk), .rst (rst),
    .start (start), .cmd (cmd), .busy (busy), .done (done), .mosi (mosi),
    .ss_n (ss_n), .sclk (sclk));

  mcp42100_model pot (.cs_n (ss_n), .sck (sclk), .si (mosi), .last_cmd (rx),
    .ncmd (ncmd), .nbad (nbad), .level (lvl));

  always @(ss_n) if ($realtime > 1.0) begin
    checks++;
    if (sclk !== 1'b0) begin failures++; $display("ss_n moved with sclk high"); end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    logic [15:0] w;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 30; n++) begin
      w = 16'($urandom);
      @(negedge clk);
      cmd = w; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cmd = ~w;                               // must not matter once started
      cycles = 1;
      if (n == 3) begin                       // a start while busy is ignored
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cycles++;
      end
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != 33 * DIV + 1) begin
        failures++;
        $display("command took %0d clocks, expected %0d", cycles, 33 * DIV + 1);
      end
      checks++;
      if (rx !== w || ncmd != n + 1) begin
        failures++;
        $display("received %h (count %0d), sent %h", rx, ncmd, w);
      end
      @(negedge clk);
      checks++;
      if (busy) failures++;
    end
    checks++;
    if (nbad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
