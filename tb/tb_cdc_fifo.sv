// tb_cdc_fifo: streams random bytes from a 40 MHz writer to a 20 MHz reader
// (as from the core to an IO unit), with random put and get activity, and
// compares the bytes read with a queue of the bytes written. Also checks
// that the writer sees the FIFO full (wrdy low) once four bytes are
// outstanding and the reader is stopped, that wrdy never claims room that
// is not there, that rrdy falls when everything is read, and that
// wfifo_empty is reported once the reader has drained the FIFO.
module tb_cdc_fifo;
  timeunit 1ns;
  timeprecision 1ps;

  logic       wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  logic [7:0] din = '0, dout;
  logic       wput = 1'b0, rget = 1'b0, wrdy, wempty, rrdy;
  logic [7:0] q[$];
  int         checks = 0, failures = 0, nread = 0, nwritten = 0, full_seen = 0;
  bit         reader_on = 1'b0;

  always #12.5 wclk = !wclk;
  always #25   rclk = !rclk;

  cdc_fifo #(.DATA_SIZE(8), .DEPTH(4)) dut (.wclk (wclk), .wrst (wrst),
    .data_in (din), .wput (wput), .wrdy (wrdy), .wfifo_empty (wempty),
    .rclk (rclk), .rst (rrst), .rget (rget), .rrdy (rrdy), .data_out (dout));

  // Writer: random puts when ready.
  bit writer_on = 1'b0;
  always @(posedge wclk) begin
    if (wput && wrdy) begin
      q.push_back(din);
      nwritten++;
    end
    checks++;
    if (q.size() > 4) begin failures++; $display("more than 4 outstanding"); end
    if (!wrdy) full_seen++;
  end
  always @(negedge wclk) begin
    wput <= writer_on && ($urandom_range(0, 3) != 0);
    if (!(wput && wrdy)) ; else din <= 8'($urandom);
  end

  // Reader: random gets, compare with the queue.
  always @(posedge rclk) begin
    if (rget && rrdy) begin
      checks++;
      if (q.size() == 0 || dout !== q[0]) begin
        failures++;
        $display("read %h expected %h", dout, q.size() ? q[0] : 8'hxx);
      end
      if (q.size() != 0) void'(q.pop_front());
      nread++;
    end
  end
  always @(negedge rclk) rget <= reader_on && ($urandom_range(0, 2) != 0);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge rclk);
    #1 wrst = 1'b0; rrst = 1'b0;
    checks++;
    if (!wrdy || !wempty || rrdy) failures++;
    // Phase 1: fill with the reader stopped.
    writer_on = 1'b1;
    repeat (20) @(posedge wclk);
    checks++;
    if (wrdy || q.size() != 4) begin failures++; $display("not full: %0d", q.size()); end
    checks++;
    if (!rrdy) failures++;
    // Phase 2: both running.
    reader_on = 1'b1;
    repeat (2000) @(posedge wclk);
    // Phase 3: stop writing and drain.
    writer_on = 1'b0;
    repeat (60) @(posedge rclk);
    checks++;
    if (q.size() != 0 || rrdy) begin failures++; $display("not drained"); end
    checks++;
    if (!wempty) failures++;
    checks++;
    if (nread < 500 || full_seen == 0) begin failures++; $display("nread=%0d", nread); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
