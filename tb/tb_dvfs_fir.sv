// tb_dvfs_fir: Wishbone writes and reads of the DVFS frequency index
// register. Checks the reset value (0, 40 MHz), that each of the indexes
// 0..5 is stored and read back, that larger values are stored as 5, that a
// write is acknowledged exactly one cycle after its strobe, that a strobe
// without write enable changes nothing, and that reads outside a read
// strobe return 0.
module tb_dvfs_fir;
  timeunit 1ns;
  timeprecision 1ps;
  import pmu_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  din = '0;
  logic        w_we = 1'b0, w_stb = 1'b0, r_we = 1'b1, r_stb = 1'b0, ack;
  logic [31:0] dout;
  fv_idx_t     fir;
  int          checks = 0, failures = 0;

  always #12.5 clk = !clk;

  dvfs_fir dut (.clk (clk), .rst (rst), .wb_w_din (din), .wb_w_we (w_we),
    .wb_w_stb (w_stb), .wb_w_ack (ack), .wb_r_we (r_we), .wb_r_stb (r_stb),
    .wb_r_dout (dout), .fir (fir));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wb_write(logic [7:0] v, logic we);
    @(negedge clk);
    din = v; w_we = we; w_stb = 1'b1;
    check("ack in strobe cycle", 32'(ack), 0);
    @(negedge clk);
    check("ack one cycle after strobe", 32'(ack), 32'(we));
    w_stb = 1'b0; w_we = 1'b0;
    @(negedge clk);
    check("ack drops", 32'(ack), 0);
  endtask

  task automatic wb_read(logic [31:0] exp);
    @(negedge clk);
    r_we = 1'b0; r_stb = 1'b1;
    #1 check("read", dout, exp);
    @(negedge clk);
    r_stb = 1'b0; r_we = 1'b1;
    #1 check("idle read bus", dout, 0);
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check("reset value", 32'(fir), 0);
    wb_read(0);
    for (int i = 0; i < 6; i++) begin
      wb_write(8'(5 - i), 1'b1);
      check("stored", 32'(fir), 32'(5 - i));
      wb_read(32'(5 - i));
    end
    wb_write(8'd2, 1'b1);
    wb_write(8'd4, 1'b0);                     // strobe without write enable
    check("no write without we", 32'(fir), 2);
    wb_write(8'd6, 1'b1);
    check("clamp 6", 32'(fir), 5);
    wb_write(8'hFF, 1'b1);
    check("clamp FF", 32'(fir), 5);
    wb_read(5);
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check("reset again", 32'(fir), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
