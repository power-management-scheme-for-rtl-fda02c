// cdc_fifo: FIFO synchroniser that carries data from the core clock domain,
// whose frequency changes with the f-v pair, to an IO unit on a fixed IO
// clock (for example core to UART or core to SPI).
//
// A four-entry register array is written in the write clock and read in
// the read clock. Each side has a pointer one bit wider than the address;
// the extra bit tells a full FIFO from an empty one when the addresses are
// equal. Each pointer is passed to the other side through a two-flop
// synchroniser, as in the published circuit; here the pointer crosses as
// Gray code (only one bit changes per step), a choice of this design that
// keeps a pointer sampled mid-change within one step of its true value.
//
// Write side (wclk): wput stores data_in when wrdy (not full); wrdy and
// wfifo_empty are computed from the write pointer and the synchronised
// read pointer, so they are pessimistic by two wclk edges. Read side
// (rclk): rrdy (not empty) says data_out, the entry at the read pointer,
// is valid; rget with rrdy pops it. Resets are synchronous to each side's
// clock and should be applied together.
module cdc_fifo #(
  parameter int unsigned DATA_SIZE = 8,
  parameter int unsigned DEPTH     = 4
) (
  // write side
  input  logic                 wclk,
  input  logic                 wrst,
  input  logic [DATA_SIZE-1:0] data_in,
  input  logic                 wput,
  output logic                 wrdy,
  output logic                 wfifo_empty,
  // read side
  input  logic                 rclk,
  input  logic                 rst,
  input  logic                 rget,
  output logic                 rrdy,
  output logic [DATA_SIZE-1:0] data_out
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;

  logic [DATA_SIZE-1:0] mem [DEPTH];

  logic [PW-1:0] wptr, rptr;              // binary pointers
  logic [PW-1:0] wptr_g, rptr_g;          // Gray-coded pointers
  logic [PW-1:0] wq2_rptr_g, rq2_wptr_g;  // synchronised Gray pointers
  logic [PW-1:0] wq2_rptr, rq2_wptr;      // synchronised, back to binary

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic we;
  assign wrdy        = !((wptr[AW-1:0] == wq2_rptr[AW-1:0]) &&
                         (wptr[AW] != wq2_rptr[AW]));
  assign wfifo_empty = (wptr == wq2_rptr);
  assign we          = wput & wrdy;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr   <= '0;
      wptr_g <= '0;
    end else if (we) begin
      wptr   <= wptr + 1'b1;
      wptr_g <= bin2gray(wptr + 1'b1);
    end
  end

  always_ff @(posedge wclk) begin
    if (we) mem[wptr[AW-1:0]] <= data_in;
  end

  sync2ff #(.WIDTH(PW)) u_sync_r2w (
    .clk (wclk), .rst (wrst), .d (rptr_g), .q (wq2_rptr_g));
  assign wq2_rptr = gray2bin(wq2_rptr_g);

  // ---------------- read side ----------------
  logic re;
  assign rrdy     = (rptr != rq2_wptr);
  assign re       = rget & rrdy;
  assign data_out = mem[rptr[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rst) begin
      rptr   <= '0;
      rptr_g <= '0;
    end else if (re) begin
      rptr   <= rptr + 1'b1;
      rptr_g <= bin2gray(rptr + 1'b1);
    end
  end

  sync2ff #(.WIDTH(PW)) u_sync_w2r (
    .clk (rclk), .rst (rst), .d (wptr_g), .q (rq2_wptr_g));
  assign rq2_wptr = gray2bin(rq2_wptr_g);

  a_no_overflow: assert property (@(posedge wclk) disable iff (wrst)
    we |-> wrdy);

endmodule
