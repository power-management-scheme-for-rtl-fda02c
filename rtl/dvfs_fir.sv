// dvfs_fir: the DVFS frequency index register (DVFSFIR) and its Wishbone
// ports.
//
// Software selects an f-v pair by a store-byte to the register's IO
// address (0xbfff_ff3f, offset 0x3f of the IO block at 0xbfff_ff00); the
// address decoder turns that store into wb_w_stb/wb_w_we with the byte on
// wb_w_din. The register keeps the index 0..5 (values above 5 are stored as
// 5, the slowest pair) and resets to 0, the 40 MHz / 1.00 V pair. A write
// is acknowledged by a one-cycle wb_w_ack in the cycle after the strobe.
// A read (wb_r_stb with wb_r_we low) returns the index zero-extended on the
// 32-bit wb_r_dout in the same cycle; otherwise wb_r_dout is 0. The clamp,
// the acknowledge timing and the read value are this design's choices.
// Runs in the core clock domain.
module dvfs_fir
  import pmu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  wb_w_din,
  input  logic        wb_w_we,
  input  logic        wb_w_stb,
  output logic        wb_w_ack,
  input  logic        wb_r_we,
  input  logic        wb_r_stb,
  output logic [31:0] wb_r_dout,
  output fv_idx_t     fir
);
  timeunit 1ns;
  timeprecision 1ps;


  logic wr;
  assign wr = wb_w_stb & wb_w_we;

  always_ff @(posedge clk) begin
    if (rst) begin
      fir      <= FV_FASTEST;
      wb_w_ack <= 1'b0;
    end else begin
      wb_w_ack <= wr & !wb_w_ack;
      if (wr && !wb_w_ack)
        fir <= (wb_w_din > 8'(FV_SLOWEST)) ? FV_SLOWEST : fv_idx_t'(wb_w_din);
    end
  end

  always_comb begin
    wb_r_dout = '0;
    if (wb_r_stb && !wb_r_we) wb_r_dout = 32'(fir);
  end

endmodule
