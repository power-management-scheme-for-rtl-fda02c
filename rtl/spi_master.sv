// spi_master: transmit-only SPI master that sends the 16-bit commands to the
// digital potentiometer of the external voltage regulator.
//
// A one-cycle start loads cmd; the word is shifted out MSB first in SPI
// mode 0: ss_n falls, mosi carries bit 15, sclk rises after SCLK_DIV
// clocks (the slave samples there) and falls after another SCLK_DIV clocks,
// when the next bit is put out. After the sixteenth falling edge ss_n rises
// and stays high for SCLK_DIV clocks (the slave latches the command on this
// edge); busy is high from start to the end of that gap and done pulses
// for one cycle as busy falls, 33 x SCLK_DIV + 1 clocks after the clock
// edge that took start. With the default SCLK_DIV of 5 and a 100 MHz
// clock, sclk runs at 10 MHz and a command takes 166 clocks. The
// document specifies only a 16-bit command over standard SPI; mode, bit
// order and rate are this design's choices. start is ignored while busy.
module spi_master #(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned SCLK_DIV = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] cmd,
  output logic             busy,
  output logic             done,
  output logic             mosi,
  output logic             ss_n,
  output logic             sclk
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned DW = $clog2(SCLK_DIV + 1);
  localparam int unsigned BW = $clog2(WIDTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_TAIL} spi_state_t;

  spi_state_t       st;
  logic [WIDTH-1:0] shreg;
  logic [DW-1:0]    div_cnt;
  logic [BW-1:0]    bit_cnt;
  logic             tick;

  assign tick = (div_cnt == DW'(SCLK_DIV - 1));
  assign busy = (st != S_IDLE);
  assign mosi = (st == S_SHIFT) ? shreg[WIDTH-1] : 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= S_IDLE;
      shreg   <= '0;
      div_cnt <= '0;
      bit_cnt <= '0;
      ss_n    <= 1'b1;
      sclk    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      unique case (st)
        S_IDLE: begin
          div_cnt <= '0;
          if (start) begin
            st      <= S_SHIFT;
            shreg   <= cmd;
            bit_cnt <= '0;
            ss_n    <= 1'b0;
          end
        end
        S_SHIFT: if (tick) begin
          sclk <= !sclk;
          if (sclk) begin                       // falling edge
            if (bit_cnt == BW'(WIDTH - 1)) begin
              st   <= S_TAIL;
              ss_n <= 1'b1;
            end else begin
              shreg   <= shreg << 1;
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
        end
        S_TAIL: if (tick) begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
