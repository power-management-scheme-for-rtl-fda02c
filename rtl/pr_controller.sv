// pr_controller: partial-reconfiguration controller that toggles the core
// between its pipeline (PE) and multi-cycle (ME) microarchitectures.
//
// When the TMA (toggle microarchitecture) instruction is decoded, tma is
// raised and the controller stalls the core at once. It reads the partial
// bitstream of the other microarchitecture from the flash controller, one
// 32-bit word per request, starting at ME_BITSTREAM_ADDR when the core is
// in PE and at PE_BITSTREAM_ADDR when it is in ME, and writes each word to
// the FPGA's internal configuration access port (ICAP) in the cycle after
// it arrives. After the last of BITSTREAM_WORDS words it flips mode_pe and
// releases the stall, so the stalled instruction continues on the new
// microarchitecture. The start addresses and the bitstream length
// (175,624 bytes) are the published values; the word-by-word flash
// handshake (flash_req held until flash_valid) and the reset mode (PE) are
// this design's choices. The time taken is set by the flash: with one word
// per 20 core cycles a bitstream takes about 0.88 M cycles, 44 ms at 20 MHz.
// Clock: core clock. Reset: synchronous, active high.
module pr_controller #(
  parameter logic [31:0] ME_BITSTREAM_ADDR = 32'h00A0_0000,
  parameter logic [31:0] PE_BITSTREAM_ADDR = 32'h00A8_0000,
  parameter int unsigned BITSTREAM_WORDS   = 43906
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tma,
  output logic        stall,
  output logic        mode_pe,
  output logic        busy,
  // flash controller
  output logic        flash_req,
  output logic [31:0] flash_addr,
  input  logic        flash_valid,
  input  logic [31:0] flash_data,
  // ICAP
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_data
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned CW = $clog2(BITSTREAM_WORDS + 1);

  typedef enum logic [1:0] {PR_IDLE, PR_READ, PR_DONE} pr_state_t;

  pr_state_t     st;
  logic [CW-1:0] word_cnt;
  logic [31:0]   base;

  assign base       = mode_pe ? ME_BITSTREAM_ADDR : PE_BITSTREAM_ADDR;
  assign busy       = (st != PR_IDLE);
  assign stall      = busy | tma;
  assign flash_req  = (st == PR_READ);
  assign flash_addr = base + (32'(word_cnt) << 2);
  assign icap_rdwrb = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= PR_IDLE;
      word_cnt  <= '0;
      mode_pe   <= 1'b1;
      icap_csib <= 1'b1;
      icap_data <= '0;
    end else begin
      icap_csib <= 1'b1;
      unique case (st)
        PR_IDLE: if (tma) begin
          st       <= PR_READ;
          word_cnt <= '0;
        end
        PR_READ: if (flash_valid) begin
          icap_csib <= 1'b0;
          icap_data <= flash_data;
          if (word_cnt == CW'(BITSTREAM_WORDS - 1)) st <= PR_DONE;
          else                                      word_cnt <= word_cnt + 1'b1;
        end
        PR_DONE: begin
          mode_pe <= !mode_pe;
          st      <= PR_IDLE;
        end
        default: st <= PR_IDLE;
      endcase
    end
  end

endmodule
