// mcp42100_model: behavioural model of the SPI side of the digital
// potentiometer that sets the regulator voltage, for testbenches only.
//
// It shifts in si on each rising edge of sck while cs_n is low, and on the
// rising edge of cs_n accepts the word if exactly 16 bits were clocked in:
// last_cmd takes the word, ncmd counts accepted words and nbad counts
// frames of any other length. level maps the accepted word back to the
// f-v level whose command it is (7 if it matches none).
module mcp42100_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        si,
  output logic [15:0] last_cmd,
  output int unsigned ncmd,
  output int unsigned nbad,
  output logic [2:0]  level
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] sh;
  int unsigned nbits;

  initial begin
    last_cmd = 16'h12F9;
    ncmd     = 0;
    nbad     = 0;
    nbits    = 0;
    sh       = '0;
  end

  always @(negedge cs_n) nbits = 0;

  always @(posedge sck) begin
    if (!cs_n) begin
      sh    = {sh[14:0], si};
      nbits = nbits + 1;
    end
  end

  always @(posedge cs_n) begin
    if (nbits == 16) begin
      last_cmd = sh;
      ncmd     = ncmd + 1;
    end else if (nbits != 0) begin
      nbad = nbad + 1;
    end
    nbits = 0;
  end

  always_comb begin
    case (last_cmd)
      16'h12F9: level = 3'd0;
      16'h1277: level = 3'd1;
      16'h1242: level = 3'd2;
      16'h1229: level = 3'd3;
      16'h1218: level = 3'd4;
      16'h120D: level = 3'd5;
      default:  level = 3'd7;
    endcase
  end

endmodule
