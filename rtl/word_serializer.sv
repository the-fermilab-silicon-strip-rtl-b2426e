`timescale 1ns / 1ps
// word_serializer: serializes 24-bit words on 1, 2, 4 or 6 lines.
//
// A 24-bit shift register takes the word from the next-word block on the
// SCLK edge where `load` is high (the falling RCLK edge) and shifts right by
// one on every other SCLK edge. Line k (k = 0..L-1) is tapped at bit k*N,
// N = 24/L, so line k sends bits k*N .. k*N+N-1, lowest first; with six
// lines, line 1 sends b3..b0, line 2 b7..b4 and so on, as in the chip's data
// format. Lines beyond L are 0. Sending the lowest bit (on line 1 the word
// mark) first is this design's choice; the split of the word among the lines
// follows the chip description. Operation Reset (`rst`, asynchronous) zeroes
// the register.
module word_serializer
  import fssr_pkg::*;
(
  input  logic              sclk,
  input  logic              rst,
  input  logic              load,
  input  logic [WORD_W-1:0] word,
  input  logic [1:0]        alines,
  output logic [5:0]        lanes
);
  logic [WORD_W-1:0] sreg;

  always_ff @(posedge sclk or posedge rst)
    if (rst)       sreg <= '0;
    else if (load) sreg <= word;
    else           sreg <= sreg >> 1;

  always_comb begin
    lanes = '0;
    case (alines)
      2'b00: lanes[0] = sreg[0];
      2'b01: lanes[1:0] = {sreg[12], sreg[0]};
      2'b10: lanes[3:0] = {sreg[18], sreg[12], sreg[6], sreg[0]};
      default: lanes = {sreg[20], sreg[16], sreg[12], sreg[8], sreg[4], sreg[0]};
    endcase
  end
endmodule
