`timescale 1ns / 1ps
// next_word: chooses the next 24-bit word to be serialized.
//
// On each falling RCLK edge the block latches either the core data word or
// the sync/status word. The core word is taken only when core_talking is
// high and was already high at the previous falling edge; otherwise the sync
// word is taken. A word mark bit (always 1) is added as bit 0 below the 23
// bits from the core. The sync word carries the status bits SendData (23),
// RejectHits (22), Alines (21..20) and AqBCO != 0 (19), zeros in 18..1 and
// the word mark. Because Core Talking drops for at least one RCLK cycle at
// the end of every scan and the first cycle after a launch carries no data,
// at least two sync words go out per scan. All of this follows the chip
// description. Reset (`rst`, asynchronous: Operation or Firefighter Reset)
// loads the sync word of a chip with all status bits zero.
module next_word
  import fssr_pkg::*;
(
  input  logic              rclk,
  input  logic              rst,
  input  logic              core_talking,
  input  logic [CORE_W-1:0] core_data,
  input  status_t           status,
  output logic [WORD_W-1:0] word
);
  logic talking_d;

  always_ff @(negedge rclk or posedge rst) begin
    if (rst) begin
      talking_d <= 1'b0;
      word      <= sync_word('0);
    end else begin
      talking_d <= core_talking;
      word      <= (core_talking && talking_d) ? {core_data, 1'b1} : sync_word(status);
    end
  end
endmodule
