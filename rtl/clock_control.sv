`timescale 1ns / 1ps
// clock_control: clock generation of the FSSR data output interface.
//
// SCLK, the serial clock, is MCA xor MCB: with MCB lagging MCA by 90 degrees
// it runs at twice the master clock frequency. A counter on the rising SCLK
// edge counts the bits of each word on one output line, N = 24 / lines
// (24, 12, 6 or 4 for Alines = 00, 01, 10, 11). `load` is high in the last
// SCLK cycle of a word: on that edge the serializer takes the next word.
// RCLK, the readout clock, is low for the first N/2 SCLK cycles of a word
// and high for the rest, so its frequency is SCLK/N (MCA/12, /6, /3, /2) and
// its falling edge coincides with the load edge. OutCLK toggles on the
// falling SCLK edge (frequency of MCA); it is high in the second half of
// every even-numbered bit, so the first bit of a word, the word mark, is
// accompanied by a 0-to-1 OutCLK transition.
//
// Operation Reset (`rst`, asynchronous, also driven by Firefighter Reset)
// halts RCLK and OutCLK low and restarts the count, which restores that
// phase. Alines comes from the BCO clock domain and is synchronised here by
// two flip-flops; alines_s is the synchronised copy the serializer uses.
// The XOR, the counter and the clock ratios follow the chip description;
// the exact phase of RCLK within a word is this design's choice.
module clock_control
  import fssr_pkg::*;
(
  input  logic       mca,
  input  logic       mcb,
  input  logic       rst,
  input  logic [1:0] alines,
  output logic [1:0] alines_s,
  output logic       sclk,
  output logic       rclk,
  output logic       load,
  output logic       outclk
);
  logic [1:0] alines_m;
  logic [4:0] cnt, cnt_next, n_bits;

  assign sclk = mca ^ mcb;

  always_ff @(posedge sclk or posedge rst)
    if (rst) {alines_s, alines_m} <= '0;
    else     {alines_s, alines_m} <= {alines_m, alines};

  assign n_bits   = bits_per_line(alines_s);
  assign load     = (cnt >= n_bits - 5'd1);
  assign cnt_next = load ? 5'd0 : cnt + 5'd1;

  always_ff @(posedge sclk or posedge rst) begin
    if (rst) begin
      cnt  <= '0;
      rclk <= 1'b0;
    end else begin
      cnt  <= cnt_next;
      rclk <= (cnt_next >= (n_bits >> 1));
    end
  end

  always_ff @(negedge sclk or posedge rst)
    if (rst) outclk <= 1'b0;
    else     outclk <= cnt[0];
endmodule
