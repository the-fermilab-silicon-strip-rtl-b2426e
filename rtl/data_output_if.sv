`timescale 1ns / 1ps
// data_output_if: the FSSR data output interface.
//
// Takes 23-bit words from the core and sends them off chip at the rate the
// core produces them, so no buffer memory is needed. Four parts:
//   clock_control    SCLK = MCA xor MCB, RCLK = SCLK / (bits per line),
//                    OutCLK at the MCA frequency
//   next_word        core word (with word mark) or sync/status word, chosen
//                    on each falling RCLK edge
//   word_serializer  24-bit word over 1, 2, 4 or 6 lines
//   steering_logic   registered, masked outputs as complementary pairs
// RCLK is also given to the core, which produces one word per RCLK cycle.
// `orst` is the Operation Reset (asynchronous; the Firefighter Reset is
// ORed in by the caller). The structure follows the chip description.
//
// Latency: a core word sampled on a falling RCLK edge is loaded into the
// serializer on the next falling RCLK edge, and its bit 0 reaches the pads
// one SCLK cycle later.
module data_output_if
  import fssr_pkg::*;
(
  input  logic              mca,
  input  logic              mcb,
  input  logic              orst,
  input  logic [1:0]        alines,
  input  status_t           status,
  input  logic              core_talking,
  input  logic [CORE_W-1:0] core_data,
  output logic              rclk,
  output logic [5:0]        out_p,
  output logic [5:0]        out_n,
  output logic              outclk_p,
  output logic              outclk_n
);
  logic [1:0]        alines_s;
  logic              sclk, load, outclk;
  logic [WORD_W-1:0] word;
  logic [5:0]        lanes;

  clock_control u_clk (
    .mca(mca), .mcb(mcb), .rst(orst), .alines(alines), .alines_s(alines_s),
    .sclk(sclk), .rclk(rclk), .load(load), .outclk(outclk));

  next_word u_next (
    .rclk(rclk), .rst(orst), .core_talking(core_talking), .core_data(core_data),
    .status(status), .word(word));

  word_serializer u_ser (
    .sclk(sclk), .rst(orst), .load(load), .word(word), .alines(alines_s),
    .lanes(lanes));

  steering_logic u_steer (
    .sclk(sclk), .rst(orst), .alines(alines_s), .lanes(lanes), .outclk(outclk),
    .out_p(out_p), .out_n(out_n), .outclk_p(outclk_p), .outclk_n(outclk_n));
endmodule
