`timescale 1ns / 1ps
// steering_logic: drives the serial data lines and OutCLK off chip.
//
// Each serializer line is registered on the rising SCLK edge (output data
// changes on rising SCLK edges), lines not enabled by Alines are held at 0,
// and every signal is presented as a complementary pair for its LVDS driver
// (Out1..Out6 and OutClk, with the b-suffixed pads as complements). Line k
// of the serializer drives pad pair Out(k+1). OutCLK, generated on falling
// SCLK edges by the clock control logic, is passed to its pad pair, so its
// edges fall halfway between data edges. The edge timing and the pad names
// follow the chip description; the assignment of lines to pad pairs is this
// design's choice. Reset (`rst`, asynchronous) drives all lines low.
module steering_logic (
  input  logic       sclk,
  input  logic       rst,
  input  logic [1:0] alines,
  input  logic [5:0] lanes,
  input  logic       outclk,
  output logic [5:0] out_p,
  output logic [5:0] out_n,
  output logic       outclk_p,
  output logic       outclk_n
);
  logic [5:0] mask;

  always_comb
    case (alines)
      2'b00:   mask = 6'b000001;
      2'b01:   mask = 6'b000011;
      2'b10:   mask = 6'b001111;
      default: mask = 6'b111111;
    endcase

  always_ff @(posedge sclk or posedge rst)
    if (rst) out_p <= '0;
    else     out_p <= lanes & mask;

  assign out_n    = ~out_p;
  assign outclk_p = outclk;
  assign outclk_n = ~outclk;
endmodule
