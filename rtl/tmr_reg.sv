`timescale 1ns / 1ps
// tmr_reg: a register built from three copies and a majority vote, so that a
// single upset copy does not change the value seen by the rest of the chip.
//
// The chip description asks for Alines, SendData and RejectHits to be held in
// redundant logic immune to single event upsets; triple modular redundancy
// with bitwise 2-of-3 voting is this design's choice of how. On every clock
// where `load` is high all three copies take `d`; otherwise each copy is
// rewritten with the voted value, which scrubs an upset copy within one
// cycle. Asynchronous reset `rst` loads RESET_VAL. `q` is the voted value.
module tmr_reg #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] c0, c1, c2;

  assign q = (c0 & c1) | (c1 & c2) | (c0 & c2);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      c0 <= RESET_VAL;
      c1 <= RESET_VAL;
      c2 <= RESET_VAL;
    end else begin
      c0 <= load ? d : q;
      c1 <= load ? d : q;
      c2 <= load ? d : q;
    end
  end
endmodule
