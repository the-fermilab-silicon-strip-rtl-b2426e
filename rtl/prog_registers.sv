`timescale 1ns / 1ps
// prog_registers: the programmable registers of the FSSR chip.
//
// Registers (number, width, value after Firefighter Reset):
//   CapSel     13    2  00   shaping-time select for the analog channels
//   AqBCO      15    8  0    BCO counter value captured by <AqBCO,Set>
//   Alines     16    2  00   number of active output lines (1/2/4/6)
//   Kill       17  128  0    per-channel discriminator kill switch
//   Inject     18  128  0    per-channel charge-injection switch
//   SendData   19    1  0    enables core readout
//   RejectHits 20    1  1    stops the core from accepting new hits
// Register 21 (WildReg) reaches every register that does not ignore it;
// from the list above that is only AqBCO. Registers 24 (SPR) and 28 (SCR)
// are actions, handled in the programming interface.
//
// All updates happen on the rising BCO clock edge, from strobes that the
// programming interface raises for one cycle:
//   wr_shift   shift wr_bit into register `addr`. Ordinary registers are
//              loaded least significant bit first (the new bit enters at the
//              top and moves down); Kill and Inject take the bit for
//              channel 127 first (the new bit enters at bit 0 and moves up).
//   set/clr/dflt  all ones / all zeros / default value. <Set> on AqBCO does
//              not set ones: the interface captures the BCO counter and
//              delivers it on aq_load/aq_value.
//   ki_rotate  rotate Kill or Inject one place towards bit 127, so that a
//              read recirculates the register and leaves it unchanged after
//              128 bits. ki_msb is bit 127 of the addressed one.
//   spr        Smart Programming Reset: CapSel and AqBCO to default.
// Alines, SendData and RejectHits are held in triple-redundant voted
// registers (tmr_reg). Firefighter Reset (`ffr`, asynchronous) sets every
// register to the values above; Operation Reset affects none of them.
// rd_data gives the addressed ordinary register right-aligned, for the
// read shadow register of the interface.
module prog_registers
  import fssr_pkg::*;
(
  input  logic                    clk,        // BCO clock
  input  logic                    ffr,        // Firefighter Reset, async
  input  logic [4:0]              addr,
  input  logic                    wr_shift,
  input  logic                    wr_bit,
  input  logic                    set,
  input  logic                    clr,
  input  logic                    dflt,
  input  logic                    ki_rotate,
  input  logic                    spr,
  input  logic                    aq_load,
  input  logic [BCO_W-1:0]        aq_value,
  output logic [7:0]              rd_data,
  output logic                    ki_msb,
  output logic [1:0]              capsel,
  output logic [BCO_W-1:0]        aqbco,
  output logic [1:0]              alines,
  output logic [NUM_CHANNELS-1:0] kill,
  output logic [NUM_CHANNELS-1:0] inject,
  output logic                    send_data,
  output logic                    reject_hits
);
  logic sel_capsel, sel_aqbco, sel_alines, sel_kill, sel_inject, sel_send, sel_reject;

  assign sel_capsel = (addr == REG_CAPSEL);
  assign sel_aqbco  = (addr == REG_AQBCO) || (addr == REG_WILD);
  assign sel_alines = (addr == REG_ALINES);
  assign sel_kill   = (addr == REG_KILL);
  assign sel_inject = (addr == REG_INJECT);
  assign sel_send   = (addr == REG_SENDDATA);
  assign sel_reject = (addr == REG_REJECTHITS);

  // CapSel
  always_ff @(posedge clk or posedge ffr) begin
    if (ffr)                               capsel <= 2'b00;
    else if (spr)                          capsel <= 2'b00;
    else if (sel_capsel && wr_shift)       capsel <= {wr_bit, capsel[1]};
    else if (sel_capsel && set)            capsel <= 2'b11;
    else if (sel_capsel && (clr || dflt))  capsel <= 2'b00;
  end

  // AqBCO
  always_ff @(posedge clk or posedge ffr) begin
    if (ffr)                               aqbco <= '0;
    else if (spr)                          aqbco <= '0;
    else if (aq_load)                      aqbco <= aq_value;
    else if (sel_aqbco && wr_shift)        aqbco <= {wr_bit, aqbco[BCO_W-1:1]};
    else if (sel_aqbco && (clr || dflt))   aqbco <= '0;
  end

  // Kill and Inject shift registers
  always_ff @(posedge clk or posedge ffr) begin
    if (ffr) begin
      kill   <= '0;
      inject <= '0;
    end else begin
      if (sel_kill) begin
        if (wr_shift)          kill <= {kill[NUM_CHANNELS-2:0], wr_bit};
        else if (ki_rotate)    kill <= {kill[NUM_CHANNELS-2:0], kill[NUM_CHANNELS-1]};
        else if (set)          kill <= '1;
        else if (clr || dflt)  kill <= '0;
      end
      if (sel_inject) begin
        if (wr_shift)          inject <= {inject[NUM_CHANNELS-2:0], wr_bit};
        else if (ki_rotate)    inject <= {inject[NUM_CHANNELS-2:0], inject[NUM_CHANNELS-1]};
        else if (set)          inject <= '1;
        else if (clr || dflt)  inject <= '0;
      end
    end
  end

  // SEU-tolerant registers
  logic       alines_ld, send_ld, reject_ld;
  logic [1:0] alines_d;
  logic       send_d, reject_d;

  always_comb begin
    alines_ld = sel_alines && (wr_shift || set || clr || dflt);
    if (wr_shift)  alines_d = {wr_bit, alines[1]};
    else if (set)  alines_d = 2'b11;
    else           alines_d = 2'b00;

    send_ld = sel_send && (wr_shift || set || clr || dflt);
    send_d  = wr_shift ? wr_bit : set;

    reject_ld = sel_reject && (wr_shift || set || clr || dflt);
    if (wr_shift)   reject_d = wr_bit;
    else if (dflt)  reject_d = 1'b1;
    else            reject_d = set;
  end

  tmr_reg #(.W(2), .RESET_VAL(2'b00)) u_alines (
    .clk(clk), .rst(ffr), .load(alines_ld), .d(alines_d), .q(alines));
  tmr_reg #(.W(1), .RESET_VAL(1'b0)) u_send (
    .clk(clk), .rst(ffr), .load(send_ld), .d(send_d), .q(send_data));
  tmr_reg #(.W(1), .RESET_VAL(1'b1)) u_reject (
    .clk(clk), .rst(ffr), .load(reject_ld), .d(reject_d), .q(reject_hits));

  // Read-back
  always_comb begin
    case (addr)
      REG_CAPSEL:     rd_data = {6'b0, capsel};
      REG_AQBCO:      rd_data = aqbco;
      REG_ALINES:     rd_data = {6'b0, alines};
      REG_SENDDATA:   rd_data = {7'b0, send_data};
      REG_REJECTHITS: rd_data = {7'b0, reject_hits};
      default:        rd_data = 8'b0;
    endcase
    ki_msb = sel_inject ? inject[NUM_CHANNELS-1] : kill[NUM_CHANNELS-1];
  end
endmodule
