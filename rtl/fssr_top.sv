`timescale 1ns / 1ps
// fssr_top: the FSSR readout test chip.
//
// Four sections, wired as in the chip's block diagram:
//   fssr_core       analog channels, end-of-set logic, core logic
//   prog_interface  serial command decoder (BCO clock)
//   prog_registers  CapSel, AqBCO, Alines, Kill, Inject, SendData, RejectHits
//   data_output_if  SCLK/RCLK/OutCLK generation, word selection,
//                   serialization on 1, 2, 4 or 6 lines
// Ports are the chip's pads as single-ended logic: each differential input
// pair (BCOClk, ShiftCtrl, ShiftIn, MClkA, MClkB, FFR, OR) appears as one
// signal and each output pair as a true/complement pair. chip_addr is the
// value set by the internal wire bonds. The analog side appears as the
// discriminator threshold (applied externally in this version, no DAC), the
// InjectIn pad and one charge event input per strip; see analog_channel.
//
// Resets: ffr (Firefighter Reset) resets everything, orst (Operation Reset)
// only the data output interface; the software resets SCR and SPR come from
// the programming interface. The BCO clock and MCA/MCB need no phase or
// frequency relation.
module fssr_top
  import fssr_pkg::*;
(
  input  logic                    bco_clk,
  input  logic                    ffr,
  input  logic                    orst,
  input  logic [4:0]              chip_addr,
  input  logic                    shift_ctrl,
  input  logic                    shift_in,
  output logic                    shift_out,
  input  logic                    mca,
  input  logic                    mcb,
  output logic [5:0]              out_p,
  output logic [5:0]              out_n,
  output logic                    outclk_p,
  output logic                    outclk_n,
  output logic                    chip_hit,
  output logic                    chip_has_data,
  input  logic [7:0]              vth,
  input  logic [7:0]              strip_charge [NUM_CHANNELS],
  input  logic [NUM_CHANNELS-1:0] strip_strobe,
  input  logic [7:0]              inject_charge,
  input  logic                    inject_strobe
);
  // Programming interface <-> registers
  logic [4:0]       addr;
  logic             wr_shift, wr_bit, set, clr, dflt, ki_rotate, spr, aq_load, ki_msb;
  logic [BCO_W-1:0] aq_value, bco_count, aqbco;
  logic [7:0]       rd_data;
  logic             core_reset;

  // Register outputs
  logic [1:0]              capsel, alines;
  logic [NUM_CHANNELS-1:0] kill, inject;
  logic                    send_data, reject_hits;

  // Core <-> data output interface
  logic              rclk, core_talking;
  logic [CORE_W-1:0] core_data;
  status_t           status;

  prog_interface u_pi (
    .bco_clk(bco_clk), .ffr(ffr), .chip_addr(chip_addr), .shift_ctrl(shift_ctrl),
    .shift_in(shift_in), .shift_out(shift_out), .bco_count(bco_count),
    .addr(addr), .wr_shift(wr_shift), .wr_bit(wr_bit), .set(set), .clr(clr),
    .dflt(dflt), .ki_rotate(ki_rotate), .spr(spr), .aq_load(aq_load),
    .aq_value(aq_value), .rd_data(rd_data), .ki_msb(ki_msb), .core_reset(core_reset));

  prog_registers u_regs (
    .clk(bco_clk), .ffr(ffr), .addr(addr), .wr_shift(wr_shift), .wr_bit(wr_bit),
    .set(set), .clr(clr), .dflt(dflt), .ki_rotate(ki_rotate), .spr(spr),
    .aq_load(aq_load), .aq_value(aq_value), .rd_data(rd_data), .ki_msb(ki_msb),
    .capsel(capsel), .aqbco(aqbco), .alines(alines), .kill(kill), .inject(inject),
    .send_data(send_data), .reject_hits(reject_hits));

  fssr_core u_core (
    .bco_clk(bco_clk), .ffr(ffr), .core_reset(core_reset), .reject_hits(reject_hits),
    .send_data(send_data), .kill(kill), .inject(inject), .capsel(capsel), .vth(vth),
    .strip_charge(strip_charge), .strip_strobe(strip_strobe),
    .inject_charge(inject_charge), .inject_strobe(inject_strobe), .rclk(rclk),
    .bco_count(bco_count), .core_talking(core_talking), .core_data(core_data),
    .chip_hit(chip_hit), .chip_has_data(chip_has_data));

  assign status = '{send_data: send_data, reject_hits: reject_hits, alines: alines,
                    aqbco_nz: (aqbco != '0)};

  data_output_if u_doi (
    .mca(mca), .mcb(mcb), .orst(orst || ffr), .alines(alines), .status(status),
    .core_talking(core_talking), .core_data(core_data), .rclk(rclk),
    .out_p(out_p), .out_n(out_n), .outclk_p(outclk_p), .outclk_n(outclk_n));
endmodule
