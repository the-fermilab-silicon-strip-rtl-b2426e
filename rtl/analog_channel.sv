`timescale 1ns / 1ps
// analog_channel: behavioural model (not synthesizable) of one FSSR analog
// front-end channel, as seen by the digital back end.
//
// The real channel is a charge preamplifier, an integrator and shaper, an
// optional baseline restorer and a discriminator comparing the shaped pulse
// with the threshold Vth. A switch after the discriminator kills the channel
// (Kill register) and a 40 fF capacitor, switched by the Inject register,
// couples the InjectIn test pad to the preamplifier input.
//
// The model reduces this to events. A rising edge on strip_strobe deposits
// strip_charge; a rising edge on inject_strobe delivers inject_charge
// through the injection capacitor if inject_sel is high. Charges and vth are
// in the same arbitrary units. If a charge exceeds vth, the discriminator
// output goes high after the peaking time chosen by capsel (00: 60 ns,
// 01: 85 ns, 11: 125 ns) and stays high for PULSE_NS. `disc` is the
// discriminator output after the kill switch. The peaking times and the kill
// and injection switches follow the chip description; the event
// representation, the pulse width and the peaking time used for capsel=10
// (no value given for it; 85 ns is used) are this model's choices. Pile-up
// and baseline shift are not modelled, so the baseline restorer fitted to
// some channels has no effect here.
module analog_channel #(
  parameter int unsigned PULSE_NS = 100
) (
  input  logic [7:0] strip_charge,
  input  logic       strip_strobe,
  input  logic [7:0] inject_charge,
  input  logic       inject_strobe,
  input  logic       inject_sel,
  input  logic       kill,
  input  logic [7:0] vth,
  input  logic [1:0] capsel,
  output logic       disc
);
  int unsigned active = 0;   // discriminator pulses in progress

  function automatic int unsigned peak_ns(input logic [1:0] sel);
    case (sel)
      2'b00:   return 60;
      2'b11:   return 125;
      default: return 85;
    endcase
  endfunction

  task automatic fire();
    int unsigned tp;
    tp = peak_ns(capsel);
    fork
      begin
        #(tp * 1ns);
        active = active + 1;
        #(PULSE_NS * 1ns);
        active = active - 1;
      end
    join_none
  endtask

  always @(posedge strip_strobe)
    if (strip_charge > vth) fire();

  always @(posedge inject_strobe)
    if (inject_sel && inject_charge > vth) fire();

  assign disc = (active != 0) && !kill;
endmodule
