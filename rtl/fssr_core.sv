`timescale 1ns / 1ps
// fssr_core: the FSSR core - analog channels, end-of-set logic, core logic.
//
// 128 strip positions in 16 sets of 8. Positions 64 to 90 with even numbers
// have no analog channel in this test version (their area holds probing
// pads), so 114 channels are instantiated and the other 14 discriminator
// inputs are tied low. Each channel's discriminator output (after its kill
// switch) feeds one strip cell of its set's end-of-set block; the core logic
// reads the sets out with the horizontal token and builds the 23-bit data
// words for the data output interface.
//
// ChipHit is the OR of all discriminator outputs (high while any fires).
// ChipHasData is high while any set holds hits not yet read out.
// Resets: Firefighter Reset (`ffr`) and the Smart Core Reset pulse
// (`core_reset`) clear the strip cells and the end-of-set logic; the RCLK
// side is cleared through a reset synchroniser (asynchronous assertion,
// release on the second RCLK edge). `core_reset` also holds the BCO counter
// at zero. The channel layout and the diagnostic signals follow the chip
// description; the reset synchroniser is this design's choice.
module fssr_core
  import fssr_pkg::*;
(
  input  logic                    bco_clk,
  input  logic                    ffr,
  input  logic                    core_reset,
  input  logic                    reject_hits,
  input  logic                    send_data,
  input  logic [NUM_CHANNELS-1:0] kill,
  input  logic [NUM_CHANNELS-1:0] inject,
  input  logic [1:0]              capsel,
  input  logic [7:0]              vth,
  input  logic [7:0]              strip_charge [NUM_CHANNELS],
  input  logic [NUM_CHANNELS-1:0] strip_strobe,
  input  logic [7:0]              inject_charge,
  input  logic                    inject_strobe,
  input  logic                    rclk,
  output logic [BCO_W-1:0]        bco_count,
  output logic                    core_talking,
  output logic [CORE_W-1:0]       core_data,
  output logic                    chip_hit,
  output logic                    chip_has_data
);
  logic [NUM_CHANNELS-1:0] disc;
  logic                    rst_bco, rst_rclk;
  logic [1:0]              rst_sync;

  assign rst_bco = ffr || core_reset;

  always_ff @(posedge rclk or posedge rst_bco)
    if (rst_bco) rst_sync <= 2'b11;
    else         rst_sync <= {rst_sync[0], 1'b0};
  assign rst_rclk = rst_sync[1];

  // Analog channels
  for (genvar ch = 0; ch < NUM_CHANNELS; ch++) begin : g_ch
    if (ch >= 64 && ch <= 90 && (ch % 2) == 0) begin : g_blank
      assign disc[ch] = 1'b0;
    end else begin : g_chan
      analog_channel u_ch (
        .strip_charge(strip_charge[ch]), .strip_strobe(strip_strobe[ch]),
        .inject_charge(inject_charge), .inject_strobe(inject_strobe),
        .inject_sel(inject[ch]), .kill(kill[ch]), .vth(vth), .capsel(capsel),
        .disc(disc[ch]));
    end
  end

  // End-of-set logic
  logic [NUM_SETS-1:0] full, pending;
  logic [SET_SIZE-1:0] remaining   [NUM_SETS];
  logic [SET_SIZE-1:0] strip_clear [NUM_SETS];
  logic [BCO_W-1:0]    stamp       [NUM_SETS];

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    eos_logic u_eos (
      .bco_clk(bco_clk), .rst_bco(rst_bco), .reject_hits(reject_hits),
      .disc(disc[s*SET_SIZE +: SET_SIZE]), .bco_count(bco_count), .full(full[s]),
      .rclk(rclk), .rst_rclk(rst_rclk), .strip_clear(strip_clear[s]),
      .pending(pending[s]), .remaining(remaining[s]), .stamp(stamp[s]));
  end

  core_logic u_core (
    .bco_clk(bco_clk), .rst_bco(ffr), .core_reset(core_reset), .bco_count(bco_count),
    .rclk(rclk), .rst_rclk(rst_rclk), .send_data(send_data), .pending(pending),
    .remaining(remaining), .stamp(stamp), .strip_clear(strip_clear),
    .core_talking(core_talking), .core_data(core_data));

  assign chip_hit      = |disc;
  assign chip_has_data = |full;
endmodule
