`timescale 1ns / 1ps
// core_logic: BCO counter and readout controller of the FSSR core.
//
// BCO counter (BCO clock): an 8-bit counter of beam crossings. It is held at
// zero while core_reset (Smart Core Reset) is high and counts up from the
// next rising edge, so the edge after core_reset falls makes it 1.
//
// Readout (RCLK). A horizontal token runs over the 16 sets, from set 0 to
// set 15. When any set holds hits (pending) and SendData is 1, the token is
// launched and core_talking rises. The first cycle after launch carries no
// data. In each further cycle the token stops at the lowest-numbered set at
// or beyond its position that holds hits, and the lowest strip of that set is
// read out: its word (BCO number, set code, strip code, zeros) is put on
// core_data, and the strip is cleared in its end-of-set block (strip_clear,
// one-hot). When no hit is left at or beyond the token, core_talking falls
// for at least one cycle before the token can be launched again from set 0.
// Hits that arrive in sets the token has passed wait for the next scan.
// Clearing SendData stops the scan at the next RCLK edge; no word is lost.
//
// core_data and core_talking change on the rising RCLK edge; the next-word
// block samples them on the falling edge. The token, the Core Talking timing
// and the word layout follow the chip description; one word per RCLK cycle
// and skipping empty sets within a cycle are this design's choices.
module core_logic
  import fssr_pkg::*;
(
  input  logic                bco_clk,
  input  logic                rst_bco,      // async (Firefighter Reset)
  input  logic                core_reset,   // sync, from the programming interface
  output logic [BCO_W-1:0]    bco_count,
  input  logic                rclk,
  input  logic                rst_rclk,     // async
  input  logic                send_data,    // BCO-domain register, synchronised here
  input  logic [NUM_SETS-1:0] pending,
  input  logic [SET_SIZE-1:0] remaining [NUM_SETS],
  input  logic [BCO_W-1:0]    stamp     [NUM_SETS],
  output logic [SET_SIZE-1:0] strip_clear [NUM_SETS],
  output logic                core_talking,
  output logic [CORE_W-1:0]   core_data
);
  // BCO counter
  always_ff @(posedge bco_clk or posedge rst_bco)
    if (rst_bco)         bco_count <= '0;
    else if (core_reset) bco_count <= '0;
    else                 bco_count <= bco_count + 1'b1;

  // SendData into the RCLK domain
  logic send_s1, send_en;
  always_ff @(posedge rclk or posedge rst_rclk)
    if (rst_rclk) {send_en, send_s1} <= 2'b00;
    else          {send_en, send_s1} <= {send_s1, send_data};

  // Next hit at or beyond the token
  logic [3:0] token, f_set;
  logic [2:0] f_strip;
  logic       found;

  always_comb begin
    found   = 1'b0;
    f_set   = '0;
    f_strip = '0;
    for (int s = NUM_SETS - 1; s >= 0; s--) begin
      if (pending[s] && 4'(s) >= token) begin
        found = 1'b1;
        f_set = 4'(s);
      end
    end
    for (int k = SET_SIZE - 1; k >= 0; k--)
      if (remaining[f_set][k]) f_strip = 3'(k);
  end

  logic read_now;
  assign read_now = core_talking && send_en && found;

  always_comb
    for (int s = 0; s < NUM_SETS; s++)
      strip_clear[s] = (read_now && f_set == 4'(s)) ? SET_SIZE'(1) << f_strip : '0;

  always_ff @(posedge rclk or posedge rst_rclk) begin
    if (rst_rclk) begin
      core_talking <= 1'b0;
      token        <= '0;
      core_data    <= '0;
    end else if (!core_talking) begin
      token <= '0;
      if (pending != '0 && send_en) core_talking <= 1'b1;
    end else if (!read_now) begin
      core_talking <= 1'b0;
    end else begin
      core_data <= core_word(stamp[f_set], f_set, f_strip);
      token     <= f_set;
    end
  end
endmodule
