`timescale 1ns / 1ps
// eos_logic: strip unit cells and end-of-set logic of one set of 8 strips.
//
// The chip groups its 128 strips in 16 sets of 8, each served by one
// end-of-set (EOS) block between the analog channels and the core logic.
// The document names the block and its role; the logic here is this
// design's own, the simplest that does the job across the two unrelated
// clocks of the chip (BCO clock for hit capture, RCLK for readout):
//
//   Strip cells. Each discriminator output clocks a toggle flip-flop, so a
//   hit is caught however short the pulse. The toggle only flips while
//   RejectHits is 0 (otherwise cells ignore new hits). The toggles are
//   brought into the BCO clock domain by two flip-flops; a change is a hit.
//
//   Set capture (BCO clock). When the set is empty and one or more strips
//   report a hit, the 8-bit hit pattern and the BCO number are latched and
//   `full` is raised. The BCO number stored is the counter value minus
//   SYNC_LAT, i.e. the crossing in which the hit arrived. Hits that arrive
//   while the set is full are lost. `full` drops when the readout side
//   acknowledges (a toggle, synchronised by two flip-flops).
//
//   Readout side (RCLK). When the synchronised `full` is seen, the pattern
//   and time stamp (stable while `full` is high) are copied. The core logic
//   clears strips one at a time with strip_clear; when none is left, the
//   acknowledge toggles and the side waits for `full` to fall.
//
// Interface: `pending` is high (RCLK domain) while `remaining` holds strips
// not yet read out; `stamp` is their BCO number. `full` (BCO domain) is high
// from capture until the acknowledge arrives. rst_bco and rst_rclk are
// asynchronous resets (Smart Core Reset or Firefighter Reset) of each side.
module eos_logic
  import fssr_pkg::*;
#(
  parameter int unsigned SYNC_LAT = 2
) (
  input  logic                bco_clk,
  input  logic                rst_bco,
  input  logic                reject_hits,
  input  logic [SET_SIZE-1:0] disc,
  input  logic [BCO_W-1:0]    bco_count,
  output logic                full,
  input  logic                rclk,
  input  logic                rst_rclk,
  input  logic [SET_SIZE-1:0] strip_clear,
  output logic                pending,
  output logic [SET_SIZE-1:0] remaining,
  output logic [BCO_W-1:0]    stamp
);
  // Strip cells
  logic [SET_SIZE-1:0] tog, tog_s1, tog_s2, tog_s3, hit;
  logic                accept;

  // Captured in the BCO domain so the cell flip-flops see a steady enable.
  always_ff @(posedge bco_clk or posedge rst_bco)
    if (rst_bco) accept <= 1'b0;
    else         accept <= !reject_hits;

  for (genvar i = 0; i < SET_SIZE; i++) begin : g_cell
    logic t;
    always_ff @(posedge disc[i] or posedge rst_bco)
      if (rst_bco)     t <= 1'b0;
      else if (accept) t <= !t;
    assign tog[i] = t;
  end

  always_ff @(posedge bco_clk or posedge rst_bco) begin
    if (rst_bco) begin
      tog_s1 <= '0;
      tog_s2 <= '0;
      tog_s3 <= '0;
    end else begin
      tog_s1 <= tog;
      tog_s2 <= tog_s1;
      tog_s3 <= tog_s2;
    end
  end
  assign hit = tog_s2 ^ tog_s3;

  // Set capture
  logic [SET_SIZE-1:0] pattern;
  logic [BCO_W-1:0]    stamp_bco;
  logic                ack_t, ack_s1, ack_s2, ack_s3;

  always_ff @(posedge bco_clk or posedge rst_bco) begin
    if (rst_bco) begin
      full      <= 1'b0;
      pattern   <= '0;
      stamp_bco <= '0;
      ack_s1    <= 1'b0;
      ack_s2    <= 1'b0;
      ack_s3    <= 1'b0;
    end else begin
      ack_s1 <= ack_t;
      ack_s2 <= ack_s1;
      ack_s3 <= ack_s2;
      if (full) begin
        if (ack_s2 != ack_s3) full <= 1'b0;
      end else if (hit != '0) begin
        full      <= 1'b1;
        pattern   <= hit;
        stamp_bco <= bco_count - BCO_W'(SYNC_LAT);
      end
    end
  end

  // Readout side
  typedef enum logic [1:0] {R_IDLE, R_LOADED, R_WAIT} rstate_e;
  rstate_e             rst_q;
  logic                full_s1, full_s2;
  logic [SET_SIZE-1:0] left_next;

  assign left_next = remaining & ~strip_clear;

  always_ff @(posedge rclk or posedge rst_rclk) begin
    if (rst_rclk) begin
      rst_q     <= R_IDLE;
      full_s1   <= 1'b0;
      full_s2   <= 1'b0;
      remaining <= '0;
      stamp     <= '0;
      ack_t     <= 1'b0;
    end else begin
      full_s1 <= full;
      full_s2 <= full_s1;
      case (rst_q)
        R_IDLE:
          if (full_s2) begin
            remaining <= pattern;
            stamp     <= stamp_bco;
            rst_q     <= R_LOADED;
          end
        R_LOADED: begin
          remaining <= left_next;
          if (left_next == '0) begin
            ack_t <= !ack_t;
            rst_q <= R_WAIT;
          end
        end
        default:
          if (!full_s2) rst_q <= R_IDLE;
      endcase
    end
  end

  assign pending = (rst_q == R_LOADED);

  // The core may only clear strips that are waiting.
  assert property (@(posedge rclk) disable iff (rst_rclk)
                   (strip_clear & ~remaining) == '0);
endmodule
