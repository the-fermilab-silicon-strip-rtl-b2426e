`timescale 1ns / 1ps
// fssr_pkg: constants and helper functions shared by the FSSR readout chip.
//
// Holds the programming-interface instruction codes, the programmable
// register numbers, the set and strip codes used in the data word, and the
// bit layout of the 24-bit output words (sync/status word and data word).
// The numeric values (instruction codes, register numbers, set and strip
// codes, status-bit positions) follow the chip description; the names of the
// types and functions are this design's own.
package fssr_pkg;

  // Array geometry: 128 strips in 16 sets of 8.
  localparam int unsigned NUM_CHANNELS = 128;
  localparam int unsigned NUM_SETS     = 16;
  localparam int unsigned SET_SIZE     = 8;
  localparam int unsigned BCO_W        = 8;
  localparam int unsigned WORD_W       = 24;   // serialized word, word mark included
  localparam int unsigned CORE_W       = 23;   // word from the core, bits 23..1

  // Broadcast ("wild") chip address.
  localparam logic [4:0] WILD_CHIP_ADDR = 5'b10101;

  // Instruction codes.
  typedef enum logic [2:0] {
    INSTR_WRITE   = 3'b001,
    INSTR_SET     = 3'b010,
    INSTR_READ    = 3'b100,
    INSTR_RESET   = 3'b101,
    INSTR_DEFAULT = 3'b110
  } instr_e;

  // Register numbers.
  typedef enum logic [4:0] {
    REG_CAPSEL     = 5'd13,
    REG_AQBCO      = 5'd15,
    REG_ALINES     = 5'd16,
    REG_KILL       = 5'd17,
    REG_INJECT     = 5'd18,
    REG_SENDDATA   = 5'd19,
    REG_REJECTHITS = 5'd20,
    REG_WILD       = 5'd21,
    REG_SPR        = 5'd24,
    REG_SCR        = 5'd28
  } reg_e;

  // Status bits carried by the sync word (bits 23..19; 18..14 unassigned).
  typedef struct packed {
    logic       send_data;    // b23
    logic       reject_hits;  // b22
    logic [1:0] alines;       // b21 b20
    logic       aqbco_nz;     // b19
  } status_t;

  // Set number (0..15, i.e. sets 1..16) to its 5-bit code.
  function automatic logic [4:0] set_code(input logic [3:0] set_idx);
    case (set_idx)
      4'd0:  return 5'b01010;
      4'd1:  return 5'b01011;
      4'd2:  return 5'b01111;
      4'd3:  return 5'b01110;
      4'd4:  return 5'b01100;
      4'd5:  return 5'b01101;
      4'd6:  return 5'b11101;
      4'd7:  return 5'b11100;
      4'd8:  return 5'b10100;
      4'd9:  return 5'b10101;
      4'd10: return 5'b10111;
      4'd11: return 5'b10110;
      4'd12: return 5'b10010;
      4'd13: return 5'b10011;
      4'd14: return 5'b11011;
      default: return 5'b11010;
    endcase
  endfunction

  // Strip number within a set (0..7, i.e. strips 1..8) to its 4-bit code.
  function automatic logic [3:0] strip_code(input logic [2:0] strip_idx);
    case (strip_idx)
      3'd0: return 4'b0101;
      3'd1: return 4'b0111;
      3'd2: return 4'b0110;
      3'd3: return 4'b1110;
      3'd4: return 4'b1010;
      3'd5: return 4'b1011;
      3'd6: return 4'b1001;
      default: return 4'b1101;
    endcase
  endfunction

  // Core data word, bits 23..1: BCO in 23..16, set code in 15..11,
  // strip code in 10..7, zeros in 6..1.
  function automatic logic [CORE_W-1:0] core_word(input logic [BCO_W-1:0] bco,
                                                  input logic [3:0] set_idx,
                                                  input logic [2:0] strip_idx);
    return {bco, set_code(set_idx), strip_code(strip_idx), 6'b000000};
  endfunction

  // Sync/status word: status in 23..19, zeros in 18..1, word mark in 0.
  function automatic logic [WORD_W-1:0] sync_word(input status_t st);
    return {st, 5'b00000, 13'b0, 1'b1};
  endfunction

  // Bits per output line for an Alines code (1, 2, 4 or 6 lines).
  function automatic logic [4:0] bits_per_line(input logic [1:0] alines);
    case (alines)
      2'b00: return 5'd24;
      2'b01: return 5'd12;
      2'b10: return 5'd6;
      default: return 5'd4;
    endcase
  endfunction

  // Number of data bits a register takes on <Write> and gives on <Read>;
  // zero for register numbers with no physical register.
  function automatic logic [7:0] reg_width(input logic [4:0] addr);
    case (addr)
      REG_CAPSEL, REG_ALINES:        return 8'd2;
      REG_AQBCO, REG_WILD:           return 8'd8;
      REG_KILL, REG_INJECT:          return 8'd128;
      REG_SENDDATA, REG_REJECTHITS:  return 8'd1;
      default:                       return 8'd0;
    endcase
  endfunction

endpackage
