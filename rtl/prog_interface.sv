`timescale 1ns / 1ps
// prog_interface: serial command decoder of the FSSR programming interface.
//
// A command is shifted in on shift_in while shift_ctrl is high, one bit per
// BCO clock, sampled on the falling BCO edge: 5 bits of chip address, 5 bits
// of register number and 3 bits of instruction, each field least significant
// bit first, then (for <Write> only) the data. The chip answers its own
// address (chip_addr, set by wire bonds) and the broadcast address 10101.
// Lowering shift_ctrl ends a command; the next one starts when it rises.
//
// Timing (rising edges unless stated):
//   * Falling edge n latches bit n. The rising edge that follows acts on it,
//     so <Set>, <Reset> and <Default> change the register on the rising edge
//     right after the last instruction bit is latched, and each write-data
//     bit is shifted into the register half a cycle after it is latched.
//   * <Set,SCR>: core_reset rises on that same edge and stays high until the
//     first rising edge that sees shift_ctrl lowered; the BCO counter, held
//     at zero meanwhile, reads 1 one cycle later.
//   * <Set,SPR>: spr is high for one cycle.
//   * <Set,AqBCO> (or <Set,WildReg>): the BCO counter is sampled on the first
//     falling edge after shift_ctrl goes low and written into AqBCO on the
//     following rising edge.
//   * <Read>: the register is copied to a shadow register on the edge after
//     the instruction; one cycle later its most significant bit appears on
//     shift_out, then one bit per rising edge while shift_ctrl stays high.
//     Kill and Inject have no shadow: they are rotated, bit 127 first, and
//     are whole again after 128 bits.
// Bits beyond the register's width are ignored. Registers not in the
// register map, and commands for another chip, are ignored. The sampling
// edge, bit order of the fields and reset behaviour follow the chip
// description; keeping each <Write> to the register width and the exact
// end of the SCR pulse are this design's choices. Reset: `ffr`, asynchronous.
module prog_interface
  import fssr_pkg::*;
(
  input  logic             bco_clk,
  input  logic             ffr,
  input  logic [4:0]       chip_addr,
  input  logic             shift_ctrl,
  input  logic             shift_in,
  output logic             shift_out,
  input  logic [BCO_W-1:0] bco_count,
  // to the programmable registers
  output logic [4:0]       addr,
  output logic             wr_shift,
  output logic             wr_bit,
  output logic             set,
  output logic             clr,
  output logic             dflt,
  output logic             ki_rotate,
  output logic             spr,
  output logic             aq_load,
  output logic [BCO_W-1:0] aq_value,
  input  logic [7:0]       rd_data,
  input  logic             ki_msb,
  // to the core
  output logic             core_reset
);
  typedef enum logic [1:0] {S_HDR, S_WRITE, S_READ, S_IGNORE} state_e;

  state_e      state;
  logic [11:0] hdr;       // bits received so far, last one on top
  logic [7:0]  cnt;       // header bits, then data bits
  logic [7:0]  width;     // width of the addressed register
  logic [7:0]  shadow;
  logic        nb_valid, nb_bit;   // bit latched on the falling edge
  logic        aq_armed, aq_fire;
  logic [BCO_W-1:0] aq_sample;

  // Falling-edge side: input latch and AqBCO capture.
  always_ff @(negedge bco_clk or posedge ffr) begin
    if (ffr) begin
      nb_valid  <= 1'b0;
      nb_bit    <= 1'b0;
      aq_fire   <= 1'b0;
      aq_sample <= '0;
    end else begin
      nb_valid <= shift_ctrl;
      nb_bit   <= shift_in;
      aq_fire  <= aq_armed && !shift_ctrl;
      if (aq_armed && !shift_ctrl) aq_sample <= bco_count;
    end
  end

  // Decode of a complete header, the edge after the 13th bit.
  logic [12:0] hdr_full;
  logic [4:0]  h_chip, h_reg;
  logic [2:0]  h_instr;
  logic        decode, addressed;

  assign hdr_full  = {nb_bit, hdr};
  assign h_chip    = hdr_full[4:0];
  assign h_reg     = hdr_full[9:5];
  assign h_instr   = hdr_full[12:10];
  assign decode    = nb_valid && (state == S_HDR) && (cnt == 8'd12);
  assign addressed = (h_chip == chip_addr) || (h_chip == WILD_CHIP_ADDR);

  always_comb begin
    addr      = decode ? h_reg : hdr[8:4];   // hdr holds header bits 12..1 after decoding
    wr_shift  = 1'b0;
    wr_bit    = nb_bit;
    set       = 1'b0;
    clr       = 1'b0;
    dflt      = 1'b0;
    spr       = 1'b0;
    ki_rotate = 1'b0;
    if (decode && addressed) begin
      set  = (h_instr == INSTR_SET) && (h_reg != REG_AQBCO) && (h_reg != REG_WILD);
      clr  = (h_instr == INSTR_RESET);
      dflt = (h_instr == INSTR_DEFAULT);
      spr  = (h_instr == INSTR_SET) && (h_reg == REG_SPR);
    end
    if (nb_valid && state == S_WRITE && cnt < width) wr_shift = 1'b1;
    if (nb_valid && state == S_READ && cnt < width && width == 8'd128) ki_rotate = 1'b1;
  end

  // hdr is kept after decoding so that addr stays valid for writes/reads.
  always_ff @(posedge bco_clk or posedge ffr) begin
    if (ffr) begin
      state      <= S_HDR;
      hdr        <= '0;
      cnt        <= '0;
      width      <= '0;
      shadow     <= '0;
      shift_out  <= 1'b0;
      core_reset <= 1'b0;
      aq_armed   <= 1'b0;
    end else begin
      if (aq_fire) aq_armed <= 1'b0;
      if (!nb_valid) begin
        state      <= S_HDR;
        cnt        <= '0;
        shift_out  <= 1'b0;
        core_reset <= 1'b0;
      end else begin
        case (state)
          S_HDR: begin
            hdr <= hdr_full[12:1];
            cnt <= cnt + 8'd1;
            if (decode) begin
              cnt   <= '0;
              width <= reg_width(h_reg);
              state <= S_IGNORE;
              if (addressed) begin
                case (h_instr)
                  INSTR_WRITE: state <= S_WRITE;
                  INSTR_READ: begin
                    state  <= S_READ;
                    shadow <= rd_data << (8'd8 - reg_width(h_reg));
                  end
                  INSTR_SET: begin
                    if (h_reg == REG_SCR) core_reset <= 1'b1;
                    if (h_reg == REG_AQBCO || h_reg == REG_WILD) aq_armed <= 1'b1;
                  end
                  default: ;
                endcase
              end
            end
          end
          S_WRITE: if (cnt < width) cnt <= cnt + 8'd1;
          S_READ: begin
            if (cnt < width) begin
              cnt <= cnt + 8'd1;
              if (width == 8'd128) begin
                shift_out <= ki_msb;
              end else begin
                shift_out <= shadow[7];
                shadow    <= shadow << 1;
              end
            end else begin
              shift_out <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign aq_load  = aq_fire;
  assign aq_value = aq_sample;
endmodule
