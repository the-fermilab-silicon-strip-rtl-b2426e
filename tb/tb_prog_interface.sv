`timescale 1ns / 1ps
// Testbench for prog_interface, with prog_registers attached. Serial
// commands are driven on shift_ctrl/shift_in, one bit per BCO clock (132 ns
// here), fields least significant bit first. Checks: chip address match and
// broadcast, <Write>, <Set>, <Reset>, <Default> and the edge they act on,
// <Read> with its one-cycle delay and MSB-first order, Kill read by rotation
// (bit 127 first, register restored), <Set,SCR> core reset window and the
// BCO numbering after it, <Set,AqBCO> capture on the first falling edge
// after shift_ctrl drops, and <Set,SPR>.
module tb_prog_interface;
  import fssr_pkg::*;

  localparam logic [4:0] MY_ADDR = 5'b00110;
  logic bco_clk = 0, ffr = 0, shift_ctrl = 0, shift_in = 0, shift_out;
  logic [7:0] bco_count;
  logic [4:0] addr;
  logic wr_shift, wr_bit, set, clr, dflt, ki_rotate, spr, aq_load, ki_msb, core_reset;
  logic [7:0] aq_value, rd_data, aqbco;
  logic [1:0] capsel, alines;
  logic [127:0] kill, inject, pat;
  logic send_data, reject_hits;
  int checks = 0, failures = 0;

  prog_interface dut (.bco_clk(bco_clk), .ffr(ffr), .chip_addr(MY_ADDR),
    .shift_ctrl(shift_ctrl), .shift_in(shift_in), .shift_out(shift_out), .bco_count(bco_count),
    .addr(addr), .wr_shift(wr_shift), .wr_bit(wr_bit), .set(set), .clr(clr), .dflt(dflt),
    .ki_rotate(ki_rotate), .spr(spr), .aq_load(aq_load), .aq_value(aq_value),
    .rd_data(rd_data), .ki_msb(ki_msb), .core_reset(core_reset));

  prog_registers regs (.clk(bco_clk), .ffr(ffr), .addr(addr), .wr_shift(wr_shift),
    .wr_bit(wr_bit), .set(set), .clr(clr), .dflt(dflt), .ki_rotate(ki_rotate), .spr(spr),
    .aq_load(aq_load), .aq_value(aq_value), .rd_data(rd_data), .ki_msb(ki_msb),
    .capsel(capsel), .aqbco(aqbco), .alines(alines), .kill(kill), .inject(inject),
    .send_data(send_data), .reject_hits(reject_hits));

  always #66 bco_clk = ~bco_clk;

  // BCO counter as the core keeps it
  always_ff @(posedge bco_clk or posedge ffr)
    if (ffr) bco_count <= 0;
    else     bco_count <= core_reset ? 8'd0 : bco_count + 8'd1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // Shift one bit: present it after a rising edge, latched on the falling edge.
  task automatic put(input logic b);
    @(posedge bco_clk); #1;
    shift_ctrl = 1; shift_in = b;
  endtask

  task automatic header(input logic [4:0] chip, input logic [4:0] r, input logic [2:0] ins);
    for (int i = 0; i < 5; i++) put(chip[i]);
    for (int i = 0; i < 5; i++) put(r[i]);
    for (int i = 0; i < 3; i++) put(ins[i]);
  endtask

  task automatic finish_cmd();
    @(posedge bco_clk); #1;
    shift_ctrl = 0; shift_in = 0;
    repeat (3) @(posedge bco_clk);
  endtask

  task automatic write_reg(input logic [4:0] chip, input logic [4:0] r, input logic [127:0] v,
                           input int n, input bit ch127_first);
    header(chip, r, INSTR_WRITE);
    for (int i = 0; i < n; i++) put(ch127_first ? v[n-1-i] : v[i]);
    finish_cmd();
  endtask

  task automatic simple(input logic [4:0] chip, input logic [4:0] r, input logic [2:0] ins);
    header(chip, r, ins);
    finish_cmd();
  endtask

  task automatic read_reg(input logic [4:0] r, input int n, output logic [127:0] v);
    header(MY_ADDR, r, INSTR_READ);
    @(posedge bco_clk); #1;           // edge that loads the shadow: no data yet
    check("read: nothing before the delay", shift_out, 0);
    v = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge bco_clk); #1;
      v = {v[126:0], shift_out};
    end
    finish_cmd();
  endtask

  initial begin
    logic [127:0] v;
    #1 ffr = 1;
    #300 ffr = 0;

    write_reg(MY_ADDR, REG_CAPSEL, 2'b10, 2, 0);
    check("write capsel", capsel, 2'b10);
    write_reg(5'b00111, REG_CAPSEL, 2'b01, 2, 0);
    check("other chip ignored", capsel, 2'b10);
    write_reg(WILD_CHIP_ADDR, REG_ALINES, 2'b01, 2, 0);
    check("broadcast write alines", alines, 2'b01);
    write_reg(MY_ADDR, REG_AQBCO, 8'hC5, 8, 0);
    check("write aqbco", aqbco, 8'hC5);
    read_reg(REG_AQBCO, 8, v);
    check("read aqbco (MSB first)", v[7:0], 8'hC5);
    check("read is non-destructive", aqbco, 8'hC5);
    read_reg(REG_CAPSEL, 2, v);
    check("read capsel", v[1:0], 2'b10);

    // <Set,SendData>: acts on the rising edge right after the last bit
    header(MY_ADDR, REG_SENDDATA, INSTR_SET);
    @(negedge bco_clk); #1;
    check("set not yet applied", send_data, 0);
    @(posedge bco_clk); #1;
    check("set applied on next rising edge", send_data, 1);
    finish_cmd();
    simple(MY_ADDR, REG_REJECTHITS, INSTR_RESET);
    check("reset rejecthits", reject_hits, 0);
    simple(MY_ADDR, REG_REJECTHITS, INSTR_DEFAULT);
    check("default rejecthits", reject_hits, 1);

    // Kill: load channel 127 first, read back and restored
    pat = {$urandom, $urandom, $urandom, $urandom};
    write_reg(MY_ADDR, REG_KILL, pat, 128, 1);
    check("kill loaded", kill, pat);
    read_reg(REG_KILL, 128, v);
    check("kill read order", v, pat);
    check("kill restored", kill, pat);

    // <Set,SCR>
    header(MY_ADDR, REG_SCR, INSTR_SET);
    @(posedge bco_clk); #1;
    check("core reset rises after last bit", core_reset, 1);
    repeat (3) begin
      @(posedge bco_clk); #1;
      check("core reset held while shift_ctrl high", core_reset, 1);
      check("bco counter held", bco_count, 0);
    end
    shift_ctrl = 0;
    @(posedge bco_clk); #1;     // first rising edge after shift_ctrl lowered, via falling edge
    check("core reset released", core_reset, 0);
    check("bco zero at release", bco_count, 0);
    @(posedge bco_clk); #1;
    check("bco one next edge", bco_count, 1);

    // <Set,AqBCO>
    repeat (5) @(posedge bco_clk);
    header(MY_ADDR, REG_AQBCO, INSTR_SET);
    repeat (2) put(0);          // keep shift_ctrl high a little longer
    @(posedge bco_clk); #1;
    shift_ctrl = 0;
    v[7:0] = bco_count;         // value seen by the next falling edge
    repeat (3) @(posedge bco_clk);
    check("aqbco captured", aqbco, v[7:0]);

    // <Set,SPR>
    write_reg(MY_ADDR, REG_CAPSEL, 2'b11, 2, 0);
    simple(MY_ADDR, REG_SPR, INSTR_SET);
    check("SPR clears capsel", capsel, 0);
    check("SPR clears aqbco", aqbco, 0);
    check("SPR keeps alines", alines, 2'b01);
    check("SPR keeps kill", kill, pat);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
