`timescale 1ns / 1ps
// Testbench for prog_registers: drives the strobes the programming interface
// would give and compares every register with values worked out here:
// Firefighter Reset values, least-significant-first writes, Set/Reset/
// Default, Kill/Inject loading (channel 127 first) and read-back by
// rotation, WildReg reaching AqBCO only, Smart Programming Reset, AqBCO
// capture, and the voted registers riding out an upset of one copy.
module tb_prog_registers;
  import fssr_pkg::*;

  logic clk = 0, ffr = 0;
  logic [4:0] addr = 0;
  logic wr_shift = 0, wr_bit = 0, set = 0, clr = 0, dflt = 0, ki_rotate = 0, spr = 0, aq_load = 0;
  logic [7:0] aq_value = 0, rd_data, aqbco;
  logic ki_msb, send_data, reject_hits;
  logic [1:0] capsel, alines;
  logic [127:0] kill, inject, pat;
  int checks = 0, failures = 0;

  prog_registers dut (.clk(clk), .ffr(ffr), .addr(addr), .wr_shift(wr_shift), .wr_bit(wr_bit),
    .set(set), .clr(clr), .dflt(dflt), .ki_rotate(ki_rotate), .spr(spr), .aq_load(aq_load),
    .aq_value(aq_value), .rd_data(rd_data), .ki_msb(ki_msb), .capsel(capsel), .aqbco(aqbco),
    .alines(alines), .kill(kill), .inject(inject), .send_data(send_data),
    .reject_hits(reject_hits));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic strobe(input logic [4:0] a, input int which);   // 0 set 1 clr 2 dflt 3 spr
    @(negedge clk);
    addr = a; set = (which == 0); clr = (which == 1); dflt = (which == 2); spr = (which == 3);
    @(negedge clk);
    set = 0; clr = 0; dflt = 0; spr = 0;
  endtask

  task automatic write_bits(input logic [4:0] a, input logic [127:0] v, input int n, input bit msb_first);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      addr = a; wr_shift = 1; wr_bit = msb_first ? v[n-1-i] : v[i];
    end
    @(negedge clk); wr_shift = 0;
  endtask

  initial begin
    #1 ffr = 1;
    #20 ffr = 0;
    check("capsel after FFR", capsel, 0);
    check("aqbco after FFR", aqbco, 0);
    check("alines after FFR", alines, 0);
    check("kill after FFR", kill, 0);
    check("inject after FFR", inject, 0);
    check("send after FFR", send_data, 0);
    check("reject after FFR", reject_hits, 1);

    write_bits(REG_CAPSEL, 2'b01, 2, 0);   check("capsel write", capsel, 2'b01);
    check("capsel read", rd_data, 8'h01);
    write_bits(REG_ALINES, 2'b10, 2, 0);   check("alines write", alines, 2'b10);
    write_bits(REG_AQBCO, 8'hA6, 8, 0);    check("aqbco write", aqbco, 8'hA6);
    check("aqbco read", rd_data, 8'hA6);
    write_bits(REG_WILD, 8'h3C, 8, 0);     check("wild write", aqbco, 8'h3C);
    check("capsel untouched by wild", capsel, 2'b01);
    strobe(REG_WILD, 2);                   check("wild default", aqbco, 0);
    check("alines untouched by wild", alines, 2'b10);
    strobe(REG_SENDDATA, 0);               check("send set", send_data, 1);
    strobe(REG_REJECTHITS, 1);             check("reject reset", reject_hits, 0);
    strobe(REG_REJECTHITS, 2);             check("reject default", reject_hits, 1);
    strobe(REG_CAPSEL, 0);                 check("capsel set", capsel, 2'b11);
    strobe(REG_ALINES, 0);                 check("alines set", alines, 2'b11);

    // Kill: load bit 127 first
    pat = {$urandom, $urandom, $urandom, $urandom};
    write_bits(REG_KILL, pat, 128, 1);     check("kill load", kill, pat);
    check("inject untouched", inject, 0);
    // read back by rotation: ki_msb gives 127 .. 0
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); addr = REG_KILL; ki_rotate = 1;
      check("kill read bit", ki_msb, pat[127 - i]);
    end
    @(negedge clk); ki_rotate = 0;
    check("kill restored", kill, pat);
    pat = {$urandom, $urandom, $urandom, $urandom};
    write_bits(REG_INJECT, pat, 128, 1);   check("inject load", inject, pat);
    @(negedge clk); addr = REG_INJECT; #1;
    check("inject msb", ki_msb, pat[127]);
    strobe(REG_INJECT, 1);                 check("inject reset", inject, 0);

    // SPR: CapSel and AqBCO to default, others unchanged
    write_bits(REG_AQBCO, 8'h55, 8, 0);
    strobe(REG_SPR, 3);
    check("capsel after SPR", capsel, 0);
    check("aqbco after SPR", aqbco, 0);
    check("alines after SPR", alines, 2'b11);
    check("kill after SPR", kill, kill);
    check("send after SPR", send_data, 1);

    // AqBCO capture
    @(negedge clk); aq_load = 1; aq_value = 8'h9E;
    @(negedge clk); aq_load = 0;
    check("aqbco capture", aqbco, 8'h9E);

    // Upset of one copy of SendData and Alines
    @(negedge clk);
    dut.u_send.c1 = ~dut.u_send.c1;
    dut.u_alines.c0 = 2'b00;
    #1;
    check("send with one copy upset", send_data, 1);
    check("alines with one copy upset", alines, 2'b11);
    @(negedge clk);
    check("send copy scrubbed", dut.u_send.c1, 1);
    check("alines copy scrubbed", dut.u_alines.c0, 2'b11);

    // FFR again
    @(negedge clk); ffr = 1; #1 ffr = 0;
    check("kill after FFR 2", kill, 0);
    check("alines after FFR 2", alines, 0);
    check("reject after FFR 2", reject_hits, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
