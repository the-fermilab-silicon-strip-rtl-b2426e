`timescale 1ns / 1ps
// End-to-end testbench for fssr_top at its full size (128 strips, 16 sets).
//
// The chip is run as a module controller would run it: all commands go in
// through the serial programming interface, all data is taken from the
// output pads by a receiver model that deserializes every active line on
// both OutCLK edges, and words are decoded with the set and strip code
// tables (repeated here). BCO clock 132 ns, MCA/MCB 68.8 MHz with MCB 90
// degrees behind. The sequence follows the switch-on procedure (Firefighter
// Reset, Alines, RejectHits off, Smart Core Reset, SendData on) and then
// exercises: every output configuration (1, 2, 4, 6 lines, each after an
// Operation Reset), Kill and Inject scans with read-back, InjectIn charge
// injection, RejectHits, SendData off and on, <AqBCO,Set> and the status bit
// it sets, Smart Programming Reset, ChipHit and ChipHasData. Each mechanism
// is counted and one that never happened counts as a failure.
module tb_fssr_top;
  import fssr_pkg::*;
  localparam logic [4:0] SETC [16] = '{5'b01010, 5'b01011, 5'b01111, 5'b01110,
                                       5'b01100, 5'b01101, 5'b11101, 5'b11100,
                                       5'b10100, 5'b10101, 5'b10111, 5'b10110,
                                       5'b10010, 5'b10011, 5'b11011, 5'b11010};
  localparam logic [3:0] STRC [8] = '{4'b0101, 4'b0111, 4'b0110, 4'b1110,
                                      4'b1010, 4'b1011, 4'b1001, 4'b1101};
  localparam logic [4:0] ME = 5'b01001;
  localparam realtime TMCA = 14.5ns;

  logic bco_clk = 0, ffr = 0, orst = 0, shift_ctrl = 0, shift_in = 0, shift_out;
  logic mca = 0, mcb = 0;
  logic [5:0] out_p, out_n;
  logic outclk_p, outclk_n, chip_hit, chip_has_data;
  logic [7:0] vth = 8'd40, inject_charge = 0;
  logic [7:0] strip_charge [128];
  logic [127:0] strip_strobe = 0;
  logic inject_strobe = 0;
  int checks = 0, failures = 0;

  fssr_top dut (.bco_clk(bco_clk), .ffr(ffr), .orst(orst), .chip_addr(ME),
    .shift_ctrl(shift_ctrl), .shift_in(shift_in), .shift_out(shift_out), .mca(mca), .mcb(mcb),
    .out_p(out_p), .out_n(out_n), .outclk_p(outclk_p), .outclk_n(outclk_n),
    .chip_hit(chip_hit), .chip_has_data(chip_has_data), .vth(vth),
    .strip_charge(strip_charge), .strip_strobe(strip_strobe),
    .inject_charge(inject_charge), .inject_strobe(inject_strobe));

  always #66 bco_clk = ~bco_clk;
  always #(TMCA / 2) mca = ~mca;
  initial begin #(TMCA / 4); forever #(TMCA / 2) mcb = ~mcb; end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("%0t %s", $time, msg);
  endtask

  // Mechanism counters
  int n_data, n_sync, n_mode [4], n_or, n_kill_blocked, n_inject, n_reject, n_sendoff,
      n_aq, n_spr, n_readback, n_hitpulse, n_hasdata, n_scr;

  // ---------------------------------------------------------------- receiver
  int exp_bco [128];
  int lines = 1, nb = 24, bitpos = 0;
  bit rx_on = 0, first_group = 1;
  logic [23:0] acc;
  logic [4:0]  last_status;
  int n_status_words;

  task automatic word_in(input logic [23:0] w);
    checks++;
    if (w[0] !== 1'b1) begin fail($sformatf("word %h without word mark", w)); return; end
    if (w[13:1] == 13'b0) begin
      n_sync++;
      last_status = w[23:19];
      n_status_words++;
      checks++; if (w[18:14] != 0) fail("unassigned status bits set");
    end else begin
      int fs, fk, ch;
      fs = -1; fk = -1;
      for (int s = 0; s < 16; s++) if (w[15:11] == SETC[s]) fs = s;
      for (int k = 0; k < 8; k++) if (w[10:7] == STRC[k]) fk = k;
      checks++;
      if (fs < 0 || fk < 0 || w[6:1] != 0) begin fail($sformatf("bad data word %h", w)); return; end
      ch = fs * 8 + fk;
      checks++;
      if (exp_bco[ch] < 0) fail($sformatf("strip %0d read but not hit", ch));
      else if (w[23:16] != 8'(exp_bco[ch]))
        fail($sformatf("strip %0d BCO %0d expected %0d", ch, w[23:16], 8'(exp_bco[ch])));
      exp_bco[ch] = -1;
      n_data++;
    end
  endtask

  task automatic rx_bit();
    for (int k = 0; k < lines; k++) acc[k*nb + bitpos] = out_p[k];
    bitpos++;
    if (bitpos == nb) begin
      bitpos = 0;
      if (first_group) first_group = 0;
      else word_in(acc);
    end
  endtask
  always @(posedge outclk_p) if (rx_on) rx_bit();
  always @(negedge outclk_p) if (rx_on) rx_bit();

  // -------------------------------------------------------- BCO numbering
  int tb_bco;
  always @(posedge bco_clk) tb_bco <= tb_bco + 1;
  always @(posedge chip_hit) n_hitpulse++;
  always @(posedge chip_has_data) n_hasdata++;

  // ------------------------------------------------------ serial commands
  task automatic put(input logic b);
    @(posedge bco_clk); #1;
    shift_ctrl = 1; shift_in = b;
  endtask
  task automatic header(input logic [4:0] r, input logic [2:0] ins);
    for (int i = 0; i < 5; i++) put(ME[i]);
    for (int i = 0; i < 5; i++) put(r[i]);
    for (int i = 0; i < 3; i++) put(ins[i]);
  endtask
  task automatic finish_cmd();
    @(posedge bco_clk); #1;
    shift_ctrl = 0; shift_in = 0;
    repeat (3) @(posedge bco_clk);
  endtask
  task automatic cmd(input logic [4:0] r, input logic [2:0] ins);
    header(r, ins);
    finish_cmd();
  endtask
  task automatic write_reg(input logic [4:0] r, input logic [127:0] v, input int n);
    header(r, INSTR_WRITE);
    for (int i = 0; i < n; i++) put((r == REG_KILL || r == REG_INJECT) ? v[n-1-i] : v[i]);
    finish_cmd();
  endtask
  task automatic read_reg(input logic [4:0] r, input int n, output logic [127:0] v);
    header(r, INSTR_READ);
    @(posedge bco_clk); #1;
    v = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge bco_clk); #1;
      v = {v[126:0], shift_out};
    end
    finish_cmd();
  endtask
  // <Set,SCR>, numbering crossings as the chip does from then on
  task automatic smart_core_reset();
    header(REG_SCR, INSTR_SET);
    put(0); put(0);
    @(posedge bco_clk); #1 shift_ctrl = 0;
    @(posedge bco_clk); #1 tb_bco = 0;     // this crossing is number 0
    n_scr++;
    repeat (2) @(posedge bco_clk);
  endtask

  // -------------------------------------------------------------- hits
  task automatic hit(input logic [127:0] chans, input logic [127:0] expect_read);
    @(posedge bco_clk); #5;
    for (int c = 0; c < 128; c++) if (expect_read[c]) exp_bco[c] = tb_bco;
    strip_strobe = chans;
    #100 strip_strobe = 0;
  endtask
  function automatic int outstanding();
    int c = 0;
    foreach (exp_bco[i]) if (exp_bco[i] >= 0) c++;
    return c;
  endfunction
  task automatic drain(input string what);
    repeat (10) @(posedge bco_clk);
    for (int i = 0; i < 200 && outstanding() != 0; i++) @(posedge bco_clk);
    repeat (10) @(posedge bco_clk);
    checks++;
    if (outstanding() != 0) fail($sformatf("%s: %0d hits never arrived", what, outstanding()));
    foreach (exp_bco[i]) exp_bco[i] = -1;
  endtask
  function automatic logic [127:0] rand_strips();
    logic [127:0] m;
    m = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
    for (int c = 64; c <= 90; c += 2) m[c] = 0;   // blank positions
    return m;
  endfunction

  task automatic operation_reset(input int nlines);
    @(posedge mca); #1 orst = 1; rx_on = 0;
    #(4 * TMCA);
    lines = nlines; nb = 24 / nlines; bitpos = 0; first_group = 1; rx_on = 1;
    orst = 0;
    n_or++;
  endtask

  task automatic expect_status(input logic [4:0] st, input string what);
    n_status_words = 0;
    wait (n_status_words >= 2);
    checks++;
    if (last_status !== st) fail($sformatf("%s: status %b expected %b", what, last_status, st));
  endtask

  initial begin
    logic [127:0] v, pat;
    int nl [4] = '{1, 2, 4, 6};
    foreach (exp_bco[i]) exp_bco[i] = -1;
    foreach (strip_charge[i]) strip_charge[i] = 8'd100;

    // Switch-on
    #1 ffr = 1;
    #500;
    lines = 1; nb = 24; bitpos = 0; first_group = 1; rx_on = 1;
    ffr = 0;
    expect_status(5'b01000, "after FFR");       // SendData 0, RejectHits 1
    cmd(REG_REJECTHITS, INSTR_RESET);
    smart_core_reset();
    cmd(REG_SENDDATA, INSTR_SET);
    expect_status(5'b10000, "enabled");

    // Every output configuration
    for (int a = 0; a < 4; a++) begin
      if (a != 0) begin
        rx_on = 0;       // the line layout is undefined until the Operation Reset
        write_reg(REG_ALINES, 2'(a), 2);
        operation_reset(nl[a]);
      end
      expect_status({1'b1, 1'b0, 2'(a), 1'b0}, "alines");
      for (int g = 0; g < 4; g++) begin
        v = rand_strips();
        hit(v, v);
        drain($sformatf("lines=%0d", nl[a]));
      end
      if (n_data > 0) n_mode[a]++;
    end

    // Kill and Inject scans (RejectHits set around them), with read-back
    cmd(REG_REJECTHITS, INSTR_SET);
    v = rand_strips();
    hit(v, 128'h0);
    drain("RejectHits");
    n_reject++;
    pat = {$urandom, $urandom, $urandom, $urandom};
    write_reg(REG_KILL, pat, 128);
    read_reg(REG_KILL, 128, v);
    checks++; if (v !== pat) fail("Kill read-back"); else n_readback++;
    read_reg(REG_KILL, 128, v);
    checks++; if (v !== pat) fail("Kill not restored by read");
    write_reg(REG_INJECT, (128'h1 << 9) | (128'h1 << 77) | (128'h1 << 126), 128);
    cmd(REG_REJECTHITS, INSTR_RESET);
    v = rand_strips();
    hit(v, v & ~pat);
    drain("Kill");
    if ((v & pat) != 0) n_kill_blocked++;
    write_reg(REG_KILL, 128'h0, 128);
    @(posedge bco_clk); #5;
    exp_bco[9] = tb_bco; exp_bco[77] = tb_bco; exp_bco[126] = tb_bco;
    inject_charge = 8'd120; inject_strobe = 1;
    #100 inject_strobe = 0;
    drain("InjectIn");
    n_inject++;
    cmd(REG_INJECT, INSTR_RESET);

    // SendData off: hits wait, ChipHasData stays up; on again: they arrive
    cmd(REG_SENDDATA, INSTR_RESET);
    v = rand_strips() | 128'h1;
    hit(v, v);
    repeat (100) @(posedge bco_clk);
    checks++; if (!chip_has_data) fail("ChipHasData low with data waiting");
    checks++; if (outstanding() == 0) fail("data read with SendData = 0");
    n_sendoff++;
    cmd(REG_SENDDATA, INSTR_SET);
    drain("SendData on");

    // <AqBCO,Set>: captures the BCO number; status bit 19 follows AqBCO != 0
    header(REG_AQBCO, INSTR_SET);
    put(0);
    @(posedge bco_clk); #1 shift_ctrl = 0;
    v[7:0] = 8'(tb_bco);                  // number current at the next falling edge
    repeat (3) @(posedge bco_clk);
    read_reg(REG_AQBCO, 8, pat);
    checks++; if (pat[7:0] !== v[7:0]) fail($sformatf("AqBCO %0d expected %0d", pat[7:0], v[7:0]));
    else n_aq++;
    expect_status({3'b101, 1'b1, v[7:0] != 0}, "AqBCO status");
    // SPR clears AqBCO
    cmd(REG_SPR, INSTR_SET);
    read_reg(REG_AQBCO, 8, pat);
    checks++; if (pat[7:0] !== 0) fail("AqBCO not cleared by SPR"); else n_spr++;
    expect_status(5'b10110, "after SPR");

    // Resynchronisation by Operation Reset keeps core and registers
    operation_reset(6);
    v = rand_strips();
    hit(v, v);
    drain("after Operation Reset");

    // Mechanism coverage
    checks++; if (n_data == 0) fail("no data words");
    checks++; if (n_sync == 0) fail("no sync words");
    for (int a = 0; a < 4; a++) begin checks++; if (n_mode[a] == 0) fail($sformatf("mode %0d unused", a)); end
    checks++; if (n_or == 0) fail("no Operation Reset");
    checks++; if (n_kill_blocked == 0) fail("no killed strip hit");
    checks++; if (n_inject == 0) fail("no injection");
    checks++; if (n_reject == 0) fail("no rejected hits");
    checks++; if (n_sendoff == 0) fail("SendData never off");
    checks++; if (n_aq == 0) fail("no AqBCO capture");
    checks++; if (n_spr == 0) fail("no SPR");
    checks++; if (n_readback == 0) fail("no read-back");
    checks++; if (n_scr == 0) fail("no SCR");
    checks++; if (n_hitpulse == 0) fail("ChipHit never rose");
    checks++; if (n_hasdata == 0) fail("ChipHasData never rose");
    $display("data words %0d, sync words %0d, operation resets %0d, ChipHit pulses %0d",
             n_data, n_sync, n_or, n_hitpulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
