`timescale 1ns / 1ps
// Testbench for fssr_core: charge events on random strips, each group within
// one beam crossing, are read out on RCLK. Words are taken as the next-word
// block takes them and decoded with the set and strip code tables (repeated
// here); each must name a strip that was hit, with the BCO number of its
// crossing. Also checks ChipHit and ChipHasData, that blank positions and
// killed channels give nothing, that InjectIn reaches exactly the channels
// whose Inject bit is set, and that RejectHits blocks new hits.
module tb_fssr_core;
  import fssr_pkg::*;
  localparam logic [4:0] SETC [16] = '{5'b01010, 5'b01011, 5'b01111, 5'b01110,
                                       5'b01100, 5'b01101, 5'b11101, 5'b11100,
                                       5'b10100, 5'b10101, 5'b10111, 5'b10110,
                                       5'b10010, 5'b10011, 5'b11011, 5'b11010};
  localparam logic [3:0] STRC [8] = '{4'b0101, 4'b0111, 4'b0110, 4'b1110,
                                      4'b1010, 4'b1011, 4'b1001, 4'b1101};

  logic bco_clk = 0, ffr = 0, core_reset = 0, reject_hits = 1, send_data = 1, rclk = 0;
  logic [127:0] kill = 0, inject = 0, strip_strobe = 0;
  logic [1:0] capsel = 0;
  logic [7:0] vth = 8'd40, inject_charge = 0;
  logic [7:0] strip_charge [128];
  logic inject_strobe = 0;
  logic [7:0] bco_count;
  logic core_talking, chip_hit, chip_has_data;
  logic [22:0] core_data;
  int checks = 0, failures = 0;

  fssr_core dut (.bco_clk(bco_clk), .ffr(ffr), .core_reset(core_reset), .reject_hits(reject_hits),
    .send_data(send_data), .kill(kill), .inject(inject), .capsel(capsel), .vth(vth),
    .strip_charge(strip_charge), .strip_strobe(strip_strobe), .inject_charge(inject_charge),
    .inject_strobe(inject_strobe), .rclk(rclk), .bco_count(bco_count),
    .core_talking(core_talking), .core_data(core_data), .chip_hit(chip_hit),
    .chip_has_data(chip_has_data));

  always #66 bco_clk = ~bco_clk;
  always #43.6 rclk = ~rclk;     // MCA/6 for 68.8 MHz MCA

  function automatic bit blank(input int ch);
    return ch >= 64 && ch <= 90 && ch % 2 == 0;
  endfunction

  // Expected hits: channel -> BCO number; -1 = none
  int exp_bco [128];
  int n_read, n_hit_seen;
  logic prev_talk = 0;
  always @(negedge rclk) begin
    if (core_talking && prev_talk) begin
      int fs, fk, ch;
      fs = -1; fk = -1;
      for (int s = 0; s < 16; s++) if (core_data[14:10] == SETC[s]) fs = s;
      for (int k = 0; k < 8; k++) if (core_data[9:6] == STRC[k]) fk = k;
      checks++;
      if (fs < 0 || fk < 0) begin failures++; $display("undecodable word %h", core_data); end
      else begin
        ch = fs * 8 + fk;
        checks++;
        if (exp_bco[ch] < 0) begin failures++; $display("%0t channel %0d read but not hit", $time, ch); end
        else if (core_data[22:15] != 8'(exp_bco[ch])) begin
          failures++; $display("channel %0d BCO %0d expected %0d", ch, core_data[22:15], exp_bco[ch]);
        end
        exp_bco[ch] = -1;
        n_read++;
      end
    end
    prev_talk = core_talking;
  end
  always @(posedge chip_hit) n_hit_seen++;

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int outstanding();
    int c = 0;
    foreach (exp_bco[i]) if (exp_bco[i] >= 0) c++;
    return c;
  endfunction

  // Hit `chans` in one crossing; the discriminators fire 60 ns later, inside it.
  task automatic hit(input logic [127:0] chans, input logic [127:0] expect_read);
    @(posedge bco_clk); #5;
    for (int c = 0; c < 128; c++) if (expect_read[c]) exp_bco[c] = int'(bco_count);
    for (int c = 0; c < 128; c++) strip_charge[c] = 8'd100;
    strip_strobe = chans;
    #100 strip_strobe = 0;
  endtask

  task automatic drain();
    repeat (8) @(posedge bco_clk);
    for (int i = 0; i < 80 && (outstanding() != 0 || chip_has_data); i++) @(posedge bco_clk);
    checks++;
    if (outstanding() != 0) begin failures++; $display("%0d hits not read", outstanding()); end
    checks++;
    if (chip_has_data) begin failures++; $display("ChipHasData still high"); end
  endtask

  initial begin
    logic [127:0] m, e;
    foreach (exp_bco[i]) exp_bco[i] = -1;
    foreach (strip_charge[i]) strip_charge[i] = 0;
    #1 ffr = 1; #200 ffr = 0;
    @(posedge bco_clk); #1 core_reset = 1; @(posedge bco_clk); #1 core_reset = 0;

    // RejectHits = 1 (state after reset): ignored
    hit(128'h1, 128'h0);
    drain();
    reject_hits = 0;
    repeat (2) @(posedge bco_clk);

    // Single hit, ChipHit and ChipHasData
    n_hit_seen = 0;
    hit(128'h1 << 5, 128'h1 << 5);
    repeat (4) @(posedge bco_clk);
    checks++; if (!chip_has_data) begin failures++; $display("ChipHasData not raised"); end
    drain();
    checks++; if (n_hit_seen == 0) begin failures++; $display("ChipHit never rose"); end

    // Random groups of hits, blank positions excluded from the expectation.
    // A set that still holds hits ignores new ones, so each group is read
    // out before the next.
    for (int g = 0; g < 25; g++) begin
      m = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      e = m;
      for (int c = 0; c < 128; c++) if (blank(c)) e[c] = 0;
      hit(m, e);
      drain();
    end

    // Blank positions give nothing
    m = 0; for (int c = 64; c <= 90; c += 2) m[c] = 1;
    hit(m, 128'h0);
    drain();

    // Kill
    kill = 128'h1 << 17;
    hit((128'h1 << 17) | (128'h1 << 18), 128'h1 << 18);
    drain();
    kill = 0;

    // Injection through InjectIn
    inject = (128'h1 << 3) | (128'h1 << 100);
    @(posedge bco_clk); #5;
    exp_bco[3] = int'(bco_count); exp_bco[100] = int'(bco_count);
    inject_charge = 8'd120; inject_strobe = 1;
    #100 inject_strobe = 0;
    drain();

    checks++; if (n_read < 100) begin failures++; $display("only %0d words", n_read); end
    $display("words read: %0d", n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
