`timescale 1ns / 1ps
// Testbench for core_logic. A model of the 16 end-of-set blocks holds random
// hits (with random BCO stamps) and removes a strip when the core clears it.
// Words are taken the way the next-word block takes them (Core Talking high
// now and at the previous falling RCLK edge). Checks: every hit is read
// exactly once with the right BCO number, set code and strip code (tables
// repeated here); sets ascend and strips ascend within a scan; the first
// cycle after a launch carries no word; Core Talking drops for at least one
// cycle between scans; one word per RCLK cycle otherwise; SendData = 0 stops
// readout; BCO counter held by core_reset and counting after it.
module tb_core_logic;
  localparam logic [4:0] SETC [16] = '{5'b01010, 5'b01011, 5'b01111, 5'b01110,
                                       5'b01100, 5'b01101, 5'b11101, 5'b11100,
                                       5'b10100, 5'b10101, 5'b10111, 5'b10110,
                                       5'b10010, 5'b10011, 5'b11011, 5'b11010};
  localparam logic [3:0] STRC [8] = '{4'b0101, 4'b0111, 4'b0110, 4'b1110,
                                      4'b1010, 4'b1011, 4'b1001, 4'b1101};

  logic bco_clk = 0, rst_bco = 0, core_reset = 0, rclk = 0, rst_rclk = 0, send_data = 0;
  logic [7:0] bco_count;
  logic [15:0] pending;
  logic [7:0] remaining [16], stamp [16], strip_clear [16];
  logic core_talking;
  logic [22:0] core_data;
  int checks = 0, failures = 0;

  core_logic dut (.bco_clk(bco_clk), .rst_bco(rst_bco), .core_reset(core_reset),
    .bco_count(bco_count), .rclk(rclk), .rst_rclk(rst_rclk), .send_data(send_data),
    .pending(pending), .remaining(remaining), .stamp(stamp), .strip_clear(strip_clear),
    .core_talking(core_talking), .core_data(core_data));

  always #66 bco_clk = ~bco_clk;
  always #29 rclk = ~rclk;

  // End-of-set model
  logic [7:0] rem_m [16];
  logic [7:0] outstanding [16];   // hits not yet seen in a word
  logic [7:0] exp_stamp [16];
  always_comb for (int s = 0; s < 16; s++) begin
    remaining[s] = rem_m[s];
    pending[s]   = rem_m[s] != 0;
  end
  // A set is loaded only when empty, and not again until the acknowledge
  // handshake of a real end-of-set block would have finished.
  int cool [16];
  always @(posedge rclk) for (int s = 0; s < 16; s++) begin
    if (rem_m[s] != 0 && (rem_m[s] & ~strip_clear[s]) == 0) cool[s] = 4;
    else if (cool[s] > 0) cool[s]--;
    rem_m[s] <= rem_m[s] & ~strip_clear[s];
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("%0t %s", $time, msg);
  endtask

  // Word monitor
  logic prev_talk = 0;
  int last_set = -1, last_strip = -1, n_words = 0, n_launch = 0, low_run = 0, n_dead = 0;
  int talk_cycles = 0;
  always @(negedge rclk) begin
    if (core_talking && !prev_talk) begin
      n_launch++;
      last_set = -1; last_strip = -1;
      checks++;
      if (low_run < 1) fail("Core Talking relaunched without a gap");
    end
    if (core_talking) talk_cycles++;
    low_run = core_talking ? 0 : low_run + 1;
    if (core_talking && prev_talk) begin
      int fs, fk;
      fs = -1; fk = -1;
      for (int s = 0; s < 16; s++) if (core_data[14:10] == SETC[s]) fs = s;
      for (int k = 0; k < 8; k++) if (core_data[9:6] == STRC[k]) fk = k;
      checks++;
      if (fs < 0 || fk < 0 || core_data[5:0] != 0) fail("bad word");
      else begin
        checks++;
        if (!outstanding[fs][fk]) fail($sformatf("set %0d strip %0d read twice or never hit", fs, fk));
        outstanding[fs][fk] = 0;
        checks++;
        if (core_data[22:15] != exp_stamp[fs]) fail("wrong BCO number");
        checks++;
        if (fs < last_set || (fs == last_set && fk <= last_strip)) fail("out of order");
        last_set = fs; last_strip = fk;
      end
      n_words++;
    end
    prev_talk = core_talking;
  end

  task automatic add_hits(input int n);
    for (int i = 0; i < n; i++) begin
      int s;
      logic [7:0] m;
      s = $urandom % 16; m = 8'($urandom) | 8'h01;
      @(negedge rclk);
      if (rem_m[s] == 0 && cool[s] == 0 && outstanding[s] == 0) begin
        stamp[s] = 8'($urandom);
        exp_stamp[s] = stamp[s];
        rem_m[s] = m;
        outstanding[s] = m;
      end
    end
  endtask

  function automatic int left();
    int c = 0;
    for (int s = 0; s < 16; s++) c += $countones(outstanding[s]);
    return c;
  endfunction

  initial begin
    for (int s = 0; s < 16; s++) begin rem_m[s] = 0; outstanding[s] = 0; stamp[s] = 0; cool[s] = 0; end
    #1 rst_bco = 1; rst_rclk = 1;
    #200 rst_bco = 0; rst_rclk = 0;

    // BCO counter and core reset
    @(posedge bco_clk); #1 core_reset = 1;
    repeat (3) @(posedge bco_clk);
    #1 checks++; if (bco_count != 0) fail("counter not held");
    core_reset = 0;             // released just after a rising edge
    @(posedge bco_clk); #1 checks++; if (bco_count != 1) fail("counter not 1");
    repeat (10) @(posedge bco_clk);
    #1 checks++; if (bco_count != 11) fail("counter not counting");

    // SendData = 0: no readout
    add_hits(5);
    repeat (20) @(posedge rclk);
    checks++; if (n_launch != 0) fail("read out with SendData = 0");

    send_data = 1;
    for (int round = 0; round < 30; round++) begin
      fork
        add_hits(1 + $urandom % 20);
        repeat ($urandom % 10) @(posedge rclk);
      join
    end
    repeat (400) @(posedge rclk);
    checks++; if (left() != 0) fail($sformatf("%0d hits never read", left()));
    checks++; if (n_launch < 2) fail("too few scans");
    // one dead cycle per scan, otherwise one word per cycle
    checks++; if (talk_cycles != n_words + n_launch) fail($sformatf("%0d talking cycles for %0d words in %0d scans", talk_cycles, n_words, n_launch));
    $display("words=%0d scans=%0d", n_words, n_launch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
