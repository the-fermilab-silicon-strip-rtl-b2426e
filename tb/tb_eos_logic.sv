`timescale 1ns / 1ps
// Testbench for eos_logic: discriminator pulses (shorter than a BCO period,
// at random times) are captured by the strip cells, stamped with the BCO
// number of the crossing they arrived in, and read out on an unrelated RCLK
// by a model of the core that clears the lowest strip each cycle. Also
// checks RejectHits, loss of hits while the set is full, ChipHasData-style
// `full`, and reset.
module tb_eos_logic;
  logic bco_clk = 0, rclk = 0, rst_bco = 0, rst_rclk = 0, reject_hits = 1;
  logic [7:0] disc = 0, bco_count = 0, strip_clear, remaining, stamp;
  logic full, pending;
  int checks = 0, failures = 0;

  eos_logic dut (.bco_clk(bco_clk), .rst_bco(rst_bco), .reject_hits(reject_hits), .disc(disc),
    .bco_count(bco_count), .full(full), .rclk(rclk), .rst_rclk(rst_rclk),
    .strip_clear(strip_clear), .pending(pending), .remaining(remaining), .stamp(stamp));

  always #66 bco_clk = ~bco_clk;
  always #43 rclk = ~rclk;
  always @(posedge bco_clk) bco_count <= bco_count + 1;

  // Core model: clear lowest remaining strip, record it
  logic [7:0] got_pattern, got_stamp;
  int n_sets_read;
  always_comb strip_clear = pending ? (remaining & -remaining) : 8'h00;
  always @(posedge rclk) if (pending) begin
    got_pattern |= strip_clear;
    got_stamp = stamp;
    if ((remaining & ~strip_clear) == 0) n_sets_read++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%0t %s: got %h expected %h", $time, what, got, exp); end
  endtask

  // Fire the strips in `m` inside one BCO period; return the BCO number.
  task automatic fire(input logic [7:0] m, output logic [7:0] bco);
    @(posedge bco_clk); #(10 + $urandom % 50);
    bco = bco_count;
    disc = m; #20; disc = 0;
  endtask

  initial begin
    logic [7:0] m, b;
    int n0;
    #1 rst_bco = 1; rst_rclk = 1;
    #300 rst_bco = 0; rst_rclk = 0;
    // RejectHits = 1: nothing accepted
    repeat (3) @(posedge bco_clk);
    fire(8'h11, b);
    repeat (10) @(posedge bco_clk);
    check("rejected", full, 0);
    reject_hits = 0;
    repeat (3) @(posedge bco_clk);
    for (int t = 0; t < 20; t++) begin
      m = 8'($urandom) | 8'h01;
      got_pattern = 0; n0 = n_sets_read;
      fire(m, b);
      repeat (5) @(posedge bco_clk);
      check("full after hit", full, 1);
      wait (n_sets_read == n0 + 1);
      check("pattern read", got_pattern, m);
      check("bco stamp", got_stamp, b);
      repeat (6) @(posedge bco_clk);
      check("full cleared", full, 0);
    end
    // hits while full are lost
    got_pattern = 0; n0 = n_sets_read;
    fire(8'h01, b);
    #1 fire(8'h80, m);
    wait (n_sets_read == n0 + 1);
    repeat (12) @(posedge bco_clk);
    check("second hit lost", got_pattern, 8'h01);
    check("no further set", 8'(n_sets_read - n0), 1);
    // reset clears a captured set
    fire(8'h0F, b);
    repeat (2) @(posedge bco_clk);
    rst_bco = 1; rst_rclk = 1; #5 rst_bco = 0; rst_rclk = 0;
    check("cleared by reset", full, 0);
    #5 check("nothing remaining", remaining, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
