`timescale 1ns / 1ps
// Testbench for clock_control: MCA and MCB at 68.8 MHz (period 14.5 ns),
// MCB lagging by 90 degrees. For each Alines setting it checks SCLK = 2 x MCA,
// RCLK = MCA/12, /6, /3, /2 (Table of clock ratios), that `load` is high in
// exactly one SCLK cycle per RCLK period and RCLK falls on that edge,
// OutCLK = MCA, and that OutCLK rises in the first bit of every word.
module tb_clock_control;
  import fssr_pkg::*;

  localparam realtime TMCA = 14.5ns;
  logic mca = 0, mcb = 0, rst = 0;
  logic [1:0] alines = 0, alines_s;
  logic sclk, rclk, load, outclk;
  int checks = 0, failures = 0;

  clock_control dut (.mca(mca), .mcb(mcb), .rst(rst), .alines(alines),
                     .alines_s(alines_s), .sclk(sclk), .rclk(rclk), .load(load),
                     .outclk(outclk));

  always #(TMCA / 2) mca = ~mca;
  initial begin #(TMCA / 4); forever #(TMCA / 2) mcb = ~mcb; end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counters
  int n_mca, n_sclk, n_rclk_fall, n_load, n_outclk_rise, n_word_rise;
  logic load_d, first_bit;
  always @(posedge mca) n_mca++;
  always @(posedge sclk) begin
    n_sclk++;
    if (load) n_load++;
  end
  always @(negedge rclk) n_rclk_fall++;
  always @(posedge outclk) n_outclk_rise++;
  // RCLK must fall exactly on the load edge
  always @(posedge sclk) begin
    load_d <= load;
    first_bit <= load_d;     // bit 0 is on the pads one cycle after the load edge
  end
  always @(negedge rclk) if (!rst) begin
    checks++;
    if (!load_d) begin failures++; $display("RCLK fell outside a load edge at %t", $time); end
  end
  always @(posedge outclk) if (first_bit) n_word_rise++;

  initial begin
    int ratio [4] = '{12, 6, 3, 2};
    for (int a = 0; a < 4; a++) begin
      rst = 1; alines = 2'(a);
      #(5 * TMCA);
      @(negedge mca); rst = 0;
      #(10 * TMCA);
      n_mca = 0; n_sclk = 0; n_rclk_fall = 0; n_load = 0; n_outclk_rise = 0; n_word_rise = 0;
      #(240 * TMCA);
      checks++; if (n_sclk < 2 * n_mca - 1 || n_sclk > 2 * n_mca + 1) begin
        failures++; $display("SCLK %0d edges in %0d MCA periods", n_sclk, n_mca); end
      checks++; if (n_rclk_fall < n_mca / ratio[a] - 1 || n_rclk_fall > n_mca / ratio[a] + 1) begin
        failures++; $display("alines %0d: %0d RCLK periods in %0d MCA periods", a, n_rclk_fall, n_mca); end
      checks++; if (n_load < n_rclk_fall - 1 || n_load > n_rclk_fall + 1) failures++;
      checks++; if (n_outclk_rise < n_mca - 1 || n_outclk_rise > n_mca + 1) begin
        failures++; $display("OutCLK %0d rises in %0d MCA periods", n_outclk_rise, n_mca); end
      checks++; if (n_word_rise < n_load - 1) begin
        failures++; $display("alines %0d: OutCLK rose in the first bit of %0d of %0d words", a, n_word_rise, n_load); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
