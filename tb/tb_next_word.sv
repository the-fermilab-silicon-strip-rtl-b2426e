`timescale 1ns / 1ps
// Testbench for next_word: random Core Talking patterns and data; at every
// falling RCLK edge the word must be the core word plus word mark when Core
// Talking is high and was high at the previous falling edge, else the sync
// word with the current status bits.
module tb_next_word;
  import fssr_pkg::*;

  logic rclk = 0, rst = 0, core_talking = 0;
  logic [CORE_W-1:0] core_data = '0;
  status_t status;
  logic [WORD_W-1:0] word, expected;
  logic prev_talk;
  int checks = 0, failures = 0, n_data = 0, n_sync = 0;

  next_word dut (.rclk(rclk), .rst(rst), .core_talking(core_talking),
                 .core_data(core_data), .status(status), .word(word));

  always #10 rclk = ~rclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    status = '0;
    #1 rst = 1;
    #1;
    checks++; if (word !== 24'h000001) failures++;   // reset: sync word, word mark only
    @(posedge rclk); rst = 0;
    prev_talk = 0;
    for (int i = 0; i < 500; i++) begin
      @(posedge rclk);
      core_talking = ($urandom % 4) != 0;
      core_data = 23'($urandom);
      status = status_t'(5'($urandom));
      expected = (core_talking && prev_talk) ? {core_data, 1'b1}
               : {status.send_data, status.reject_hits, status.alines, status.aqbco_nz, 18'b0, 1'b1};
      @(negedge rclk); #1;
      prev_talk = core_talking;
      checks++;
      if (word !== expected) begin
        failures++;
        $display("cycle %0d: got %h expected %h", i, word, expected);
      end
      if (word[13:1] == 13'b0) n_sync++; else n_data++;
    end
    checks++; if (n_data == 0 || n_sync == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
