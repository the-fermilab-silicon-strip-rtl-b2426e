`timescale 1ns / 1ps
// Testbench for word_serializer: for each line configuration, loads random
// words every N = 24/lines cycles and checks that line k carries bits
// k*N .. k*N+N-1 of the word, lowest first, in the N cycles after the load,
// and that unused lines stay 0.
module tb_word_serializer;
  import fssr_pkg::*;

  logic sclk = 0, rst = 0, load = 0;
  logic [WORD_W-1:0] word;
  logic [1:0] alines;
  logic [5:0] lanes;
  int checks = 0, failures = 0;

  word_serializer dut (.sclk(sclk), .rst(rst), .load(load), .word(word),
                       .alines(alines), .lanes(lanes));

  always #5 sclk = ~sclk;

  initial begin
    #1 rst = 1;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, lines;
    logic [WORD_W-1:0] w;
    word = '0; alines = 2'b00;
    repeat (2) @(negedge sclk);
    // reset zeroes the register
    checks++; if (lanes !== 6'b0) failures++;
    rst = 0;
    for (int a = 0; a < 4; a++) begin
      alines = 2'(a);
      lines = (a == 0) ? 1 : (a == 1) ? 2 : (a == 2) ? 4 : 6;
      n = 24 / lines;
      for (int rep = 0; rep < 6; rep++) begin
        w = 24'($urandom);
        @(negedge sclk); word = w; load = 1;
        @(negedge sclk); load = 0;
        for (int j = 0; j < n; j++) begin
          for (int k = 0; k < 6; k++) begin
            checks++;
            if (k < lines) begin
              if (lanes[k] !== w[k*n + j]) begin
                failures++;
                $display("alines=%0d word=%h bit %0d line %0d: got %b", a, w, j, k, lanes[k]);
              end
            end else if (lanes[k] !== 1'b0) failures++;
          end
          if (j != n - 1) @(negedge sclk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
