`timescale 1ns / 1ps
// Testbench for steering_logic: random line values and configurations;
// checks that outputs change on the rising SCLK edge, unused lines are 0,
// complements are exact, and OutCLK is passed to its pair.
module tb_steering_logic;
  logic sclk = 0, rst = 0, outclk = 0;
  logic [1:0] alines;
  logic [5:0] lanes, out_p, out_n, exp_p, mask;
  logic outclk_p, outclk_n;
  int checks = 0, failures = 0;

  steering_logic dut (.sclk(sclk), .rst(rst), .alines(alines), .lanes(lanes),
                      .outclk(outclk), .out_p(out_p), .out_n(out_n),
                      .outclk_p(outclk_p), .outclk_n(outclk_n));

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
    alines = 0; lanes = '1;
    @(negedge sclk);
    checks++; if (out_p !== 6'b0 || out_n !== 6'b111111) failures++;
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge sclk);
      alines = 2'($urandom); lanes = 6'($urandom); outclk = 1'($urandom);
      mask = (alines == 0) ? 6'h01 : (alines == 1) ? 6'h03 : (alines == 2) ? 6'h0f : 6'h3f;
      exp_p = lanes & mask;
      #1;
      checks++; if (outclk_p !== outclk || outclk_n !== ~outclk) failures++;
      @(posedge sclk); #1;
      checks++;
      if (out_p !== exp_p || out_n !== ~exp_p) begin
        failures++;
        $display("alines=%0d lanes=%b got %b", alines, lanes, out_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
