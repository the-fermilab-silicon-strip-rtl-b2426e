`timescale 1ns / 1ps
// Testbench for the analog_channel model: a charge above threshold makes the
// discriminator fire after the peaking time selected by CapSel (60, 85 or
// 125 ns) for the pulse width; a charge below threshold does not; the kill
// switch blocks the output; charge at InjectIn reaches the channel only when
// its Inject bit is set.
module tb_analog_channel;
  logic [7:0] strip_charge = 0, inject_charge = 0, vth = 8'd40;
  logic strip_strobe = 0, inject_strobe = 0, inject_sel = 0, kill = 0;
  logic [1:0] capsel = 0;
  logic disc;
  int checks = 0, failures = 0;

  analog_channel #(.PULSE_NS(100)) dut (.strip_charge(strip_charge), .strip_strobe(strip_strobe),
    .inject_charge(inject_charge), .inject_strobe(inject_strobe), .inject_sel(inject_sel),
    .kill(kill), .vth(vth), .capsel(capsel), .disc(disc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%0t %s: got %b", $time, what, got); end
  endtask

  // Deposit charge q at time t0 and check the pulse window [t0+tp, t0+tp+100).
  task automatic pulse_test(input logic [7:0] q, input int tp, input logic expect_fire);
    strip_charge = q; strip_strobe = 1;
    #(tp - 2);  check("before peaking time", disc, 0);
    #4;         check("after peaking time", disc, expect_fire);
    #94;        check("pulse still high", disc, expect_fire);
    #6;         check("pulse over", disc, 0);
    strip_strobe = 0;
    #200;
  endtask

  initial begin
    int tp [4] = '{60, 85, 85, 125};
    #10;
    for (int c = 0; c < 4; c++) begin
      if (c == 2) continue;
      capsel = 2'(c);
      pulse_test(8'd50, tp[c], 1);
      pulse_test(8'd30, tp[c], 0);
    end
    capsel = 0;
    kill = 1;
    pulse_test(8'd200, 60, 0);
    kill = 0;
    // injection
    inject_charge = 8'd90;
    inject_sel = 0; inject_strobe = 1; #70; check("inject deselected", disc, 0);
    inject_strobe = 0; #200;
    inject_sel = 1; inject_strobe = 1; #70; check("inject selected", disc, 1);
    inject_strobe = 0; #200;
    check("inject pulse over", disc, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
