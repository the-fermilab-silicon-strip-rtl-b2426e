`timescale 1ns / 1ps
// Testbench for data_output_if: a model of the core answers each rising RCLK
// edge with a random Core Talking pattern and data. A receiver model
// deserializes the pads, sampling every line on both OutCLK edges, and the
// words it assembles are compared, in order, with the words the core and
// status should produce (the first word after Operation Reset is the
// reset-state sync word). Runs all four line configurations and checks that
// one word leaves the chip per RCLK period.
module tb_data_output_if;
  import fssr_pkg::*;

  localparam realtime TMCA = 14.5ns;
  logic mca = 0, mcb = 0, orst = 0;
  logic [1:0] alines = 0;
  status_t status;
  logic core_talking = 0;
  logic [CORE_W-1:0] core_data = '0;
  logic rclk, outclk_p, outclk_n;
  logic [5:0] out_p, out_n;
  int checks = 0, failures = 0;

  data_output_if dut (.mca(mca), .mcb(mcb), .orst(orst), .alines(alines),
                      .status(status), .core_talking(core_talking), .core_data(core_data),
                      .rclk(rclk), .out_p(out_p), .out_n(out_n),
                      .outclk_p(outclk_p), .outclk_n(outclk_n));

  always #(TMCA / 2) mca = ~mca;
  initial begin #(TMCA / 4); forever #(TMCA / 2) mcb = ~mcb; end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Core model and expected word stream
  logic [WORD_W-1:0] exp_q [$];
  logic prev_talk;
  int n_rclk;
  always @(posedge rclk) begin
    core_talking <= ($urandom % 3) != 0;
    core_data    <= 23'($urandom);
  end
  always @(negedge rclk) if (!orst) begin
    n_rclk++;
    exp_q.push_back((core_talking && prev_talk) ? {core_data, 1'b1} : sync_word(status));
    prev_talk = core_talking;
  end

  // Receiver model
  int lines, nb, bitpos, n_words, n_data;
  logic started;
  logic [WORD_W-1:0] acc;
  logic first_group;
  task automatic take_bit();
    for (int k = 0; k < lines; k++) begin
      acc[k*nb + bitpos] = out_p[k];
      if (out_n[k] !== ~out_p[k]) failures++;
    end
    for (int k = lines; k < 6; k++) if (out_p[k] !== 1'b0) failures++;
    bitpos++;
    if (bitpos == nb) begin
      bitpos = 0;
      if (first_group) first_group = 0;
      else begin
        logic [WORD_W-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (acc !== e) begin
          failures++;
          $display("alines %0d word %0d: received %h expected %h", alines, n_words, acc, e);
        end
        if (acc[13:1] != 0) n_data++;
        n_words++;
      end
    end
  endtask
  always @(posedge outclk_p) if (started) take_bit();
  always @(negedge outclk_p) if (started) take_bit();

  initial begin
    int ratio [4] = '{12, 6, 3, 2};
    for (int a = 0; a < 4; a++) begin
      orst = 1; alines = 2'(a);
      status = '{send_data: 1'b1, reject_hits: 1'b0, alines: 2'(a), aqbco_nz: a[0]};
      lines = (a == 0) ? 1 : (a == 1) ? 2 : (a == 2) ? 4 : 6;
      nb = 24 / lines;
      #(6 * TMCA);
      exp_q.delete();
      exp_q.push_back(24'h000001);   // serializer content after reset is zero; first load: reset sync word
      prev_talk = 0; n_rclk = 0; bitpos = 0; n_words = 0; n_data = 0;
      first_group = 1; started = 1;
      @(negedge mca); orst = 0;
      #(480 * TMCA);
      started = 0;
      checks++;
      if (n_words < n_rclk - 3 || n_words == 0) begin
        failures++; $display("alines %0d: %0d words for %0d RCLK periods", a, n_words, n_rclk); end
      checks++;
      if (n_rclk < 480 / ratio[a] - 2 || n_rclk > 480 / ratio[a] + 2) begin
        failures++; $display("alines %0d: %0d RCLK periods in 480 MCA periods", a, n_rclk); end
      checks++; if (n_data == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
