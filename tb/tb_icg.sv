// Self-checking testbench of the integrated clock gate.
// The clock has a 10-unit period. The enable is changed at random instants, in
// both clock phases. A reference copy of the latch is kept here: it follows en
// while clk is low. Every time unit the gated clock must equal clk AND that copy,
// and it must never rise while clk is high nor fall while clk is low (no glitch).
// The number of gated-clock pulses is compared with the number of rising clk edges
// at which the sampled enable was 1.
module tb_icg;
  timeunit 1ns;
  timeprecision 100ps;
  logic clk = 1'b0, en = 1'b0;
  logic en_latched, gclk;
  logic ref_latch = 1'b0, gclk_prev = 1'b0, clk_prev = 1'b0;
  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0, high_phase_changes = 0;

  icg dut (.clk(clk), .en(en), .en_latched(en_latched), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) pulses++;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      // change the enable a little after a time step, in either clock phase
      #0.3;
      if ($urandom_range(0, 2) == 0) begin
        en = ~en;
        if (clk) high_phase_changes++;
      end
      #0.3;
      if (!clk) ref_latch = en;
      if (clk && !clk_prev && ref_latch) exp_pulses++;
      checks++;
      if (gclk !== (clk & ref_latch) || en_latched !== ref_latch) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t clk=%b en=%b gclk=%b latched=%b ref=%b", $time, clk, en, gclk,
                   en_latched, ref_latch);
      end
      // glitch checks: gclk can only rise with clk and only fall with clk
      checks++;
      if ((gclk && !gclk_prev && !(clk && !clk_prev)) ||
          (!gclk && gclk_prev && !(!clk && clk_prev))) begin
        failures++;
        $display("FAIL glitch at t=%0t", $time);
      end
      gclk_prev = gclk;
      clk_prev  = clk;
      #0.4;
    end
    checks++;
    if (pulses != exp_pulses) begin
      failures++;
      $display("FAIL pulse count %0d, expected %0d", pulses, exp_pulses);
    end
    checks++;
    if (high_phase_changes == 0 || exp_pulses == 0) begin
      failures++;
      $display("FAIL stimulus did not exercise the high phase");
    end
    $display("gated-clock pulses %0d, enable changes while clk high %0d", pulses,
             high_phase_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
