// Self-checking testbench of ddcg_mbff (one data-driven clock-gated 8-bit
// merging flip-flop).
// Inputs change on the falling clock edge. Each bit toggles with a small
// probability (the data-to-clock toggling ratio), so most cycles leave the group
// unchanged. A plain reference register, clocked by the free clock, gives the
// expected q. The testbench also counts the group's gated-clock pulses and checks
// that there is exactly one per cycle with a change and none otherwise, and it
// checks z and f against the reference state.
module tb_ddcg_mbff;
  localparam int unsigned K = 8;
  localparam int unsigned CYCLES = 4000;
  logic clk = 1'b0, rst = 1'b1;
  logic [K-1:0] d = '0, q, z, ref_q;
  logic f, en_latched, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0, gated = 0;

  ddcg_mbff #(.K(K)) dut (
    .clk(clk), .rst(rst), .d(d), .q(q), .z(z), .f(f), .en_latched(en_latched), .gclk(gclk)
  );

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) if (!rst) pulses++;

  initial begin
    ref_q = '0;
    #12;
    checks++;
    if (q !== '0) failures++;
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      // each bit toggles with probability 1/16; every 100th cycle changes several
      for (int n = 0; n < K; n++)
        if ($urandom_range(0, 15) == 0 || (c % 100 == 0 && n % 3 == 0)) d[n] = ~d[n];
      #1;
      checks++;
      if (z !== (d ^ ref_q) || f !== (d != ref_q)) begin
        failures++;
        if (failures < 10) $display("FAIL detector z=%h f=%b d=%h state=%h", z, f, d, ref_q);
      end
      if (d != ref_q) exp_pulses++;
      else            gated++;
      @(posedge clk);
      ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h expected %h", c, q, ref_q);
      end
    end
    checks++;
    if (pulses != exp_pulses) begin
      failures++;
      $display("FAIL gated-clock pulses %0d, expected %0d", pulses, exp_pulses);
    end
    checks++;
    if (gated == 0 || exp_pulses == 0) begin
      failures++;
      $display("FAIL clock was never gated or never enabled");
    end
    $display("cycles %0d: clocked %0d, gated %0d", CYCLES, pulses, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
