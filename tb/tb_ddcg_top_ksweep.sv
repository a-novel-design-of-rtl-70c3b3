// Group-size sweep: the same 16-bit-register design built with merging flip-flops
// of k = 2, 4 and 8 bits, driven side by side with identical stimulus.
//
// Every bit of din toggles independently with a low probability p (the
// data-to-clock toggling ratio, 1/16 here) and b is held, so that the clock
// pulses a k-bit group receives depend on k: a group is clocked whenever any of
// its k bits changes, i.e. with probability 1 - (1 - p)^k. For every k the
// testbench checks the register outputs against reference registers and the total
// gated-clock pulse count of register 1 against the count of (cycle, group) pairs
// with a change, and prints the measured clocking rate per group next to
// 1 - (1 - p)^k.
module tb_ddcg_top_ksweep;
  localparam int unsigned W = 16;
  localparam int unsigned NK = 3;
  localparam int unsigned KS [NK] = '{2, 4, 8};
  localparam int unsigned CYCLES = 4000;

  logic         clk = 1'b0, rst = 1'b1;
  logic [W-1:0] din = '0, b = 16'h1234;
  logic [W-1:0] ref1, ref2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pulses [NK];
  int expect_pulses [NK];
  logic [W-1:0] dout1 [NK];
  logic [W-1:0] dout2 [NK];

  for (genvar i = 0; i < NK; i++) begin : g_k
    localparam int unsigned K = KS[i];
    localparam int unsigned NG = W / K;
    logic [W-1:0]  v, z1, z2;
    logic [NG-1:0] f1, f2, s1, s2, dc1, dc2;

    ddcg_top #(.W(W), .K(K)) dut (
      .clk(clk), .rst(rst), .din(din), .b(b), .v(v), .dout1(dout1[i]), .dout2(dout2[i]),
      .z1(z1), .z2(z2), .f1(f1), .f2(f2), .s1(s1), .s2(s2), .dc1(dc1), .dc2(dc2)
    );

    for (genvar g = 0; g < NG; g++) begin : g_grp
      always @(posedge dc1[g]) if (!rst) pulses[i]++;
    end
  end

  initial begin
    real p, rate, model;
    for (int i = 0; i < NK; i++) begin
      pulses[i] = 0;
      expect_pulses[i] = 0;
    end
    ref1 = '0;
    ref2 = '0;
    #22;
    rst = 1'b0;
    @(negedge clk);
    for (int c = 0; c < CYCLES; c++) begin
      for (int n = 0; n < W; n++)
        if ($urandom_range(0, 15) == 0) din[n] = ~din[n];
      for (int i = 0; i < NK; i++)
        for (int g = 0; g < W / KS[i]; g++)
          for (int n = g * KS[i]; n < (g + 1) * KS[i]; n++)
            if (din[n] != ref1[n]) begin
              expect_pulses[i]++;
              break;
            end
      @(posedge clk);
      ref1 = din;
      ref2 = din + b;
      #1;
      for (int i = 0; i < NK; i++) begin
        checks++;
        if (dout1[i] != ref1 || dout2[i] != ref2) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d cycle %0d: dout1=%h dout2=%h expected %h %h", KS[i], c,
                     dout1[i], dout2[i], ref1, ref2);
        end
      end
      @(negedge clk);
    end
    p = 1.0 / 16.0;
    for (int i = 0; i < NK; i++) begin
      checks++;
      if (pulses[i] != expect_pulses[i] || pulses[i] == 0) begin
        failures++;
        $display("FAIL k=%0d: %0d gated-clock pulses, expected %0d", KS[i], pulses[i],
                 expect_pulses[i]);
      end
      rate  = real'(pulses[i]) / real'(CYCLES * (W / KS[i]));
      model = 1.0 - (1.0 - p) ** KS[i];
      $display("k=%0d: %0d groups, %0d pulses, clocked fraction per group %f (model %f)",
               KS[i], W / KS[i], pulses[i], rate, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
