// End-to-end testbench of ddcg_top at its default size (two 8-bit registers, each
// one 8-bit data-driven clock-gated merging flip-flop).
//
// Inputs change on the falling clock edge. Reference registers clocked by the free
// clock give the expected dout1 = din and dout2 = din + b one edge later. Before
// each rising edge the change vectors and requests are compared with the
// reference state; after it the outputs, the latched enables and the number of
// gated-clock pulses are compared. The stimulus mixes cycles that make each
// mechanism happen and counts them:
//   both groups gated (inputs held), only register 2 clocked (b changes),
//   only register 1 clocked (din and b change with the same sum), both clocked,
//   an asynchronous reset in mid-run while the clocks are gated.
// It also replays the reference operating point din = 0x1A, b = 0x75, where the
// design must settle to dout1 = 0x1A, dout2 = v = 0x8F with both clocks stopped.
module tb_ddcg_top;
  localparam int unsigned W = ddcg_pkg::DATA_W;
  localparam int unsigned CYCLES = 3000;

  logic         clk = 1'b0, rst = 1'b1;
  logic [W-1:0] din = '0, b = '0;
  logic [W-1:0] v, dout1, dout2, z1, z2;
  logic [0:0]   f1, f2, s1, s2, dc1, dc2;
  logic [W-1:0] ref1, ref2;
  int checks = 0, failures = 0;
  int pulses1 = 0, pulses2 = 0, exp1 = 0, exp2 = 0;
  int n_both_gated = 0, n_only2 = 0, n_only1 = 0, n_both = 0, n_reset = 0;

  ddcg_top dut (
    .clk(clk), .rst(rst), .din(din), .b(b), .v(v), .dout1(dout1), .dout2(dout2),
    .z1(z1), .z2(z2), .f1(f1), .f2(f2), .s1(s1), .s2(s2), .dc1(dc1), .dc2(dc2)
  );

  always #5 clk = ~clk;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dc1[0]) if (!rst) pulses1++;
  always @(posedge dc2[0]) if (!rst) pulses2++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s at %0t: din=%h b=%h v=%h dout1=%h dout2=%h", what, $time, din, b, v,
                 dout1, dout2);
    end
  endtask

  // one clock cycle: inputs already applied after the falling edge
  task automatic cycle();
    logic [W-1:0] sum;
    logic         c1, c2;
    sum = din + b;
    #1;
    check(v == sum, "sum");
    check(z1 == (din ^ ref1) && f1[0] == (din != ref1), "detector 1");
    check(z2 == (sum ^ ref2) && f2[0] == (sum != ref2), "detector 2");
    c1 = (din != ref1);
    c2 = (sum != ref2);
    if (c1) exp1++;
    if (c2) exp2++;
    if (!c1 && !c2) n_both_gated++;
    else if (!c1)   n_only2++;
    else if (!c2)   n_only1++;
    else            n_both++;
    @(posedge clk);
    ref1 = din;
    ref2 = sum;
    #1;
    check(dout1 == ref1, "register 1");
    check(dout2 == ref2, "register 2");
    check(s1[0] == c1 && s2[0] == c2, "latched enables");
    check(dc1[0] == c1 && dc2[0] == c2, "gated clock levels");
    @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] delta;
    int           mode;
    ref1 = '0;
    ref2 = '0;
    #22;
    rst = 1'b0;
    @(negedge clk);

    // reference operating point
    din = 8'h1A;
    b   = 8'h75;
    cycle();
    for (int i = 0; i < 5; i++) begin
      cycle();
      check(dout1 == 8'h1A && dout2 == 8'h8F && v == 8'h8F, "reference values");
      check(z1 == '0 && z2 == '0 && f1 == '0 && s1 == '0 && dc1 == '0, "reference gating");
    end

    for (int c = 0; c < CYCLES; c++) begin
      mode = $urandom_range(0, 5);
      unique case (mode)
        0, 1: ;                                     // hold: both groups gated
        2: b = W'($urandom);                        // usually only register 2 changes
        3: begin                                    // same sum: only register 1 changes
          delta = W'($urandom_range(1, (1 << W) - 1));
          din   = din + delta;
          b     = b - delta;
        end
        default: begin                              // both change
          din = W'($urandom);
          b   = W'($urandom);
        end
      endcase
      cycle();
      if (c % 500 == 250) begin                     // asynchronous reset mid-run
        #2 rst = 1'b1;
        #1 check(dout1 == '0 && dout2 == '0, "asynchronous reset");
        ref1 = '0;
        ref2 = '0;
        n_reset++;
        @(negedge clk);
        rst = 1'b0;
      end
    end

    check(pulses1 == exp1, "gated-clock pulse count 1");
    check(pulses2 == exp2, "gated-clock pulse count 2");
    check(n_both_gated > 0, "both groups gated happened");
    check(n_only2 > 0, "only register 2 clocked happened");
    check(n_only1 > 0, "only register 1 clocked happened");
    check(n_both > 0, "both clocked happened");
    check(n_reset > 0, "reset happened");
    $display("cycles: both gated %0d, only reg2 %0d, only reg1 %0d, both %0d, resets %0d",
             n_both_gated, n_only2, n_only1, n_both, n_reset);
    $display("gated-clock pulses: reg1 %0d, reg2 %0d", pulses1, pulses2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
