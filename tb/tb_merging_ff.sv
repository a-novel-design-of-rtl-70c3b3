// Self-checking testbench of merging_ff.
// Loads random words on rising clock edges and checks that all K bits are taken
// on the same edge; applies the asynchronous reset between edges and checks that
// the outputs clear at once, without a clock edge.
module tb_merging_ff;
  localparam int unsigned K = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [K-1:0] d = '0, q, expect_q;
  int checks = 0, failures = 0;

  merging_ff #(.K(K)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [K-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%h expected %h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    expect_q = '0;
    #12;
    check('0, "reset");
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = K'($urandom);
      #1 check(expect_q, "hold before edge");
      @(posedge clk);
      expect_q = d;
      #1 check(expect_q, "load");
      if (i % 50 == 25) begin
        #1 rst = 1'b1;
        #1 check('0, "asynchronous reset");
        #1 rst = 1'b0;
        expect_q = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
