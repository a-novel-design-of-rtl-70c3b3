// Self-checking testbench of arith_unit: the reference vector 0x1A + 0x75 = 0x8F,
// the carry-out corner cases and random operands, compared with a 9-bit sum
// truncated to 8 bits.
module tb_arith_unit;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  arith_unit #(.W(W)) dut (.a(a), .b(b), .sum(sum));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] full;
    a = x;
    b = y;
    #1;
    full = {1'b0, x} + {1'b0, y};
    checks++;
    if (sum !== full[W-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, sum, full[W-1:0]);
    end
  endtask

  initial begin
    apply(8'h1A, 8'h75);
    checks++;
    if (sum !== 8'h8F) failures++;
    apply(8'hFF, 8'h01);
    apply(8'h80, 8'h80);
    apply(8'h00, 8'h00);
    for (int i = 0; i < 2000; i++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
