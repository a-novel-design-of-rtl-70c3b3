// Self-checking testbench of state_change_detector.
// Applies every pair (d, q) of 8-bit values and compares z with a bit-by-bit
// inequality test and f with "any bit differs", both computed here without XOR/OR
// reduction of whole vectors.
module tb_state_change_detector;
  localparam int unsigned K = 8;
  logic [K-1:0] d, q, z;
  logic f;
  int checks = 0, failures = 0;

  state_change_detector #(.K(K)) dut (.d(d), .q(q), .z(z), .f(f));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic         exp_f;
    logic [K-1:0] exp_z;
    for (int i = 0; i < (1 << K); i++) begin
      for (int j = 0; j < (1 << K); j++) begin
        d = K'(i);
        q = K'(j);
        #1;
        exp_f = 1'b0;
        for (int n = 0; n < K; n++) begin
          exp_z[n] = (d[n] != q[n]);
          if (d[n] != q[n]) exp_f = 1'b1;
        end
        checks++;
        if (z !== exp_z || f !== exp_f) begin
          failures++;
          if (failures < 10)
            $display("FAIL d=%h q=%h z=%h f=%b (expected z=%h f=%b)", d, q, z, f, exp_z, exp_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
