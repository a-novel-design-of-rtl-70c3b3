// Demonstration design: two registers built from data-driven clock-gated merging
// flip-flops.
//
// The input word din is stored in register 1 (dout1). An arithmetic circuit adds
// din and a second operand b (v = din + b), and the sum is stored in register 2
// (dout2). Each register of W bits is split into W/K merging flip-flops of K bits;
// every group has its own state change detector and integrated clock gate, so a
// group is clocked only in cycles in which one of its own bits changes. With the
// defaults (W = K = 8) each register is one 8-bit group, as in the reference
// simulation.
//
// Interface: clk free-running clock; rst asynchronous active-high reset of both
// registers; din and b inputs, sampled at the rising edge of clk (change them
// while clk is low); v combinational sum; dout1/dout2 register outputs, one edge
// after the inputs; z1/z2 per-bit change vectors; f1/f2 per-group change requests;
// s1/s2 per-group latched enables; dc1/dc2 per-group gated clocks.
// Which register feeds which operation follows the reference simulation; the
// per-group port arrays and the reset style are design choices.
module ddcg_top #(
  parameter int unsigned W = ddcg_pkg::DATA_W,
  parameter int unsigned K = ddcg_pkg::MBFF_K,
  localparam int unsigned NG = W / K
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [W-1:0]  din,
  input  logic [W-1:0]  b,
  output logic [W-1:0]  v,
  output logic [W-1:0]  dout1,
  output logic [W-1:0]  dout2,
  output logic [W-1:0]  z1,
  output logic [W-1:0]  z2,
  output logic [NG-1:0] f1,
  output logic [NG-1:0] f2,
  output logic [NG-1:0] s1,
  output logic [NG-1:0] s2,
  output logic [NG-1:0] dc1,
  output logic [NG-1:0] dc2
);
  initial begin
    assert (K > 0 && W % K == 0) else $fatal(1, "ddcg_top: W must be a multiple of K");
  end

  arith_unit #(.W(W)) u_arith (
    .a   (din),
    .b   (b),
    .sum (v)
  );

  for (genvar g = 0; g < NG; g++) begin : g_grp
    ddcg_mbff #(.K(K)) u_reg1 (
      .clk        (clk),
      .rst        (rst),
      .d          (din[g*K +: K]),
      .q          (dout1[g*K +: K]),
      .z          (z1[g*K +: K]),
      .f          (f1[g]),
      .en_latched (s1[g]),
      .gclk       (dc1[g])
    );

    ddcg_mbff #(.K(K)) u_reg2 (
      .clk        (clk),
      .rst        (rst),
      .d          (v[g*K +: K]),
      .q          (dout2[g*K +: K]),
      .z          (z2[g*K +: K]),
      .f          (f2[g]),
      .en_latched (s2[g]),
      .gclk       (dc2[g])
    );
  end
endmodule
