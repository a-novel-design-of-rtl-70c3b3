// Arithmetic circuit of the demonstration design.
//
// Adds the input word and a second operand, modulo 2^W (carry out dropped), to
// produce the value loaded into the clock-gated result register. Purely
// combinational. Interface: a and b operands, sum = a + b.
// The operation is read from the reference simulation (0x1A + 0x75 = 0x8F); the
// dropped carry is a design choice.
module arith_unit #(
  parameter int unsigned W = ddcg_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  always_comb sum = a + b;
endmodule
