// State change detector of a k-bit merging flip-flop.
//
// Each flip-flop of the group compares the value waiting at its D input with the
// value it holds now (one XOR per bit). A set XOR output means that bit would
// toggle at the next rising clock edge. The k XOR outputs are ORed into a single
// request `f`: the group needs a clock pulse in the next cycle only if `f` is 1.
//
// Interface: d and q are the next and present states of the K flip-flops; z is the
// per-bit XOR vector, f the OR of z. Purely combinational, no clock.
// The XOR-then-OR structure follows the described circuit; the widths are set by K.
module state_change_detector #(
  parameter int unsigned K = ddcg_pkg::MBFF_K
) (
  input  logic [K-1:0] d,
  input  logic [K-1:0] q,
  output logic [K-1:0] z,
  output logic         f
);
  always_comb begin
    z = d ^ q;
    f = |z;
  end
endmodule
