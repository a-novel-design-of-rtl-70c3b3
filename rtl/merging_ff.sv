// Merging (multi-bit) flip-flop: K D flip-flops behind one shared clock pin.
//
// The K bits are written together on the rising edge of the single clock input,
// which is what lets one clock driver, and one clock gate, serve the whole group.
// Reset is asynchronous and active high so the group can be cleared even while its
// clock is gated off.
//
// Interface: clk shared (normally gated) clock; rst asynchronous reset to all
// zeros; d data inputs; q outputs, updated one clock-to-Q after a rising clk edge.
// Sharing the clock is the described technique; the reset style is a design choice.
module merging_ff #(
  parameter int unsigned K = ddcg_pkg::MBFF_K
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
