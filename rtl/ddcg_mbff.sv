// Data-driven clock-gated k-bit merging flip-flop (DDCG k-MBFF).
//
// The state change detector XORs each bit's D input with its Q output and ORs the
// K results; the integrated clock gate latches that request while the clock is low
// and ANDs it with the clock; the merging flip-flop is clocked by the gated clock.
// The group therefore receives a clock pulse only in cycles in which at least one
// of its K bits changes value; in every other cycle its clock pin stays low and it
// keeps its contents, which is exactly what it would have loaded anyway.
//
// Interface: clk free-running clock; rst asynchronous active-high reset; d next
// state; q stored state; z per-bit change vector; f change request (OR of z);
// en_latched ICG latch output; gclk the group's gated clock.
// Timing: d must be stable during the low phase before the rising edge; q then
// equals d one edge later, as for a plain register. The structure follows the
// described circuit; the reset style is a design choice.
module ddcg_mbff #(
  parameter int unsigned K = ddcg_pkg::MBFF_K
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] d,
  output logic [K-1:0] q,
  output logic [K-1:0] z,
  output logic         f,
  output logic         en_latched,
  output logic         gclk
);
  state_change_detector #(.K(K)) u_scd (
    .d (d),
    .q (q),
    .z (z),
    .f (f)
  );

  icg u_icg (
    .clk        (clk),
    .en         (f),
    .en_latched (en_latched),
    .gclk       (gclk)
  );

  merging_ff #(.K(K)) u_mbff (
    .clk (gclk),
    .rst (rst),
    .d   (d),
    .q   (q)
  );

  // A gated (skipped) edge must never lose an update: whenever the free clock
  // rises with the gate closed, the group already holds its next state.
  a_no_lost_update: assert property (@(posedge clk) disable iff (rst)
    !en_latched |-> d == q)
    else $error("ddcg_mbff: clock gated while state differs");
endmodule
