// Integrated clock gate (ICG): latch-based, glitch-free clock gating cell.
//
// A level-sensitive latch is transparent while clk is low and holds while clk is
// high, so the enable it passes on cannot change during the high phase. The gated
// clock is the AND of clk and the latched enable: it pulses high exactly in the
// clock cycles whose enable was 1 when clk rose, and never produces a shortened
// pulse even if `en` changes while clk is high.
//
// Interface: clk free-running clock; en gating request, must settle before the
// rising edge of clk; en_latched latch output; gclk gated clock.
// Timing: an enable presented during the low phase of cycle n gates the rising edge
// that ends that phase. The latch-plus-AND structure follows the described circuit;
// a latch is intended here, it is the cell's storage element.
module icg (
  input  logic clk,
  input  logic en,
  output logic en_latched,
  output logic gclk
);
  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule
