// Shared constants of the data-driven clock-gated (DDCG) merging flip-flop design.
//
// DATA_W is the width of the demonstration registers (the input register and the
// arithmetic result register are 8 bits wide in the reference simulation).
// MBFF_K is the multiplicity k of one merging flip-flop: the number of flip-flops
// that share one clock pin, one state change detector and one integrated clock
// gate. The reference simulation uses one 8-bit group; k = 2 and 4 are the other
// group sizes considered for the technique and are reached by overriding K.
package ddcg_pkg;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned MBFF_K = 8;
endpackage
