// cgc_pkg: constants shared by the clock-gated counter.
//
// COUNT_WIDTH is the counter length (16 bits, FF_0..FF_15). FIRST_GATED is
// the lowest bit whose flip-flop is clocked through a clock gate: bits 0 and 1
// toggle so often that gating them saves nothing, so they run on the free
// clock and bits 2..15 run on gated clocks. Both numbers follow the design
// description; nothing in this package is a free choice.
package cgc_pkg;
  localparam int unsigned COUNT_WIDTH = 16;
  localparam int unsigned FIRST_GATED = 2;
endpackage
