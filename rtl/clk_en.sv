// clk_en: clock enable (clock monitoring) chain of the gated counter.
//
// A bit of a binary up counter changes on the next count only when every
// lower bit is 1. The chain computes that condition for every bit with one
// two-input AND per stage:
//   en[0] = t                       (count enable, toggle input of FF_0)
//   en[1] = en[0] & q[0]            (toggle input of FF_1)
//   en[n] = en[n-1] & q[n-1]        n = 2 .. WIDTH-1
// en[2]..en[WIDTH-1] are the enables En2..En15 that steer the clock gates of
// FF_2..FF_15; en[0] and en[1] drive the T inputs of the two free-running
// low bits.
//
// Interface: t (count enable) and the counter state q in, en out; purely
// combinational. The recurrence En_n = En_(n-1).Q_(n-1) with En2 = Q0.Q1 is the
// design's; folding the count enable t into the head of the chain (so that
// En2 = t.Q0.Q1) is this implementation's choice, needed so that a gated bit
// cannot toggle while counting is paused.
module clk_en #(
  parameter int unsigned WIDTH = cgc_pkg::COUNT_WIDTH
) (
  input  logic             t,
  input  logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] en
);
  assign en[0] = t;

  for (genvar n = 1; n < WIDTH; n++) begin : g_stage
    assign en[n] = en[n-1] & q[n-1];
  end
endmodule
