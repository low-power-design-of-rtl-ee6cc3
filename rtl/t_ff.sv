// t_ff: toggle flip-flop with asynchronous reset, one counter bit.
//
// On a rising edge of clk the state q inverts when t is 1 and holds when t
// is 0. rst (active high) clears q at once, without waiting for a clock edge,
// so flip-flops whose clock is gated off are still cleared. qn is the inverted
// state, as on the flip-flop symbol of the design.
//
// Interface: clk, rst, t in; q, qn out. Timing: q changes one clock edge after
// t is sampled high. The toggle function, the Q/Qn outputs and the reset pin
// follow the design; reset being asynchronous and active high is this
// implementation's choice (the published waveforms show rst high for a short
// time at start-up, then low while counting).
module t_ff (
  input  logic clk,
  input  logic rst,
  input  logic t,
  output logic q,
  output logic qn
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)    q <= 1'b0;
    else if (t) q <= ~q;
  end

  assign qn = ~q;
endmodule
