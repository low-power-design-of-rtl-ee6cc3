// icg: integrated clock gating cell, one per gated counter bit.
//
// A latch is transparent while clk is low and holds while clk is high; the
// gated clock is clk ANDed with the latched enable. An enable that changes
// while clk is high therefore cannot cut or stretch a clock pulse, so gclk has
// no glitches: it carries exactly the clk pulses whose rising edge found en
// high (en being set up during the preceding low phase).
//
// Interface: clk, en in; gclk out. Timing: en must be stable before the rising
// edge of clk, like the D input of a flip-flop on that edge; gclk follows clk
// through one AND gate. The design names the cell and its job only; the
// latch-and-AND structure is the usual way to build it and this
// implementation's choice. The latch is intended.
module icg (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;
endmodule
