// cg_counter16: 16-bit synchronous up counter with dynamic clock gating.
//
// Each bit is a toggle flip-flop. In a plain synchronous counter every
// flip-flop sees every clock edge although bit n changes only once in 2^n
// counts. Here the two low bits (FF_0, FF_1) stay on the free-running clock,
// and each higher bit FF_n (n = 2..15) gets its own gated clock from an icg
// cell that passes an edge only when the bit is about to toggle. The enable
// for that cell comes from the clk_en chain: En2 = Q0.Q1 and
// En_n = En_(n-1).Q_(n-1). A gated flip-flop has its T input tied to 1: the
// clock gate alone decides whether it toggles, so every clock edge it receives
// is a useful one.
//
// Interface: clk, rst (asynchronous, active high, clears all bits), t (count
// enable: count up by one per clock while 1, hold while 0), q (count). Timing:
// q increments one rising edge after t is sampled 1 and wraps from 2^WIDTH-1
// to 0. The structure (free-running Q0/Q1, AND chain, per-bit ICG on FF_2..
// FF_15) follows the design. The count enable t also heads the enable chain,
// and the reset is asynchronous: both are this implementation's choices.
module cg_counter16 #(
  parameter int unsigned WIDTH       = cgc_pkg::COUNT_WIDTH,
  parameter int unsigned FIRST_GATED = cgc_pkg::FIRST_GATED
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             t,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] en;     // en[0..1]: T inputs of the ungated bits; en[2..]: En2..En15
  logic [WIDTH-1:0] bclk;   // clock seen by each flip-flop
  logic [WIDTH-1:0] tin;    // T input of each flip-flop

  clk_en #(.WIDTH(WIDTH)) u_clk_en (
    .t  (t),
    .q  (q),
    .en (en)
  );

  for (genvar n = 0; n < WIDTH; n++) begin : g_bit
    if (n < FIRST_GATED) begin : g_free
      assign bclk[n] = clk;
      assign tin[n]  = en[n];
    end else begin : g_gated
      icg u_icg (
        .clk  (clk),
        .en   (en[n]),
        .gclk (bclk[n])
      );
      assign tin[n] = 1'b1;
    end

    t_ff u_ff (
      .clk (bclk[n]),
      .rst (rst),
      .t   (tin[n]),
      .q   (q[n]),
      .qn  ()
    );
  end
endmodule
