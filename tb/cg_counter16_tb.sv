// cg_counter16_tb: end-to-end test of the clock-gated 16-bit counter at its
// default size, with a 500 MHz clock (2 ns period).
//
// The testbench keeps its own model of the count (an integer incremented
// modulo 2^16 when t is 1) and checks q after every rising edge. It runs:
//   1. reset, then a full period of 2^16 + 16 counts with t = 1, so that the
//      count wraps from FFFF to 0000 and every enable En2..En15 fires;
//   2. random t with pauses, and asynchronous resets at random moments;
//   3. a hold of several cycles at an all-ones count, where the gate chain
//      must keep every gated clock cut although all Q bits are 1.
// Alongside the value it checks the clock gating itself: it counts the rising
// edges each flip-flop's clock actually carries and compares them with the
// number of times the model says that bit toggled through counting. For a
// gated bit the two must be equal (no wasted edge, no missing edge); for the
// free-running bits 0 and 1 the count equals the number of clock cycles.
// Mechanisms counted and required at least once: reset, hold (t = 0),
// wrap-around, a passed edge on each gated bit, a cut edge on each gated bit.
module cg_counter16_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W  = cgc_pkg::COUNT_WIDTH;
  localparam int unsigned FG = cgc_pkg::FIRST_GATED;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         t   = 1'b0;
  logic [W-1:0] q;

  int unsigned model;
  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_reset = 0, n_hold = 0, n_wrap = 0;
  int edges_seen [W];
  int edges_exp  [W];
  int cut        [W];

  cg_counter16 dut (.clk(clk), .rst(rst), .t(t), .q(q));

  always #1ns clk = ~clk;

  for (genvar n = 0; n < W; n++) begin : g_edge
    always @(posedge dut.bclk[n]) edges_seen[n]++;
  end

  task automatic check_q(input string what);
    checks++;
    if (q !== W'(model)) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: q=%h expected %h", what, $time, q, W'(model));
    end
  endtask

  // one clock cycle: apply t on the falling edge, update the model for the
  // coming rising edge, then check after it
  task automatic step(input logic tv);
    @(negedge clk);
    t = tv;
    cycles++;
    for (int n = 0; n < W; n++) begin
      if (n < FG) edges_exp[n]++;
      else if (tv && ((model % (1 << n)) == (1 << n) - 1)) edges_exp[n]++;
      else cut[n]++;
    end
    if (!tv) n_hold++;
    if (tv && model == (1 << W) - 1) n_wrap++;
    if (tv) model = (model + 1) % (1 << W);
    @(posedge clk);
    #0.2ns;
    check_q(tv ? "count" : "hold");
  endtask

  task automatic async_reset();
    #0.3ns rst = 1'b1;
    #0.2ns;
    model = 0;
    n_reset++;
    check_q("asynchronous reset");
    #0.2ns rst = 1'b0;   // released before the falling edge
  endtask

  initial begin
    for (int n = 0; n < W; n++) begin
      edges_seen[n] = 0;
      edges_exp[n]  = 0;
      cut[n]        = 0;
    end
    model = 0;
    #3ns;
    n_reset++;
    check_q("power-on reset");
    // release reset in a high phase; edge counting starts here
    @(posedge clk) #0.5ns rst = 1'b0;
    for (int n = 0; n < W; n++) edges_seen[n] = 0;

    // 1. a full period and a little more with t = 1
    for (int i = 0; i < (1 << W) + 16; i++) step(1'b1);

    // 2. random t with pauses, occasional asynchronous reset
    for (int i = 0; i < 20000; i++) begin
      step(($urandom_range(3, 0) != 0) ? 1'b1 : 1'b0);
      if ($urandom_range(4999, 0) == 0) async_reset();
    end

    // 3. hold at all ones: every Q is 1 but no gated clock may pass
    while (model != (1 << W) - 1) step(1'b1);
    for (int i = 0; i < 8; i++) step(1'b0);
    step(1'b1);
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL wrap after hold: q=%h", q);
    end

    // per-bit clock edges: gated bits see exactly the edges they need
    for (int n = 0; n < W; n++) begin
      checks++;
      if (edges_seen[n] != edges_exp[n]) begin
        failures++;
        $display("FAIL bit %0d clock edges %0d expected %0d", n, edges_seen[n], edges_exp[n]);
      end
    end

    // every mechanism happened at least once
    checks += 3;
    if (n_reset < 2) begin failures++; $display("FAIL no asynchronous reset exercised"); end
    if (n_hold == 0) begin failures++; $display("FAIL no hold cycle exercised"); end
    if (n_wrap == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    for (int n = FG; n < W; n++) begin
      checks++;
      if (edges_exp[n] == 0 || cut[n] == 0) begin
        failures++;
        $display("FAIL bit %0d: passed %0d cut %0d edges", n, edges_exp[n], cut[n]);
      end
    end

    $display("cycles=%0d resets=%0d holds=%0d wraps=%0d", cycles, n_reset, n_hold, n_wrap);
    for (int n = 0; n < W; n++)
      $display("bit %2d: clock edges %6d of %6d cycles (%0.2f%%)", n, edges_seen[n], cycles,
               100.0 * real'(edges_seen[n]) / real'(cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
