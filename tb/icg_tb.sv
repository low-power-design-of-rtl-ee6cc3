// icg_tb: self-checking test of the clock gating cell.
//
// Per clock period the enable is set to a random value during the low phase
// and, in half of the periods, flipped again in the middle of the high phase.
// The gated clock must carry the pulse exactly when the enable was 1 at the
// rising edge, for the whole high phase (the mid-pulse change must neither cut
// nor create a pulse), and must stay low while clk is low. Rising edges of
// gclk are counted and compared with the number of enabled periods.
module icg_tb;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  logic en_at_edge;
  int   checks = 0;
  int   failures = 0;
  int   edges = 0;
  int   expected_edges = 0;

  icg dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) edges++;

  task automatic check(input logic exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s at %0t: gclk=%0b expected %0b", what, $time, gclk, exp);
    end
  endtask

  initial begin
    #2;
    for (int i = 0; i < 500; i++) begin
      // low phase: 10 time units
      en = 1'($urandom_range(1, 0));
      #3 check(1'b0, "low phase");
      #7;
      en_at_edge = en;
      if (en_at_edge) expected_edges++;
      clk = 1'b1;
      #2 check(en_at_edge, "high phase start");
      if ($urandom_range(1, 0) == 1) en = ~en;
      #3 check(en_at_edge, "high phase after enable change");
      #5 check(en_at_edge, "high phase end");
      clk = 1'b0;
      #0;
    end
    #1;
    checks++;
    if (edges != expected_edges) begin
      failures++;
      $display("FAIL gated edge count %0d expected %0d", edges, expected_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
