// cg_counter16_fig5_tb: replays the published behavioural waveform of the
// counter: a 500 MHz clock (2 ns period), a short reset pulse at start, count
// enable t held at 1 for 400 ns, then t at 0 for 100 ns, then t at 1 again.
//
// The counter must reach 200 after the 200 rising edges of the first 400 ns
// (one count per 2 ns cycle), hold 200 through the pause with t at 0, and
// resume counting from 200. The number of cycles and the time taken to reach
// 200 are checked as well as the values.
module cg_counter16_fig5_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        t   = 1'b0;
  logic [15:0] q;
  int   checks = 0;
  int   failures = 0;
  int   cycles = 0;
  realtime t_start, t_hold;

  cg_counter16 dut (.clk(clk), .rst(rst), .t(t), .q(q));

  always #1ns clk = ~clk;

  task automatic expect_q(input int unsigned v, input string what);
    checks++;
    if (q !== 16'(v)) begin
      failures++;
      $display("FAIL %s at %0t: q=%0d expected %0d", what, $time, q, v);
    end
  endtask

  initial begin
    #1.5ns rst = 1'b0;
    expect_q(0, "after reset");
    @(negedge clk) t = 1'b1;
    t_start = $realtime;
    // count phase: 400 ns
    while ($realtime - t_start < 400.0) begin
      @(posedge clk) #0.2ns;
      cycles++;
      expect_q(cycles, "counting");
      @(negedge clk);
    end
    t = 1'b0;
    t_hold = $realtime;
    checks++;
    if (cycles != 200) begin
      failures++;
      $display("FAIL %0d cycles in 400 ns, expected 200", cycles);
    end
    expect_q(200, "value at start of pause");
    // pause: 100 ns with t = 0
    while ($realtime - t_hold < 100.0) begin
      @(posedge clk) #0.2ns;
      expect_q(200, "pause");
      @(negedge clk);
    end
    t = 1'b1;
    for (int i = 1; i <= 50; i++) begin
      @(posedge clk) #0.2ns;
      expect_q(200 + i, "resumed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
