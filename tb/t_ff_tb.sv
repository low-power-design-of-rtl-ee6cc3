// t_ff_tb: self-checking test of the toggle flip-flop.
//
// Drives random t values on the falling clock edge and compares q and qn after
// each rising edge with a one-bit model kept in the testbench. Also pulses
// reset between clock edges (q must clear at once, without a clock edge) and
// checks that q holds while t is 0. A watchdog ends the run if it stalls.
module t_ff_tb;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic t   = 1'b0;
  logic q, qn;
  logic model;
  int   checks = 0;
  int   failures = 0;

  t_ff dut (.clk(clk), .rst(rst), .t(t), .q(q), .qn(qn));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp || qn !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%0b qn=%0b expected q=%0b", what, q, qn, exp);
    end
  endtask

  initial begin
    #23;
    check(1'b0, "reset");
    @(negedge clk) rst = 1'b0;
    model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk) t = 1'($urandom_range(1, 0));
      if (t) model = ~model;
      @(posedge clk) #1;
      check(model, "toggle");
      if (i % 97 == 50) begin
        // asynchronous reset in the middle of the high phase
        #1 rst = 1'b1;
        #1 check(1'b0, "async reset");
        #1 rst = 1'b0;
        model = 1'b0;
      end
    end
    // hold: t = 0 for several edges after setting q to 1
    @(negedge clk) t = 1'b1;
    model = ~model;
    @(negedge clk) t = 1'b0;
    repeat (5) begin
      @(posedge clk) #1;
      check(model, "hold");
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
