// clk_en_tb: exhaustive test of the clock enable chain.
//
// Applies every combination of the count enable t and the 16-bit state q and
// checks each output bit against its closed form: bit n is enabled exactly
// when t is 1 and all bits below n are 1 (the carry into bit n of an
// incrementer). 2^17 input vectors, all combinational.
module clk_en_tb;
  localparam int unsigned W = 16;
  logic         t;
  logic [W-1:0] q;
  logic [W-1:0] en;
  logic [W-1:0] exp_en;
  int checks = 0;
  int failures = 0;

  clk_en #(.WIDTH(W)) dut (.t(t), .q(q), .en(en));

  initial begin
    for (int tv = 0; tv < 2; tv++) begin
      for (int qv = 0; qv < (1 << W); qv++) begin
        t = 1'(tv);
        q = W'(qv);
        #1;
        for (int n = 0; n < W; n++) begin
          // lower n bits all ones <=> (q mod 2^n) == 2^n - 1
          exp_en[n] = t && ((qv % (1 << n)) == (1 << n) - 1);
        end
        checks++;
        if (en !== exp_en) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0b q=%h en=%h expected %h", t, q, en, exp_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
