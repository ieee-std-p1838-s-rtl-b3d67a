// tb_fpp_lockup_latch: self-checking test of the lock-up latch.
//
// Changes d at random points in both clock phases and checks that q follows
// d while the clock is low and keeps the value d had at the rising edge while
// the clock is high. The expected value is tracked from the stimulus alone.
module tb_fpp_lockup_latch;
  logic clk = 1'b0;
  logic d   = 1'b0;
  logic q;
  int   checks = 0, failures = 0;
  logic held;

  fpp_lockup_latch dut (.clk(clk), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) #1;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // clock low: transparent
    #1 d = 1'b1; #1 check(1'b1, "transparent low");
    for (int cyc = 0; cyc < 200; cyc++) begin
      // still low phase: d changes pass through
      d = 1'($urandom); #1 check(d, "follow while low");
      d = 1'($urandom); #1 check(d, "follow while low");
      held = d;
      clk = 1'b1; #1 check(held, "capture at rising edge");
      // high phase: q holds while d toggles
      repeat (3) begin
        d = 1'($urandom); #1 check(held, "hold while high");
      end
      d = ~held; #1 check(held, "hold against opposite d");
      clk = 1'b0; #1 check(d, "transparent again after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
