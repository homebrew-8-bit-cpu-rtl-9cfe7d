// tb_clock_reset: checks the quadrature clock phases and the reset
// synchroniser.  Q0 and Q1 must have a period of four master clocks, Q1
// must follow Q0 one master clock (90 degrees) later, ce must be high only
// in the quarter before Q0 rises, and resetnc_n must go low at once with
// the button and return high two master clocks after release.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_clock_reset;
  logic clk = 0, reset_btn_n = 0, q0, q1, ce, resetnc_n;
  int checks = 0, failures = 0;
  logic q0_d, q1_d;

  clock_reset dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int rises = 0, last_rise = 0;
    repeat (3) @(posedge clk);
    #1 check(resetnc_n == 1'b0, "reset held while button low");
    for (int i = 0; i < 64; i++) begin
      q0_d = q0; q1_d = q1;
      @(posedge clk); #1;
      check(q1 == q0_d, "Q1 follows Q0 one master clock later");
      check(q0 == ~q1_d, "Johnson counter sequence");
      check(ce == (~q0 & ~q1), "ce in the last quarter only");
      if (q0 && !q0_d) begin
        if (rises > 0) check(i - last_rise == 4, "Q0 period of four clocks");
        rises++; last_rise = i;
      end
      if (ce) check(q0 == 1'b0, "Q0 low when ce");
    end
    check(rises == 16, "sixteen Q0 cycles in 64 clocks");
    @(negedge clk) reset_btn_n = 1'b1;
    @(posedge clk); #1 check(resetnc_n == 1'b0, "one clock after release still in reset");
    @(posedge clk); #1 check(resetnc_n == 1'b1, "reset released after two clocks");
    @(negedge clk) reset_btn_n = 1'b0;
    #1 check(resetnc_n == 1'b0, "asynchronous assertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
