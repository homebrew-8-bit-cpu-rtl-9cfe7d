// tb_ar_reg: random test of an address-register byte: load over count,
// hold, carry out at FF, output enable.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_ar_reg;
  logic clk = 0, ce, cnt_in_n, ld_n, oe_n, q_oe, cnt_out_n;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0, n_wrap = 0;

  ar_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ce = 1; cnt_in_n = 1; ld_n = 0; oe_n = 1; d = 8'hF0;
    @(posedge clk); #1 m = 8'hF0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 7) != 0; ld_n = $urandom_range(0, 31) != 0;
      cnt_in_n = $urandom_range(0, 3) == 0; oe_n = $urandom_range(0, 1);
      d = ($urandom_range(0, 1)) ? 8'hFD : 8'($urandom);
      #1;
      check(cnt_out_n == !(!cnt_in_n && m == 8'hFF), "carry out");
      check(q_oe == !oe_n, "output enable");
      if (!cnt_out_n) n_wrap++;
      @(posedge clk);
      if (ce) begin
        if (!ld_n) m = d; else if (!cnt_in_n) m = m + 1;
      end
      #1 check(q == m, $sformatf("q=%h expected %h", q, m));
    end
    check(n_wrap > 0, "carry out seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
