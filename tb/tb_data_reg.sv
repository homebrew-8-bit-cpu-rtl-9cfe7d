// tb_data_reg: random test of the GAL data register: load on /LD with ce,
// hold otherwise; the output enable follows /OE.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_data_reg;
  logic clk = 0, ce, ld_n, oe_n, q_oe;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0;

  data_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    ce = 1; ld_n = 0; oe_n = 1; d = 8'h11;
    @(posedge clk); #1 m = 8'h11;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 1); ld_n = $urandom_range(0, 1);
      oe_n = $urandom_range(0, 1); d = 8'($urandom);
      #1; checks++;
      if (q_oe !== !oe_n) begin failures++; $display("FAIL: oe"); end
      @(posedge clk); if (ce && !ld_n) m = d;
      #1; checks++;
      if (q !== m) begin failures++; $display("FAIL: q=%h expected %h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
