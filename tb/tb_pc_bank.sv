// tb_pc_bank: random test of the PC bank byte: reset, load, count, hold,
// and the combined output enable /OE_OUT = /ADRSEL_PC AND /RESET.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_pc_bank;
  logic clk = 0, ce, reset_n, cnt_in_n, adrsel_pc_n, ld_n, oe_out_n, q_oe;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0;

  pc_bank dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ce = 1; reset_n = 0; cnt_in_n = 1; ld_n = 1; adrsel_pc_n = 1; d = 0;
    @(posedge clk); #1 m = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 7) != 0; reset_n = $urandom_range(0, 15) != 0;
      ld_n = $urandom_range(0, 15) != 0; cnt_in_n = $urandom_range(0, 1);
      adrsel_pc_n = $urandom_range(0, 1); d = 8'($urandom);
      #1;
      check(oe_out_n == (adrsel_pc_n && reset_n), "combined output enable");
      check(q_oe == !oe_out_n, "own output enable");
      @(posedge clk);
      if (ce) begin
        if (!reset_n) m = 0; else if (!ld_n) m = d; else if (!cnt_in_n) m = m + 1;
      end
      #1 check(q == m, $sformatf("q=%h expected %h", q, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
