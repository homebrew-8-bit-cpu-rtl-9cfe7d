// tb_sp_reg: random test of a stack-pointer byte: load, count up (DIR = 1)
// or down (DIR = 0), hold; carry out at FF going up and at 00 going down,
// only while counting and not loading.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_sp_reg;
  logic clk = 0, ce, dir, cnt_in_n, ld_n, oe_n, q_oe, cnt_out_n;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  sp_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ce = 1; cnt_in_n = 1; ld_n = 0; oe_n = 1; dir = 1; d = 8'h02;
    @(posedge clk); #1 m = 8'h02;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 7) != 0; ld_n = $urandom_range(0, 31) != 0;
      cnt_in_n = $urandom_range(0, 3) == 0; oe_n = $urandom_range(0, 1);
      if ($urandom_range(0, 15) == 0) dir = ~dir;
      case ($urandom_range(0, 3))
        0: d = 8'hFD; 1: d = 8'h02; default: d = 8'($urandom);
      endcase
      #1;
      check(cnt_out_n == !(ld_n && !cnt_in_n && (dir ? m == 8'hFF : m == 8'h00)),
            "carry/borrow out");
      check(q_oe == !oe_n, "output enable");
      if (!cnt_out_n) begin if (dir) n_up++; else n_down++; end
      @(posedge clk);
      if (ce) begin
        if (!ld_n) m = d; else if (!cnt_in_n) m = dir ? m + 1 : m - 1;
      end
      #1 check(q == m, $sformatf("q=%h expected %h", q, m));
    end
    check(n_up > 0 && n_down > 0, "carry and borrow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
