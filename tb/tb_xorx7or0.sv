// tb_xorx7or0: exhaustive test over the selects and random data: X passes
// through, X7 copies bit 7 to all bits, neither gives zero.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_xorx7or0;
  logic [7:0] d, q;
  logic en_x_n, en_x7_n, en_n, q_oe;
  logic [7:0] e;
  int checks = 0, failures = 0;

  xorx7or0 dut (.*);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      d = 8'($urandom); {en_x_n, en_x7_n, en_n} = 3'(i);
      #1;
      e = 8'h00;
      if (!en_x_n) e |= d;
      if (!en_x7_n) e |= d[7] ? 8'hFF : 8'h00;
      checks++; if (q !== e) begin failures++; $display("FAIL: q=%h exp %h", q, e); end
      checks++; if (q_oe !== !en_n) begin failures++; $display("FAIL: oe"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
