// tb_opcode_reg: random test of the opcode register against the rules:
// reset loads the bus, /LDOP loads the bus unless an interrupt is pending
// and enabled (then 0), otherwise hold; nothing changes without ce.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_opcode_reg;
  logic clk = 0, ce, ldop_n, ie_n, irq_n, reset_n;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0;
  int n_irq = 0;

  opcode_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    ce = 1; reset_n = 0; ldop_n = 1; ie_n = 1; irq_n = 1; d = 8'h3C;
    @(posedge clk); #1 m = 8'h3C;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 3) != 0; reset_n = $urandom_range(0, 9) != 0;
      ldop_n = $urandom_range(0, 1); ie_n = $urandom_range(0, 1);
      irq_n = $urandom_range(0, 1); d = 8'($urandom);
      @(posedge clk);
      if (ce) begin
        if (!reset_n) m = d;
        else if (!ldop_n) begin
          if (!irq_n && !ie_n) begin m = 8'h00; n_irq++; end
          else m = d;
        end
      end
      #1; checks++;
      if (q !== m) begin failures++; $display("FAIL: q=%h expected %h", q, m); end
    end
    checks++; if (n_irq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
