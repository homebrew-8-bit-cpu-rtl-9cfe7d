// tb_phase_counter: random test of the 74LS163 microcode phase counter:
// synchronous clear over load over count, count only with ENP and ENT,
// RCO at 15 with ENT.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_phase_counter;
  logic clk = 0, ce, clr_n, load_n, enp, ent, rco;
  logic [3:0] d, q, m;
  int checks = 0, failures = 0;

  phase_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    ce = 1; clr_n = 0; load_n = 1; enp = 1; ent = 1; d = 0;
    @(posedge clk); #1 m = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 3) != 0; clr_n = $urandom_range(0, 15) != 0;
      load_n = $urandom_range(0, 7) != 0; enp = $urandom_range(0, 7) != 0;
      ent = $urandom_range(0, 7) != 0; d = 4'($urandom);
      #1; checks++;
      if (rco !== (ent && m == 4'hF)) begin failures++; $display("FAIL: rco"); end
      @(posedge clk);
      if (ce) begin
        if (!clr_n) m = 0; else if (!load_n) m = d; else if (enp && ent) m = m + 1;
      end
      #1; checks++;
      if (q !== m) begin failures++; $display("FAIL: q=%h expected %h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
