// tb_alucc: random test of the condition-code GAL.  The flags are loaded
// from random ALU results whose overflow is worked out from real signed
// 8-bit addition and subtraction, then shifted left and right.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_alucc;
  logic clk = 0, ce, func1, a7, b7, cin_n, s0, s1, regx3;
  logic [7:0] f;
  logic cc_c_n, cc_n, cc_z_n, cc_v_n;
  logic mc, mn, mz, mv;   // model, stored polarity as in the GAL
  int checks = 0, failures = 0;
  int n_ovf = 0;

  alucc dut (.*);
  always #5 clk = ~clk;

  initial begin
    ce = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [7:0] x, y;
      int sr;
      @(negedge clk);
      ce = (i < 2) ? 1'b1 : $urandom_range(0, 3) != 0;
      x = 8'($urandom); y = 8'($urandom); func1 = $urandom_range(0, 1);
      if ($urandom_range(0, 7) == 0) y = x;
      if (func1) begin f = x - y; sr = $signed(x) - $signed(y); cin_n = !(x >= y); end
      else       begin f = x + y; sr = $signed(x) + $signed(y); cin_n = !((9'(x) + 9'(y)) > 255); end
      a7 = x[7]; b7 = y[7]; regx3 = $urandom_range(0, 1);
      {s1, s0} = (i < 2) ? 2'b11 : 2'($urandom);
      @(posedge clk);
      if (ce) case ({s1, s0})
        2'b01: begin mv = mz; mz = mn; mn = mc; mc = 1'b0; end
        2'b10: begin mc = mn; mn = mz; mz = mv; mv = regx3; end
        2'b11: begin
          mc = cin_n; mn = f[7]; mz = (f != 0);
          mv = !(sr > 127 || sr < -128);
          if (!mv) n_ovf++;
        end
        default: ;
      endcase
      #1; checks++;
      if ({cc_c_n, cc_n, cc_z_n, cc_v_n} !== {mc, mn, mz, mv}) begin
        failures++;
        $display("FAIL: s=%b%b flags %b%b%b%b expected %b%b%b%b", s1, s0,
                 cc_c_n, cc_n, cc_z_n, cc_v_n, mc, mn, mz, mv);
      end
    end
    checks++; if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
