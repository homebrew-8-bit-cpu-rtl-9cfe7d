// tb_alu: the 8-bit ALU (two cascaded 74LS181 slices) on random operands:
// 8-bit addition and subtraction with and without carry in, including the
// carry out across both slices, logic functions, flag loading through the
// condition-code GAL, and the data-bus enable.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_alu;
  logic clk = 0, ce, mode, cin_n, cc_s0, cc_s1, regx3, dralu_n;
  logic [7:0] left, right, f;
  logic [3:0] func;
  logic f_oe, cout_n, cc_c_n, cc_n, cc_z_n, cc_v_n;
  int checks = 0, failures = 0, n_carry = 0;

  alu dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [8:0] r; logic [7:0] e; int op; int sr; logic ev;
    ce = 1; regx3 = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      left = 8'($urandom); right = 8'($urandom); cin_n = $urandom_range(0, 1);
      dralu_n = $urandom_range(0, 1); {cc_s1, cc_s0} = 2'b11;
      op = $urandom_range(0, 4);
      case (op)
        0: begin func = 4'b1001; mode = 0; r = 9'(left) + 9'(right) + 9'(!cin_n);
                 sr = $signed(left) + $signed(right) + int'(!cin_n); end
        1: begin func = 4'b0110; mode = 0; r = 9'(left) + {1'b0, ~right} + 9'(!cin_n);
                 sr = $signed(left) - $signed(right) - int'(cin_n); end
        2: begin func = 4'b1011; mode = 1; r = {1'b0, left & right}; end
        3: begin func = 4'b1110; mode = 1; r = {1'b0, left | right}; end
        default: begin func = 4'b0110; mode = 1; r = {1'b0, left ^ right}; end
      endcase
      #1;
      check(f == r[7:0], $sformatf("op %0d %h,%h: f=%h expected %h", op, left, right, f, r[7:0]));
      check(f_oe == !dralu_n, "data bus enable");
      if (op < 2) begin
        check(cout_n == !r[8], "carry out");
        if (r[8]) n_carry++;
      end
      @(posedge clk); #1;
      check(cc_n == r[7] && cc_z_n == (r[7:0] != 0), "N and Z flags");
      if (op < 2) begin
        check(cc_c_n == !r[8], "C flag");
        ev = (sr > 127 || sr < -128);
        // the GAL's overflow rule ignores the carry in; compare only without it
        if ((op == 0 && cin_n) || (op == 1 && !cin_n)) check(cc_v_n == !ev, "V flag");
      end
    end
    check(n_carry > 0, "carries seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
