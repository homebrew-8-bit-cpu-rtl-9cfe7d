// tb_data_registers: random loads of A, X, Y, T from the data bus and
// random operand selections.  Each cycle exactly one left and one right
// source is enabled, as the control decoders guarantee; the operand buses
// must carry the selected register, X7 (sign of X), zero, or the selected
// byte of the address bus.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_data_registers;
  import cpu_pkg::*;
  logic clk = 0, ce;
  logic [7:0] databus, alubus_left, alubus_right, reg_a, reg_x, reg_y, reg_t;
  logic [23:0] adrbus;
  logic regx3;
  ctrl_t ctrl;
  logic [7:0] ma, mx, my, mt, el, er;
  int checks = 0, failures = 0;

  data_registers dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ls, rs;
    ctrl = '1; ce = 1;
    @(negedge clk);
    databus = 8'h00; ctrl.ld_a_n = 0; ctrl.ld_x_n = 0; ctrl.ld_y_n = 0; ctrl.ld_t_n = 0;
    ctrl.en_alu_0_n = 0; ctrl.en_alu_xorx7or0_n = 0; ctrl.en_alu_t_n = 0;
    @(posedge clk); #1; ma = 0; mx = 0; my = 0; mt = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ctrl = '1; ce = $urandom_range(0, 3) != 0;
      databus = 8'($urandom); adrbus = 24'($urandom);
      ctrl.ld_a_n = $urandom_range(0, 3) != 0; ctrl.ld_x_n = $urandom_range(0, 3) != 0;
      ctrl.ld_y_n = $urandom_range(0, 3) != 0; ctrl.ld_t_n = $urandom_range(0, 3) != 0;
      ls = $urandom_range(0, 4); rs = $urandom_range(0, 3);
      case (ls)
        0: begin ctrl.en_alu_a_n = 0; el = ma; end
        1: begin ctrl.en_alu_y_n = 0; el = my; end
        2: begin ctrl.en_alu_x_n = 0; ctrl.en_alu_xorx7or0_n = 0; el = mx; end
        3: begin ctrl.en_alu_x7_n = 0; ctrl.en_alu_xorx7or0_n = 0; el = {8{mx[7]}}; end
        default: begin ctrl.en_alu_0_n = 0; ctrl.en_alu_xorx7or0_n = 0; el = 0; end
      endcase
      case (rs)
        0: begin ctrl.en_alu_t_n = 0; er = mt; end
        1: begin ctrl.en_alu_adrlo_n = 0; er = adrbus[7:0]; end
        2: begin ctrl.en_alu_adrhi_n = 0; er = adrbus[15:8]; end
        default: begin ctrl.en_alu_adrbank_n = 0; er = adrbus[23:16]; end
      endcase
      #1;
      check(alubus_left == el, $sformatf("left bus sel %0d: %h expected %h", ls, alubus_left, el));
      check(alubus_right == er, $sformatf("right bus sel %0d: %h expected %h", rs, alubus_right, er));
      check(regx3 == mx[3], "X bit 3");
      @(posedge clk);
      if (ce) begin
        if (!ctrl.ld_a_n) ma = databus; if (!ctrl.ld_x_n) mx = databus;
        if (!ctrl.ld_y_n) my = databus; if (!ctrl.ld_t_n) mt = databus;
      end
      #1 check(reg_a == ma && reg_x == mx && reg_y == my && reg_t == mt, "register contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
