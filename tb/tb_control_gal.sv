// tb_control_gal: random test of the control GAL.  A reference model holds
// /RESETC, /IE and /CARRY_A and computes the combinational outputs from the
// rules: X7 vs Y selection by load3, the shared X/X7/0 buffer enable, the
// memory buffer, /OE and /WE (last quarter only).
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_control_gal;
  logic clk = 0, ce, q0, q1, load3, spdir_iedata, resetnc_n, ld_ie_n;
  logic en_alu_yorx7_n, alu_cout_n, ldmem_n, dralu_n, en_alu_x_n, en_alu_0_n;
  logic resetc_n, resetc, ie_n, carry_a_n, en_alu_x7_n, en_alu_y_n;
  logic en_alu_xorx7or0_n, en_membuf_n, oe_mem_n, we_mem_n;
  logic m_rst_n, m_ie_n, m_ca_n;
  int checks = 0, failures = 0, n_ca = 0;

  control_gal dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ce = 1; resetnc_n = 0; ld_ie_n = 1; en_alu_yorx7_n = 0; load3 = 0;
    alu_cout_n = 1; {q0, q1, spdir_iedata, ldmem_n, dralu_n, en_alu_x_n, en_alu_0_n} = '1;
    @(posedge clk); @(posedge clk); #1;
    m_rst_n = 0; m_ie_n = 1; m_ca_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 3) != 0; resetnc_n = $urandom_range(0, 15) != 0;
      {q0, q1, load3, spdir_iedata, ld_ie_n, en_alu_yorx7_n, alu_cout_n,
       ldmem_n, dralu_n, en_alu_x_n, en_alu_0_n} = 11'($urandom);
      #1;
      check(en_alu_x7_n == !(!en_alu_yorx7_n && !load3), "X7 enable");
      check(en_alu_y_n  == !(!en_alu_yorx7_n &&  load3), "Y enable");
      check(en_alu_xorx7or0_n == !(!en_alu_x_n || !en_alu_0_n ||
                                   (!en_alu_yorx7_n && !load3)), "XORX7OR0 enable");
      check(en_membuf_n == !(dralu_n || !ldmem_n), "membuf enable");
      check(oe_mem_n == !ldmem_n, "memory OE");
      check(we_mem_n == !(!ldmem_n && !q0 && !q1), "memory WE");
      @(posedge clk);
      if (ce) begin
        if (!m_rst_n) m_ie_n = 1; else if (!ld_ie_n) m_ie_n = spdir_iedata;
        if (!en_alu_yorx7_n && !load3) begin m_ca_n = alu_cout_n; n_ca++; end
        m_rst_n = resetnc_n;
      end
      #1;
      check(resetc_n == m_rst_n && resetc == !m_rst_n, "reset retiming");
      check(ie_n == m_ie_n, "interrupt enable");
      check(carry_a_n == m_ca_n, "address carry");
    end
    check(n_ca > 0, "carry loads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
