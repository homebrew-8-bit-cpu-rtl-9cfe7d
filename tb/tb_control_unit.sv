// tb_control_unit: fills the microcode ROMs for opcodes 00-03 with random
// microwords, then runs the control module with random flags, memory-bus
// opcodes and interrupt requests.  An independent model tracks opcode,
// phase, interrupt enable and address carry, forms the expected microcode
// address, and decodes the expected strobes from its own copy of the
// microword.  The phase restart on /LDOP, the interrupt substitution of
// opcode 0 and the last-quarter /WE are all checked.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_control_unit;
  import cpu_pkg::*;
  logic clk = 0, ce, q0 = 0, q1 = 0, resetnc_n, irq_n;
  logic cc_c_n, cc_n, cc_z_n, cc_v_n, alu_cout_n, resetc_n, ie_n;
  logic [7:0] mem_bus, opcode;
  logic [3:0] phase;
  logic [16:0] uaddr;
  ctrl_t ctrl;
  logic [23:0] rom [logic [16:0]];
  int checks = 0, failures = 0, n_irq = 0, n_ldop = 0;

  control_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin q0 <= ~q1; q1 <= q0; end
  assign ce = ~q0 & ~q1;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] m_op; logic [3:0] m_ph; logic m_rst_n, m_ie_n, m_ca_n;

  task automatic check_decode(uword_t w);
    logic ldmem;
    ldmem = w.load3 && w.load == 3'd0;
    check(ctrl.ld_a_n == !(w.load3 && w.load == 3'd5), "ld A");
    check(ctrl.ld_x_n == !(w.load3 && w.load == 3'd4), "ld X");
    check(ctrl.ld_y_n == !(w.load3 && w.load == 3'd3), "ld Y");
    check(ctrl.ld_t_n == !(w.load3 && w.load == 3'd2), "ld T");
    check(ctrl.ld_splo_n == !(w.load3 && w.load == 3'd1), "ld SPLO");
    check(ctrl.ld_mem_n == !ldmem, "ld MEM");
    check(ctrl.ld_sphi_n == !(!w.load3 && w.load == 3'd0), "ld SPHI");
    check(ctrl.ld_spbank_n == !(!w.load3 && w.load == 3'd1), "ld SPBANK");
    check(ctrl.ld_arlo_n == !(!w.load3 && w.load == 3'd2), "ld ARLO");
    check(ctrl.ld_arhi_n == !(!w.load3 && w.load == 3'd3), "ld ARHI");
    check(ctrl.ld_arbank_n == !(!w.load3 && w.load == 3'd4), "ld ARBANK");
    check(ctrl.ld_pclo_n == !(!w.load3 && w.load == 3'd5), "ld PCLO");
    check(ctrl.ld_pchi_n == !(!w.load3 && w.load == 3'd6), "ld PCHI");
    check(ctrl.ld_pcbank_n == !(!w.load3 && w.load == 3'd7), "ld PCBANK");
    check(ctrl.en_alu_a_n == !(w.lsel == 2'd3), "en A");
    check(ctrl.en_alu_y_n == !(w.lsel == 2'd2 && w.load3), "en Y");
    check(ctrl.en_alu_x7_n == !(w.lsel == 2'd2 && !w.load3), "en X7");
    check(ctrl.en_alu_x_n == !(w.lsel == 2'd1), "en X");
    check(ctrl.en_alu_0_n == !(w.lsel == 2'd0), "en 0");
    check(ctrl.en_alu_xorx7or0_n == !(w.lsel <= 2'd1 || (w.lsel == 2'd2 && !w.load3)),
          "en XORX7OR0");
    check(ctrl.en_alu_t_n == !(w.rsel == 2'd3), "en T");
    check(ctrl.en_alu_adrlo_n == !(w.rsel == 2'd2), "en ADRLO");
    check(ctrl.en_alu_adrhi_n == !(w.rsel == 2'd1), "en ADRHI");
    check(ctrl.en_alu_adrbank_n == !(w.rsel == 2'd0), "en ADRBANK");
    check(ctrl.cntpc_n == !(w.cntsel == 2'd2), "cnt PC");
    check(ctrl.cntar_n == !(w.cntsel == 2'd1), "cnt AR");
    check(ctrl.cntsp_n == w.cntsp_n && ctrl.spdir == w.spdir_iedata, "cnt SP");
    check(ctrl.adrsel_pc_n == !(w.asel == 2'd3), "adrsel PC");
    check(ctrl.adrsel_ar_n == !(w.asel == 2'd2), "adrsel AR");
    check(ctrl.adrsel_sp_n == !(w.asel == 2'd1), "adrsel SP");
    check(ctrl.dralu_n == w.dralu_n, "dralu");
    check(ctrl.en_membuf_n == !(w.dralu_n || ldmem), "membuf");
    check(ctrl.oe_mem_n == ldmem, "mem OE");
    check(ctrl.we_mem_n == !(ldmem && !q0 && !q1), "mem WE");
    check(ctrl.alu_func == w.alu_func && ctrl.alu_mode == w.alu_mode &&
          ctrl.alu_cin == w.alu_cin && ctrl.cc_s0 == w.cc_s0 &&
          ctrl.cc_s1 == w.cc_s1, "ALU fields");
  endtask

  initial begin
    uword_t w;
    logic [16:0] a;
    #1;
    for (int op = 0; op < 4; op++)
      for (int i = 0; i < 512; i++) begin
        a = {8'(op), 9'(i)};
        w = uword_t'(24'($urandom));
        if ($urandom_range(0, 3) == 0) w.ldop_n = 1'b0;
        rom[a] = w;
        dut.u_urom0.mem[a] = w[7:0];
        dut.u_urom1.mem[a] = w[15:8];
        dut.u_urom2.mem[a] = w[23:16];
      end
    resetnc_n = 0; irq_n = 1; mem_bus = 8'h01; alu_cout_n = 1;
    {cc_c_n, cc_n, cc_z_n, cc_v_n} = '0;
    repeat (3) begin @(posedge clk iff ce); end
    @(negedge clk);
    m_rst_n = 0; m_op = 8'h01; m_ph = 0; m_ie_n = 1; m_ca_n = dut.carry_a_n;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      // new inputs at the start of each CPU cycle
      resetnc_n = (cyc < 3) ? 1'b0 : ($urandom_range(0, 99) != 0);
      irq_n = $urandom_range(0, 3) != 0; mem_bus = 8'($urandom_range(0, 3));
      alu_cout_n = $urandom_range(0, 1);
      {cc_c_n, cc_n, cc_z_n, cc_v_n} = 4'($urandom);
      for (int qtr = 0; qtr < 4; qtr++) begin
        #1;
        a = {m_op, m_ph, cc_v_n, cc_z_n, cc_n, cc_c_n, m_ca_n};
        check(uaddr == a, $sformatf("microcode address %h expected %h", uaddr, a));
        check(opcode == m_op && phase == m_ph, "opcode and phase");
        check(ie_n == m_ie_n && resetc_n == m_rst_n, "IE and reset");
        if (rom.exists(a)) check_decode(rom[a]);
        @(negedge clk);
      end
      // the edge just passed was Q0's rising edge: update the model
      w = rom.exists(a) ? rom[a] : uword_t'(24'hFFFFFF);
      if (!m_rst_n) begin m_op = mem_bus; m_ph = 0; m_ie_n = 1; end
      else begin
        if (!w.ldop_n) begin
          n_ldop++;
          if (!irq_n && !m_ie_n) begin m_op = 8'h00; n_irq++; end else m_op = mem_bus;
          m_ph = 0;
        end else m_ph = m_ph + 1;
        if (w.cntsel == CNT_LD_IE) m_ie_n = w.spdir_iedata;
      end
      if (w.lsel == LSEL_YORX7 && !w.load3) m_ca_n = alu_cout_n;
      m_rst_n = resetnc_n;
    end
    check(n_irq > 0 && n_ldop > 0, "interrupt entries and opcode loads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
