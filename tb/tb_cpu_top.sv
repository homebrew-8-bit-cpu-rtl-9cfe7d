// tb_cpu_top: end-to-end test of the whole CPU at its default sizes.
//
// The board's microcode and boot ROM contents are not part of the RTL, so
// this bench writes a small test instruction set into the three microcode
// ROMs and a test program into the boot ROM, then runs the program from
// reset.  Instructions (opcode, bytes, phases):
//   00 interrupt entry (disable interrupts)      01/02/03 LDA/LDT/LDX #imm
//   05 ADD A+T / 06 SUB A-T (set flags)          07 LDAR imm24
//   08 STA (AR)    09 LDA (AR) then AR+1         0A LDSP imm24
//   0B PHA (store at SP, SP+1)  0C PLA (SP-1, load)
//   0D JZ abs16 (branch on the Z flag, by flag-addressed microcode)
//   0E EI  10 AR += sign-extended X (X, X7, stored carries)
//   11 NOP  13 flags shift right then left  14 HALT
// Every instruction increments PC in phase 0 and ends with a /LDOP word.
// The bench models the USB module (FIFO flags, one received byte) and
// records LCD strobes.  It checks the sequence of values loaded into A,
// memory contents, LCD/USB transfers, the final register state, and that
// each mechanism (branch taken / not taken, PC load, RAM read / write, AR
// count, SP up / down with carry across bytes, X7 operand, address carry,
// flag load / shifts, interrupt entry, IE load, LCD, USB read / write /
// status) happened at least once.
//
// The hardware under test follows the source design; the test instruction
// set, microcode and program are this bench's own, since the original
// machine's are not part of the design.
module tb_cpu_top;
  import cpu_pkg::*;

  logic clk = 0, reset_btn_n = 0;
  logic [7:0] usb_d_i, usb_d_o, lcd_d, mem_bus;
  logic usb_wr, usb_rd_n, usb_txf_n, usb_rxf_n, usb_pen_n, lcd_rs, lcd_e;
  logic [23:0] adrbus;
  logic oe_mem_n, we_mem_n, ram2_cs_n, ram3_cs_n;

  cpu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- microcode construction ----------------
  function automatic uword_t idle();
    uword_t w;
    w = '0;
    w.lsel = LSEL_ZERO; w.rsel = RSEL_T; w.load3 = 1'b1; w.load = L1_NONE;
    w.alu_func = 4'h0; w.alu_mode = 1'b0; w.alu_cin = 1'b1;
    w.cc_s0 = 1'b0; w.cc_s1 = 1'b0; w.cntsel = CNT_NONE; w.asel = ASEL_PC;
    w.cntsp_n = 1'b1; w.spdir_iedata = 1'b0; w.dralu_n = 1'b1; w.ldop_n = 1'b1;
    return w;
  endfunction

  function automatic uword_t fetch();
    uword_t w = idle();
    w.ldop_n = 1'b0;
    return w;
  endfunction

  function automatic uword_t incpc(uword_t w);
    w.cntsel = CNT_PC;
    return w;
  endfunction

  // load data destination (load3 = 1 bank) or address destination (bank 0)
  function automatic uword_t dst1(uword_t w, logic [2:0] d);
    w.load3 = 1'b1; w.load = d; return w;
  endfunction
  function automatic uword_t dst0(uword_t w, logic [2:0] d);
    w.load3 = 1'b0; w.load = d; return w;
  endfunction

  function automatic uword_t alu_op(uword_t w, lsel_e l, rsel_e r,
                                    logic [3:0] s, logic m, logic cin);
    w.lsel = l; w.rsel = r; w.alu_func = s; w.alu_mode = m; w.alu_cin = cin;
    w.dralu_n = 1'b0;
    return w;
  endfunction

  // write one microword for all 32 flag combinations
  task automatic put(logic [7:0] op, int ph, uword_t w);
    for (int f = 0; f < 32; f++) put_f(op, ph, f, w);
  endtask
  task automatic put_f(logic [7:0] op, int ph, int f, uword_t w);
    logic [16:0] a;
    a = {op, 4'(ph), 5'(f)};
    dut.u_ctrl.u_urom0.mem[a] = w[7:0];
    dut.u_ctrl.u_urom1.mem[a] = w[15:8];
    dut.u_ctrl.u_urom2.mem[a] = w[23:16];
  endtask

  task automatic load_imm(logic [7:0] op, logic [2:0] d);
    uword_t w;
    put(op, 0, incpc(idle()));
    w = incpc(dst1(idle(), d));
    put(op, 1, w);
    put(op, 2, fetch());
  endtask

  task automatic build_microcode();
    uword_t w;
    // 00: interrupt entry: disable interrupts, then fetch (PC unchanged)
    w = idle(); w.cntsel = CNT_LD_IE; w.spdir_iedata = 1'b1;
    put(8'h00, 0, w); put(8'h00, 1, fetch());
    load_imm(8'h01, L1_A);
    load_imm(8'h02, L1_T);
    load_imm(8'h03, L1_X);
    // 05 ADD, 06 SUB
    w = incpc(dst1(alu_op(idle(), LSEL_A, RSEL_T, 4'b1001, 1'b0, 1'b1), L1_A));
    w.cc_s0 = 1; w.cc_s1 = 1;
    put(8'h05, 0, w); put(8'h05, 1, fetch());
    w = incpc(dst1(alu_op(idle(), LSEL_A, RSEL_T, 4'b0110, 1'b0, 1'b0), L1_A));
    w.cc_s0 = 1; w.cc_s1 = 1;
    put(8'h06, 0, w); put(8'h06, 1, fetch());
    // 07 LDAR imm24, 0A LDSP imm24
    put(8'h07, 0, incpc(idle()));
    put(8'h07, 1, incpc(dst0(idle(), L0_ARLO)));
    put(8'h07, 2, incpc(dst0(idle(), L0_ARHI)));
    put(8'h07, 3, incpc(dst0(idle(), L0_ARBANK)));
    put(8'h07, 4, fetch());
    put(8'h0A, 0, incpc(idle()));
    put(8'h0A, 1, incpc(dst1(idle(), L1_SPLO)));
    put(8'h0A, 2, incpc(dst0(idle(), L0_SPHI)));
    put(8'h0A, 3, incpc(dst0(idle(), L0_SPBANK)));
    put(8'h0A, 4, fetch());
    // 08 STA (AR): F = A (logic mode, S = 1111)
    put(8'h08, 0, incpc(idle()));
    w = dst1(alu_op(idle(), LSEL_A, RSEL_T, 4'b1111, 1'b1, 1'b1), L1_MEM);
    w.asel = ASEL_AR;
    put(8'h08, 1, w); put(8'h08, 2, fetch());
    // 09 LDA (AR)+
    put(8'h09, 0, incpc(idle()));
    w = dst1(idle(), L1_A); w.asel = ASEL_AR; w.cntsel = CNT_AR;
    put(8'h09, 1, w); put(8'h09, 2, fetch());
    // 0B PHA
    put(8'h0B, 0, incpc(idle()));
    w = dst1(alu_op(idle(), LSEL_A, RSEL_T, 4'b1111, 1'b1, 1'b1), L1_MEM);
    w.asel = ASEL_SP; w.cntsp_n = 1'b0; w.spdir_iedata = 1'b1;
    put(8'h0B, 1, w); put(8'h0B, 2, fetch());
    // 0C PLA
    w = incpc(idle()); w.cntsp_n = 1'b0; w.spdir_iedata = 1'b0;
    put(8'h0C, 0, w);
    w = dst1(idle(), L1_A); w.asel = ASEL_SP;
    put(8'h0C, 1, w); put(8'h0C, 2, fetch());
    // 0D JZ abs16: flag index bit 3 is /Z
    put(8'h0D, 0, incpc(idle()));
    for (int f = 0; f < 32; f++) begin
      if (f[3] == 1'b0) begin   // zero: take the branch
        put_f(8'h0D, 1, f, incpc(dst1(idle(), L1_T)));
        put_f(8'h0D, 2, f, dst0(idle(), L0_PCHI));
        put_f(8'h0D, 3, f, dst0(alu_op(idle(), LSEL_ZERO, RSEL_T, 4'b1010,
                                       1'b1, 1'b1), L0_PCLO));
        put_f(8'h0D, 4, f, fetch());
      end else begin
        put_f(8'h0D, 1, f, incpc(idle()));
        put_f(8'h0D, 2, f, incpc(idle()));
        put_f(8'h0D, 3, f, fetch());
      end
    end
    // 0E EI
    put(8'h0E, 0, incpc(idle()));
    w = idle(); w.cntsel = CNT_LD_IE; w.spdir_iedata = 1'b0;
    put(8'h0E, 1, w); put(8'h0E, 2, fetch());
    // 10 AR += sign-extended X.  Flag index bit 1 is /C, bit 0 /CARRY_A.
    put(8'h10, 0, incpc(idle()));
    w = dst0(alu_op(idle(), LSEL_X, RSEL_ADRLO, 4'b1001, 1'b0, 1'b1), L0_ARLO);
    w.asel = ASEL_AR; w.cc_s0 = 1; w.cc_s1 = 1;
    put(8'h10, 1, w);
    for (int f = 0; f < 32; f++) begin
      w = dst0(alu_op(idle(), LSEL_YORX7, RSEL_ADRHI, 4'b1001, 1'b0, f[1]),
               L0_ARHI);
      w.asel = ASEL_AR;
      put_f(8'h10, 2, f, w);
      w = dst0(alu_op(idle(), LSEL_YORX7, RSEL_ADRBANK, 4'b1001, 1'b0, f[0]),
               L0_ARBANK);
      w.asel = ASEL_AR;
      put_f(8'h10, 3, f, w);
    end
    put(8'h10, 4, fetch());
    // 11 NOP
    put(8'h11, 0, incpc(idle())); put(8'h11, 1, fetch());
    // 13 flags shift right, then left
    w = incpc(idle()); w.cc_s1 = 1; w.cc_s0 = 0;
    put(8'h13, 0, w);
    w = idle(); w.cc_s1 = 0; w.cc_s0 = 1;
    put(8'h13, 1, w); put(8'h13, 2, fetch());
    // 14 HALT: fetch itself again forever
    put(8'h14, 0, fetch());
  endtask

  // ---------------- boot program ----------------
  logic [7:0] prog [$];
  task automatic emit(input logic [7:0] b[$]);
    foreach (b[i]) prog.push_back(b[i]);
  endtask
  task automatic build_program();
    emit('{8'h01, 8'h05, 8'h02, 8'h03, 8'h05, 8'h06});       // 0000
    emit('{8'h0D, 8'h00, 8'h00});                             // 0006 JZ not taken
    emit('{8'h02, 8'h05, 8'h06});                             // 0009
    emit('{8'h0D, 8'h20, 8'h00});                             // 000C JZ taken
    emit('{8'h14});                                           // 000F
    while (prog.size() < 'h20) prog.push_back(8'h14);
    emit('{8'h07, 8'h00, 8'h40, 8'h00});                      // 0020 LDAR 004000
    emit('{8'h01, 8'hA5, 8'h08, 8'h01, 8'h00, 8'h09});        // 0024
    emit('{8'h03, 8'hFF, 8'h10});                             // 002A X=FF, AR+=X
    emit('{8'h01, 8'h00, 8'h09});                             // 002D
    emit('{8'h0A, 8'hFF, 8'h00, 8'h08});                      // 0030 LDSP 0800FF
    emit('{8'h0B, 8'h01, 8'h00, 8'h0C});                      // 0034 PHA, A=0, PLA
    emit('{8'h07, 8'h00, 8'h3F, 8'h00, 8'h01, 8'h48, 8'h08}); // 0038 LCD data 'H'
    emit('{8'h07, 8'h01, 8'h3F, 8'h00, 8'h01, 8'h01, 8'h08}); // 003F LCD cmd 01
    emit('{8'h07, 8'h10, 8'h3F, 8'h00, 8'h08});               // 0046 USB write 01
    emit('{8'h07, 8'h11, 8'h3F, 8'h00, 8'h09});               // 004B USB status
    emit('{8'h13, 8'h0E});                                    // 0050 shifts, EI
    repeat (8) prog.push_back(8'h11);                         // 0052 NOPs
    emit('{8'h07, 8'h10, 8'h3F, 8'h00, 8'h09, 8'h14});        // 005A USB read, HALT
    foreach (prog[i]) dut.u_mem.u_bootrom.mem[i] = prog[i];
  endtask

  // ---------------- USB module model ----------------
  logic [7:0] usb_written [$];
  int usb_reads = 0;
  bit ei_seen = 1'b0;
  initial begin
    usb_d_i = 8'h77; usb_txf_n = 1'b0; usb_rxf_n = 1'b1; usb_pen_n = 1'b1;
  end
  always @(posedge clk) begin
    if (usb_wr) usb_written.push_back(usb_d_o);
    if (!usb_rd_n) begin usb_reads++; usb_rxf_n <= 1'b1; end
    // received data arrives once interrupts have been enabled
    if (dut.opcode == 8'h0E && reset_btn_n && usb_reads == 0) ei_seen = 1'b1;
    if (ei_seen && !dut.ie_n && usb_reads == 0) usb_rxf_n <= 1'b0;
  end

  // ---------------- LCD capture ----------------
  logic [8:0] lcd_log [$];
  always @(negedge lcd_e) if (reset_btn_n) lcd_log.push_back({lcd_rs, lcd_d});

  // ---------------- observation ----------------
  logic [7:0] a_log [$];
  int n_branch_taken, n_branch_not, n_pc_load, n_ram_wr, n_ram_rd, n_ar_cnt;
  int n_sp_up, n_sp_down, n_sp_carry, n_x7, n_carry_a, n_cc_load, n_cc_shl;
  int n_cc_shr, n_irq, n_ie_load, n_usb_status, n_pc_cnt, n_reset_fetch;
  logic [23:0] sp_before;

  always @(posedge clk) begin
    if (dut.ce) begin
      if (!dut.resetc_n) n_reset_fetch++;
      else begin
        if (!dut.ctrl.ld_a_n) a_log.push_back(dut.databus);
        if (dut.opcode == 8'h0D && dut.phase == 1)
          if (dut.cc_z_n) n_branch_not++; else n_branch_taken++;
        if (!dut.ctrl.ld_pclo_n || !dut.ctrl.ld_pchi_n) n_pc_load++;
        if (!dut.ctrl.cntpc_n) n_pc_cnt++;
        if (!dut.ctrl.we_mem_n) ;
        if (!dut.ctrl.ld_mem_n && (!dut.u_mem.ram0_cs_n || !dut.u_mem.ram1_cs_n))
          n_ram_wr++;
        if (dut.u_mem.ram0_oe || dut.u_mem.ram1_oe) n_ram_rd++;
        if (!dut.ctrl.cntar_n) n_ar_cnt++;
        if (!dut.ctrl.cntsp_n &&  dut.ctrl.spdir) n_sp_up++;
        if (!dut.ctrl.cntsp_n && !dut.ctrl.spdir) n_sp_down++;
        if (!dut.ctrl.cntsp_n && !dut.u_aregs.splo_co_n) n_sp_carry++;
        if (!dut.ctrl.en_alu_x7_n) n_x7++;
        if (!dut.ctrl.en_alu_x7_n && !dut.u_ctrl.u_cgal.load3) n_carry_a++;
        if (dut.ctrl.cc_s1 &&  dut.ctrl.cc_s0) n_cc_load++;
        if (!dut.ctrl.cc_s1 && dut.ctrl.cc_s0) n_cc_shl++;
        if (dut.ctrl.cc_s1 && !dut.ctrl.cc_s0) n_cc_shr++;
        if (!dut.u_ctrl.uw.ldop_n && !dut.irq_n && !dut.ie_n) n_irq++;
        if (dut.u_ctrl.uw.cntsel == CNT_LD_IE) n_ie_load++;
        if (dut.u_dev.status_oe) n_usb_status++;
      end
    end
  end

  // expected values loaded into A, in order
  logic [7:0] a_exp [$] = '{8'h05, 8'h08, 8'h05, 8'h00, 8'hA5, 8'h00, 8'hA5,
                             8'h00, 8'hA5, 8'h00, 8'hA5, 8'h48, 8'h01,
                             8'h05, 8'h77};

  int cycles = 0;
  initial begin
    #1;
    build_microcode();
    build_program();
    repeat (40) @(posedge clk);
    reset_btn_n = 1'b1;
    // run until HALT at 005F is fetched (PC holds there) or time out
    while (!(dut.opcode == 8'h14 && dut.pc == 24'h00005F && dut.resetc_n)
           && cycles < 4000) begin
      @(posedge clk); if (dut.ce) cycles++;
    end
    repeat (16) @(posedge clk);
    $display("program ran %0d CPU cycles", cycles);
    check(dut.opcode == 8'h14 && dut.pc == 24'h00005F, "program reached HALT at 005F");
    check(a_log.size() == a_exp.size(), $sformatf("A loaded %0d times, expected %0d",
          a_log.size(), a_exp.size()));
    foreach (a_exp[i])
      if (i < a_log.size())
        check(a_log[i] == a_exp[i], $sformatf("A load %0d: %02h expected %02h",
              i, a_log[i], a_exp[i]));
    check(dut.reg_a == 8'h77, "final A");
    check(dut.reg_x == 8'hFF, "final X");
    check(dut.reg_t == 8'h20, "final T (branch target low byte)");
    check(dut.ar == 24'h003F11, "final AR");
    check(dut.sp == 24'h0800FF, "final SP");
    check(dut.u_mem.u_ram0.mem[19'h04000] == 8'hA5, "RAM0 store");
    check(dut.u_mem.u_ram1.mem[19'h000FF] == 8'hA5, "RAM1 push");
    check(lcd_log.size() == 2, "two LCD strobes");
    if (lcd_log.size() == 2) begin
      check(lcd_log[0] == {1'b1, 8'h48}, "LCD data write");
      check(lcd_log[1] == {1'b0, 8'h01}, "LCD command write");
    end
    check(usb_written.size() == 1 && usb_written[0] == 8'h01, "USB write");
    check(usb_reads == 1, "one USB read strobe cycle");
    check(dut.ie_n == 1'b1, "interrupts disabled by the interrupt entry");
    check(dut.cc_c_n == 1'b0 && dut.cc_z_n == 1'b0 && dut.cc_n == 1'b0
          && dut.cc_v_n == 1'b1, "flags after shift right/left");
    // mechanisms
    check(n_reset_fetch > 0, "reset");
    check(n_branch_taken > 0, "branch taken");
    check(n_branch_not > 0, "branch not taken");
    check(n_pc_load > 0, "PC load");
    check(n_pc_cnt > 0, "PC count");
    check(n_ram_wr == 2, "RAM writes");
    check(n_ram_rd > 0, "RAM reads");
    check(n_ar_cnt == 4, "AR count");
    check(n_sp_up == 1 && n_sp_down == 1, "SP up and down");
    check(n_sp_carry == 2, "SP carry/borrow across bytes");
    check(n_x7 == 2, "X7 operand");
    check(n_carry_a == 2, "address carry stored");
    check(n_cc_load > 0 && n_cc_shl > 0 && n_cc_shr > 0, "flag load and shifts");
    check(n_irq == 1, "interrupt entry");
    check(n_ie_load == 2, "IE loads");
    check(n_usb_status > 0, "USB status read");
    $display("mechanisms: reset=%0d br_taken=%0d br_not=%0d pc_load=%0d ram_wr=%0d ram_rd=%0d ar_cnt=%0d sp_up=%0d sp_down=%0d sp_carry=%0d x7=%0d carry_a=%0d cc_load=%0d shl=%0d shr=%0d irq=%0d ie_load=%0d lcd=%0d usb_wr=%0d usb_rd=%0d usb_status=%0d",
      n_reset_fetch, n_branch_taken, n_branch_not, n_pc_load, n_ram_wr, n_ram_rd,
      n_ar_cnt, n_sp_up, n_sp_down, n_sp_carry, n_x7, n_carry_a, n_cc_load,
      n_cc_shl, n_cc_shr, n_irq, n_ie_load, lcd_log.size(), usb_written.size(),
      usb_reads, n_usb_status);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
