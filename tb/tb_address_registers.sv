// tb_address_registers: random byte loads, 24-bit counts and address-bus
// selections of PC, AR and SP against 24-bit integer models.  Values near
// byte boundaries are loaded often so that counts carry and borrow across
// bytes.  The PC must reset to 0 and drive the bus during reset.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_address_registers;
  import cpu_pkg::*;
  logic clk = 0, ce, resetc_n;
  logic [7:0] databus;
  logic [23:0] adrbus, pc, ar, sp, mpc, mar, msp, eadr;
  ctrl_t ctrl;
  int checks = 0, failures = 0, n_cross = 0;

  address_registers dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ld, sel;
    ctrl = '1; ce = 1; resetc_n = 0; databus = 0;
    @(posedge clk); #1; mpc = 0;
    // initialise AR and SP bytes
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); ctrl = '1; resetc_n = 1; databus = 8'hFF;
      case (k)
        0: ctrl.ld_arlo_n = 0; 1: ctrl.ld_arhi_n = 0; 2: ctrl.ld_arbank_n = 0;
        3: ctrl.ld_splo_n = 0; 4: ctrl.ld_sphi_n = 0; default: ctrl.ld_spbank_n = 0;
      endcase
      @(posedge clk);
    end
    #1; mar = 24'hFFFFFF; msp = 24'hFFFFFF;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      ctrl = '1; ce = $urandom_range(0, 3) != 0;
      resetc_n = $urandom_range(0, 63) != 0;
      databus = ($urandom_range(0, 1)) ? (($urandom_range(0, 1)) ? 8'hFF : 8'h00) : 8'($urandom);
      ld = $urandom_range(0, 15);
      case (ld)
        0: ctrl.ld_pclo_n = 0; 1: ctrl.ld_pchi_n = 0; 2: ctrl.ld_pcbank_n = 0;
        3: ctrl.ld_arlo_n = 0; 4: ctrl.ld_arhi_n = 0; 5: ctrl.ld_arbank_n = 0;
        6: ctrl.ld_splo_n = 0; 7: ctrl.ld_sphi_n = 0; 8: ctrl.ld_spbank_n = 0;
        default: ;
      endcase
      case ($urandom_range(0, 2)) 0: ctrl.cntpc_n = 0; 1: ctrl.cntar_n = 0; default: ; endcase
      ctrl.cntsp_n = $urandom_range(0, 1); ctrl.spdir = $urandom_range(0, 1);
      sel = $urandom_range(0, 3);
      case (sel) 0: ctrl.adrsel_pc_n = 0; 1: ctrl.adrsel_ar_n = 0; 2: ctrl.adrsel_sp_n = 0; default: ; endcase
      if (!resetc_n && sel != 0) begin ctrl.adrsel_ar_n = 1; ctrl.adrsel_sp_n = 1; sel = 0; end
      #1;
      eadr = (sel == 0 || !resetc_n) ? mpc : (sel == 1) ? mar : (sel == 2) ? msp : 24'd0;
      check(adrbus == eadr, $sformatf("address bus sel %0d: %h expected %h", sel, adrbus, eadr));
      @(posedge clk);
      if (ce) begin
        // PC: reset, per-byte load, count with byte carries
        if (!resetc_n) mpc = 0;
        else begin
          logic [23:0] nx; nx = mpc + ((!ctrl.cntpc_n) ? 24'd1 : 24'd0);
          if (nx[23:8] != mpc[23:8]) n_cross++;
          if (!ctrl.ld_pclo_n) nx[7:0] = databus;
          if (!ctrl.ld_pchi_n) nx[15:8] = databus;
          if (!ctrl.ld_pcbank_n) nx[23:16] = databus;
          // a loaded byte takes the data; carries come from the old value,
          // since a PC/AR byte's carry out does not depend on its load
          mpc = nx;
        end
        begin
          logic [23:0] nx; nx = mar + ((!ctrl.cntar_n) ? 24'd1 : 24'd0);
          if (!ctrl.ld_arlo_n) nx[7:0] = databus;
          if (!ctrl.ld_arhi_n) nx[15:8] = databus;
          if (!ctrl.ld_arbank_n) nx[23:16] = databus;
          mar = nx;
        end
        begin
          logic [23:0] nx; logic c0, c1;
          // SP byte carries are suppressed by a load of the lower byte
          c0 = !ctrl.cntsp_n && ctrl.ld_splo_n && (ctrl.spdir ? msp[7:0] == 8'hFF : msp[7:0] == 8'h00);
          c1 = c0 && ctrl.ld_sphi_n && (ctrl.spdir ? msp[15:8] == 8'hFF : msp[15:8] == 8'h00);
          nx = msp;
          if (!ctrl.ld_splo_n) nx[7:0] = databus;
          else if (!ctrl.cntsp_n) nx[7:0] = ctrl.spdir ? msp[7:0] + 1 : msp[7:0] - 1;
          if (!ctrl.ld_sphi_n) nx[15:8] = databus;
          else if (c0) nx[15:8] = ctrl.spdir ? msp[15:8] + 1 : msp[15:8] - 1;
          if (!ctrl.ld_spbank_n) nx[23:16] = databus;
          else if (c1) nx[23:16] = ctrl.spdir ? msp[23:16] + 1 : msp[23:16] - 1;
          msp = nx;
        end
      end
      #1;
      check(pc == mpc, $sformatf("PC %h expected %h", pc, mpc));
      check(ar == mar, $sformatf("AR %h expected %h", ar, mar));
      check(sp == msp, $sformatf("SP %h expected %h", sp, msp));
      // resynchronise the models after a mismatch so one error is reported once
      mpc = pc; mar = ar; msp = sp;
    end
    check(n_cross > 0, "PC carry across bytes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
