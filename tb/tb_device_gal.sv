// tb_device_gal: random test of the device GAL: LCD latch gate, LCD_RUN and
// RS one cycle later, E high in quarters 2-4 of the run cycle, USB WR and
// /RD in the last quarter only, the status read, and /IRQ retiming.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_device_gal;
  logic clk = 0, ce, q0, q1, ld_mem_n, hwsel_usb_n, hwsel_lcd_n, a0;
  logic usb_txf_n, usb_rxf_n, usb_pen_n;
  logic lcd_rs, lcd_run, lcdin_g_n, lcd_e, irq_n, status_oe, usb_wr, usb_rd_n;
  logic [2:0] status;
  logic m_run, m_rs, m_irq;
  int checks = 0, failures = 0, n_lcd = 0, n_wr = 0, n_rd = 0;

  device_gal dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ce = 1; {q0, q1} = 0; ld_mem_n = 0; hwsel_usb_n = 1; hwsel_lcd_n = 0; a0 = 0;
    {usb_txf_n, usb_rxf_n, usb_pen_n} = '1;
    @(posedge clk); #1; m_run = 1; m_rs = 1; m_irq = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 1);
      {q0, q1, ld_mem_n, hwsel_usb_n, hwsel_lcd_n, a0, usb_txf_n, usb_rxf_n,
       usb_pen_n} = 9'($urandom);
      #1;
      check(lcdin_g_n == !(!hwsel_lcd_n && !ld_mem_n), "LCD latch gate");
      check(lcd_e == (m_run && (!q0 || q1)), "LCD E timing");
      check(usb_wr == (!hwsel_usb_n && !a0 && !ld_mem_n && !q0 && !q1), "USB WR");
      check(usb_rd_n == !(!hwsel_usb_n && !a0 && ld_mem_n && !q0 && !q1), "USB RD");
      check(status_oe == (!hwsel_usb_n && a0 && ld_mem_n), "status enable");
      check(status == {usb_pen_n, usb_txf_n, usb_rxf_n}, "status bits");
      if (usb_wr) n_wr++;
      if (!usb_rd_n) n_rd++;
      @(posedge clk);
      if (ce) begin
        if (!hwsel_lcd_n && !ld_mem_n) begin m_rs = !a0; n_lcd++; end
        m_run = !hwsel_lcd_n && !ld_mem_n;
        m_irq = usb_rxf_n;
      end
      #1;
      check(lcd_run == m_run && lcd_rs == m_rs && irq_n == m_irq, "registered outputs");
    end
    check(n_lcd > 0 && n_wr > 0 && n_rd > 0, "LCD and USB strobes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
