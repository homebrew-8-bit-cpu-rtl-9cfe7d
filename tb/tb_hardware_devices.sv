// tb_hardware_devices: bus-level test of the LCD and USB interface with a
// four-quarter clock.  LCD stores must appear on the LCD data pins with the
// right RS and one E pulse whose falling edge is at the end of the next
// cycle; USB stores must give one WR pulse with the data; USB loads must
// pulse /RD and return the module's byte; status loads return /PEN, /TXF,
// /RXF; /IRQ follows /RXF one cycle later.
//
// Expected values come from the behaviour the source design specifies (its
// equations or the part's data-sheet function), computed here independently
// of the module under test; the stimulus is this bench's own.
module tb_hardware_devices;
  logic clk = 0, ce, q0 = 0, q1 = 0, ld_mem_n, hwsel_usb_n, hwsel_lcd_n, a0;
  logic [7:0] mem_bus, dev_d, lcd_d, usb_d_i, usb_d_o;
  logic dev_oe, irq_n, lcd_rs, lcd_e, usb_wr, usb_rd_n;
  logic usb_txf_n, usb_rxf_n, usb_pen_n;
  logic [8:0] lcd_seen [$];
  logic [7:0] usb_seen [$];
  int checks = 0, failures = 0;

  hardware_devices dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin q0 <= ~q1; q1 <= q0; end
  assign ce = ~q0 & ~q1;
  always @(negedge lcd_e) lcd_seen.push_back({lcd_rs, lcd_d});
  always @(posedge clk) if (usb_wr) usb_seen.push_back(usb_d_o);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one CPU cycle, starting just after Q0 rises
  task automatic cycle(bit lcd, bit usb, bit store, bit addr0, logic [7:0] d);
    int rd = 0; logic [7:0] got = 0; bit gotv = 0;
    hwsel_lcd_n = !lcd; hwsel_usb_n = !usb; ld_mem_n = !store; a0 = addr0;
    mem_bus = d;
    for (int k = 0; k < 4; k++) begin
      #1;
      if (!usb_rd_n) begin rd++; got = dev_d; gotv = dev_oe; end
      @(posedge clk);
    end
    if (usb && !store && !addr0) begin
      check(rd == 1 && gotv && got == usb_d_i, "USB read: one /RD quarter and data");
    end
    if (usb && !store && addr0) begin
      check(dev_oe && dev_d == {5'd0, usb_pen_n, usb_txf_n, usb_rxf_n}, "USB status");
    end
    if (!(usb && !store)) check(!dev_oe, "no device drive");
  endtask

  initial begin
    usb_d_i = 8'h3C; {usb_txf_n, usb_rxf_n, usb_pen_n} = 3'b011;
    hwsel_lcd_n = 1; hwsel_usb_n = 1; ld_mem_n = 1; a0 = 0; mem_bus = 0;
    @(posedge clk iff ce); @(posedge clk);
    repeat (2) cycle(0, 0, 0, 0, 8'h00);
    lcd_seen.delete();
    cycle(1, 0, 1, 0, 8'h41);          // LCD data 'A'
    cycle(0, 0, 0, 0, 8'h00);
    cycle(1, 0, 1, 1, 8'h38);          // LCD command
    cycle(0, 0, 0, 0, 8'h00);
    cycle(0, 1, 1, 0, 8'h5A);          // USB write
    cycle(0, 1, 0, 0, 8'h00);          // USB read
    cycle(0, 1, 0, 1, 8'h00);          // USB status
    usb_rxf_n = 0;
    cycle(0, 0, 0, 0, 8'h00);
    check(irq_n == 0, "IRQ follows RXF");
    usb_rxf_n = 1;
    cycle(0, 0, 0, 0, 8'h00);
    check(irq_n == 1, "IRQ released");
    check(lcd_seen.size() == 2, "two LCD strobes");
    if (lcd_seen.size() == 2) begin
      check(lcd_seen[0] == {1'b1, 8'h41}, "LCD data write, RS = 1");
      check(lcd_seen[1] == {1'b0, 8'h38}, "LCD command write, RS = 0");
    end
    check(usb_seen.size() == 1 && usb_seen[0] == 8'h5A, "one USB WR with data");

    // Random phase: mixed LCD / USB / idle cycles with random data, address
    // bit 0 and USB flags.  LCD stores are kept at least one cycle apart,
    // as the display needs (its E pulse falls when the next latch loads).
    begin
      logic [8:0] exp_lcd [$];
      logic [7:0] exp_usb [$];
      bit last_lcd = 0;
      lcd_seen.delete(); usb_seen.delete();
      for (int i = 0; i < 600; i++) begin
        int sel; bit st, ad; logic [7:0] d;
        sel = $urandom_range(0, 2); st = $urandom_range(0, 1);
        ad = $urandom_range(0, 1); d = 8'($urandom);
        if (sel == 1 && st && last_lcd) st = 0;
        usb_d_i = 8'($urandom);
        {usb_txf_n, usb_rxf_n, usb_pen_n} = 3'($urandom);
        cycle(sel == 1, sel == 2, st, ad, d);
        check(irq_n == usb_rxf_n, "IRQ is RXF registered at the cycle edge");
        if (sel == 1 && st) exp_lcd.push_back({~ad, d});
        if (sel == 2 && st && !ad) exp_usb.push_back(d);
        last_lcd = (sel == 1 && st);
      end
      cycle(0, 0, 0, 0, 8'h00);
      cycle(0, 0, 0, 0, 8'h00);
      check(lcd_seen.size() == exp_lcd.size(), "random: LCD strobe count");
      foreach (exp_lcd[i])
        if (i < lcd_seen.size()) check(lcd_seen[i] == exp_lcd[i], "random: LCD RS and data");
      check(usb_seen.size() == exp_usb.size(), "random: USB WR count");
      foreach (exp_usb[i])
        if (i < usb_seen.size()) check(usb_seen[i] == exp_usb[i], "random: USB WR data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
