// device_gal: USB module interface, LCD interface and interrupt request,
// one GAL22V10.
//
// LCD (write only): a write to the LCD slot opens the LCD data latch
// (/LCDIN_G) for one cycle and, on the next Q0 edge, sets LCD_RUN for one
// cycle and RS = NOT A0 (A0 = 0: data, A0 = 1: command).  During that next
// cycle E is high from the second quarter to the end, so the display
// samples the latched byte on E's falling edge.  The busy flag cannot be
// read; software must wait out each LCD operation.
// USB module: WR (active high) and /RD pulse in the last quarter of a cycle
// that writes or reads offset 0 of the USB slot.  Reading offset 1 returns
// a status byte: bit 2 = /PEN, bit 1 = /TXF, bit 0 = /RXF (modelled as a
// 3-bit value with an active-high enable).
// Interrupt: /IRQ is /RXF retimed to a cycle boundary, so received USB data
// interrupts the CPU.  Equations follow the source design.
module device_gal (
  input  logic       clk,
  input  logic       ce,
  input  logic       q0,
  input  logic       q1,
  input  logic       ld_mem_n,
  input  logic       hwsel_usb_n,
  input  logic       hwsel_lcd_n,
  input  logic       a0,
  input  logic       usb_txf_n,
  input  logic       usb_rxf_n,
  input  logic       usb_pen_n,
  output logic       lcd_rs,
  output logic       lcd_run,
  output logic       lcdin_g_n,
  output logic       lcd_e,
  output logic       irq_n,
  output logic [2:0] status,
  output logic       status_oe,
  output logic       usb_wr,
  output logic       usb_rd_n
);
  assign lcdin_g_n = ~(~hwsel_lcd_n & ~ld_mem_n);

  always_ff @(posedge clk) begin
    if (ce) begin
      lcd_run <= ~lcdin_g_n;
      if (!lcdin_g_n) lcd_rs <= ~a0;
      irq_n   <= usb_rxf_n;
    end
  end

  assign lcd_e     = lcd_run & (~q0 | q1);
  assign usb_wr    = ~hwsel_usb_n & ~a0 & ~ld_mem_n & ~q0 & ~q1;
  assign usb_rd_n  = ~(~hwsel_usb_n & ~a0 & ld_mem_n & ~q0 & ~q1);
  assign status_oe = ~hwsel_usb_n & a0 & ld_mem_n;
  assign status    = {usb_pen_n, usb_txf_n, usb_rxf_n};
endmodule
