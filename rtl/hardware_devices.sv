// hardware_devices: LCD and USB module interface.
//
// The device GAL decodes accesses to the two device slots.  The LCD is
// write-only: a store to the LCD slot latches the memory-bus byte in a
// 74LS377 (LCDIN) and the GAL strobes the display's E line during the next
// cycle, with RS = NOT A0.  The USB module (a USBMOD4 FIFO-style USB
// interface) is read and written at offset 0 of its slot, with WR and /RD
// active in the last quarter of the cycle; offset 1 reads the module's
// /PEN, /TXF and /RXF status.  /RXF (data received) is also the CPU's
// interrupt request.  The USB module and the display are outside this
// design; their pins are ports.
//
// Timing: LCD latch, RS, E timing and /IRQ update on the rising edge of Q0
// (clk with ce high); WR, /RD and the read data are combinational.
//
// The LCD latch, device GAL and connections follow the source design's
// schematic; splitting the USB module's data bus into input and output ports
// is this implementation's choice.
module hardware_devices (
  input  logic       clk,
  input  logic       ce,
  input  logic       q0,
  input  logic       q1,
  input  logic       ld_mem_n,
  input  logic       hwsel_usb_n,
  input  logic       hwsel_lcd_n,
  input  logic       a0,
  input  logic [7:0] mem_bus,
  output logic [7:0] dev_d,        // data this block drives on the memory bus
  output logic       dev_oe,
  output logic       irq_n,
  // LCD pins
  output logic [7:0] lcd_d,
  output logic       lcd_rs,
  output logic       lcd_e,
  // USB module pins
  input  logic [7:0] usb_d_i,
  output logic [7:0] usb_d_o,
  output logic       usb_wr,
  output logic       usb_rd_n,
  input  logic       usb_txf_n,
  input  logic       usb_rxf_n,
  input  logic       usb_pen_n
);
  logic       lcd_run, lcdin_g_n, status_oe;
  logic [2:0] status;

  device_gal u_device (
    .clk, .ce, .q0, .q1, .ld_mem_n, .hwsel_usb_n, .hwsel_lcd_n, .a0,
    .usb_txf_n, .usb_rxf_n, .usb_pen_n, .lcd_rs, .lcd_run, .lcdin_g_n,
    .lcd_e, .irq_n, .status, .status_oe, .usb_wr, .usb_rd_n);

  reg_377 u_lcdin (.clk, .ce, .g_n(lcdin_g_n), .d(mem_bus), .q(lcd_d));

  assign usb_d_o = mem_bus;
  assign dev_oe  = status_oe | ~usb_rd_n;
  assign dev_d   = status_oe ? {5'b00000, status} : usb_d_i;
endmodule
