// cpu_top: the complete homebrew 8-bit CPU board.
//
// An 8-bit, microcoded CPU with a 24-bit (16 MB) address space.  Data
// registers A, X, Y and T feed a 74LS181-based ALU through two operand
// buses; three 24-bit counters (PC, AR, SP) address memory, and any of
// them can also be an ALU operand, byte by byte, through the address bus.
// Every cycle a 24-bit microword from three flash ROMs, addressed by
// opcode, phase and flags, drives all strobes.  The memory system holds a
// boot ROM, two 512 KB RAM banks and a page of memory-mapped devices: a
// 16x2 character LCD and a USB FIFO module whose receive flag interrupts
// the CPU.
//
// Clocking: clk is a master clock at four times the CPU clock; clock_reset
// derives the quadrature phases Q0/Q1 and the enable ce for the rising edge
// of Q0, on which all registers load.  One CPU cycle = four clk cycles.
// Reset: hold reset_btn_n low for at least two CPU cycles; the PC is then 0
// and the opcode register holds the first boot-ROM byte.
//
// The USB module and LCD are external: their pins are ports, as are the
// selects and bus signals needed by the unfitted RAM banks 2 and 3.  The
// microcode and boot ROM contents are not part of the design; they come
// from the *_FILE parameters or are written by a simulation.
//
// The sheets, their connections and the memory map follow the source design;
// the master clock with an enable, the split read/write bus model and the
// ports for external parts are choices of this implementation.
module cpu_top
  import cpu_pkg::*;
#(
  parameter string UROM0_FILE   = "",
  parameter string UROM1_FILE   = "",
  parameter string UROM2_FILE   = "",
  parameter string BOOTROM_FILE = ""
) (
  input  logic        clk,
  input  logic        reset_btn_n,
  // USB module
  input  logic [7:0]  usb_d_i,
  output logic [7:0]  usb_d_o,
  output logic        usb_wr,
  output logic        usb_rd_n,
  input  logic        usb_txf_n,
  input  logic        usb_rxf_n,
  input  logic        usb_pen_n,
  // LCD
  output logic [7:0]  lcd_d,
  output logic        lcd_rs,
  output logic        lcd_e,
  // expansion: RAM banks 2 and 3
  output logic [23:0] adrbus,
  output logic [7:0]  mem_bus,
  output logic        oe_mem_n,
  output logic        we_mem_n,
  output logic        ram2_cs_n,
  output logic        ram3_cs_n
);
  logic        q0, q1, ce, resetnc_n, resetc_n, ie_n, irq_n;
  ctrl_t       ctrl;
  logic [7:0]  opcode;
  logic [3:0]  phase;
  logic [UADDR_W-1:0] uaddr;
  logic [7:0]  databus, left, right, alu_f, mem_rd, dev_d;
  logic        alu_oe, mem_rd_oe, dev_oe, alu_cout_n, regx3;
  logic        cc_c_n, cc_n, cc_z_n, cc_v_n;
  logic        hwsel_usb_n, hwsel_lcd_n;
  logic [7:0]  reg_a, reg_x, reg_y, reg_t;
  logic [23:0] pc, ar, sp;

  clock_reset u_clk (.clk, .reset_btn_n, .q0, .q1, .ce, .resetnc_n);

  control_unit #(.UROM0_FILE(UROM0_FILE), .UROM1_FILE(UROM1_FILE),
                 .UROM2_FILE(UROM2_FILE)) u_ctrl (
    .clk, .ce, .q0, .q1, .resetnc_n, .mem_bus, .irq_n,
    .cc_c_n, .cc_n, .cc_z_n, .cc_v_n, .alu_cout_n,
    .ctrl, .resetc_n, .ie_n, .opcode, .phase, .uaddr);

  data_registers u_dregs (
    .clk, .ce, .databus, .adrbus, .ctrl, .alubus_left(left),
    .alubus_right(right), .regx3, .reg_a, .reg_x, .reg_y, .reg_t);

  address_registers u_aregs (
    .clk, .ce, .databus, .resetc_n, .ctrl, .adrbus, .pc, .ar, .sp);

  alu u_alu (
    .clk, .ce, .left, .right, .func(ctrl.alu_func), .mode(ctrl.alu_mode),
    .cin_n(ctrl.alu_cin), .cc_s0(ctrl.cc_s0), .cc_s1(ctrl.cc_s1), .regx3,
    .dralu_n(ctrl.dralu_n), .f(alu_f), .f_oe(alu_oe), .cout_n(alu_cout_n),
    .cc_c_n, .cc_n, .cc_z_n, .cc_v_n);

  memory_system #(.BOOTROM_FILE(BOOTROM_FILE)) u_mem (
    .clk, .adrbus, .databus, .ld_mem_n(ctrl.ld_mem_n),
    .en_membuf_n(ctrl.en_membuf_n), .oe_mem_n(ctrl.oe_mem_n),
    .we_mem_n(ctrl.we_mem_n), .dev_d, .dev_oe, .mem_bus, .mem_rd,
    .mem_rd_oe, .hwsel_usb_n, .hwsel_lcd_n, .ram2_cs_n, .ram3_cs_n);

  hardware_devices u_dev (
    .clk, .ce, .q0, .q1, .ld_mem_n(ctrl.ld_mem_n), .hwsel_usb_n,
    .hwsel_lcd_n, .a0(adrbus[0]), .mem_bus, .dev_d, .dev_oe, .irq_n,
    .lcd_d, .lcd_rs, .lcd_e, .usb_d_i, .usb_d_o, .usb_wr, .usb_rd_n,
    .usb_txf_n, .usb_rxf_n, .usb_pen_n);

  // CPU data bus: driven by the ALU output buffer or the memory-bus buffer
  assign databus  = ({8{alu_oe}} & alu_f) | ({8{mem_rd_oe}} & mem_rd);
  assign oe_mem_n = ctrl.oe_mem_n;
  assign we_mem_n = ctrl.we_mem_n;

  always_comb begin
    assert (!(alu_oe && mem_rd_oe)) else $error("data bus: two drivers");
  end
endmodule
