// memory_system: address decoding, boot ROM, two RAM banks and the
// memory-bus buffer.
//
// The address decoder GAL turns address bits 23..8 into chip selects
// (boot ROM, RAM banks 0 to 3, hardware devices).  Within the hardware
// page, two 74LS138s decode A7..A4 into sixteen 16-byte device slots:
// slot 0 (003F00) is the LCD, slot 1 (003F10) the USB module.  The boot ROM
// is a 29F010 flash, RAM banks 0 and 1 are 628512 SRAMs; banks 2 and 3 are
// not fitted and their selects are brought out.
//
// The memory bus is separated from the CPU data bus by a 74LS245.  Its
// direction is /LD_MEM: when the microcode stores to memory the data bus
// drives the memory bus; otherwise, if the buffer is enabled (/EN_MEMBUF),
// the memory bus drives the data bus.  The buses are modelled as OR-ed
// enabled drivers; mem_rd is the value read back from memory or a device,
// kept apart from the store path so the model has no combinational loop.
// An undriven memory bus reads 0.
//
// Timing: reads are combinational; RAM writes happen once per CPU cycle,
// in the last quarter (/WE_MEM).
//
// Parts, decoding and the transceiver's control come from the source design;
// the split bus model is this implementation's choice.
module memory_system #(
  parameter string BOOTROM_FILE = ""
) (
  input  logic        clk,
  input  logic [23:0] adrbus,
  input  logic [7:0]  databus,      // CPU data bus (store data)
  input  logic        ld_mem_n,
  input  logic        en_membuf_n,
  input  logic        oe_mem_n,
  input  logic        we_mem_n,
  input  logic [7:0]  dev_d,        // device data onto the memory bus
  input  logic        dev_oe,
  output logic [7:0]  mem_bus,      // value on the memory bus
  output logic [7:0]  mem_rd,       // buffer output towards the data bus
  output logic        mem_rd_oe,
  output logic        hwsel_usb_n,
  output logic        hwsel_lcd_n,
  output logic        ram2_cs_n,
  output logic        ram3_cs_n
);
  logic       ram0_cs_n, ram1_cs_n, rom_cs_n, hw_cs_n;
  logic [7:0] rom_d, ram0_d, ram1_d, rd_bus;
  logic       rom_oe, ram0_oe, ram1_oe, wr_dir;
  logic [7:0] hwsel1_n, hwsel0_n;

  addr_decode u_decode (.a(adrbus[23:8]), .ram3_cs_n, .ram2_cs_n,
                        .ram1_cs_n, .ram0_cs_n, .rom_cs_n, .hw_cs_n);

  decoder_138 u_hwsel1 (.g1(adrbus[7]), .g2a_n(hw_cs_n), .g2b_n(hw_cs_n),
                        .sel(adrbus[6:4]), .y_n(hwsel1_n));
  decoder_138 u_hwsel0 (.g1(1'b1), .g2a_n(adrbus[7]), .g2b_n(hw_cs_n),
                        .sel(adrbus[6:4]), .y_n(hwsel0_n));
  assign hwsel_lcd_n = hwsel0_n[0];
  assign hwsel_usb_n = hwsel0_n[1];

  flash_29f010 #(.AW(17), .INIT_FILE(BOOTROM_FILE)) u_bootrom (
    .a(adrbus[16:0]), .ce_n(rom_cs_n), .oe_n(oe_mem_n),
    .dq(rom_d), .dq_oe(rom_oe));

  sram_628512 #(.AW(19)) u_ram0 (
    .clk, .a(adrbus[18:0]), .cs_n(ram0_cs_n), .oe_n(oe_mem_n),
    .we_n(we_mem_n), .din(mem_bus), .dout(ram0_d), .dout_oe(ram0_oe));
  sram_628512 #(.AW(19)) u_ram1 (
    .clk, .a(adrbus[18:0]), .cs_n(ram1_cs_n), .oe_n(oe_mem_n),
    .we_n(we_mem_n), .din(mem_bus), .dout(ram1_d), .dout_oe(ram1_oe));

  // 74LS245: DIR = /LD_MEM (1: memory bus -> data bus), G = /EN_MEMBUF
  assign wr_dir    = ~en_membuf_n & ~ld_mem_n;
  assign mem_rd_oe = ~en_membuf_n &  ld_mem_n;

  assign rd_bus  = ({8{rom_oe}}  & rom_d)  | ({8{ram0_oe}} & ram0_d)
                 | ({8{ram1_oe}} & ram1_d) | ({8{dev_oe}}  & dev_d);
  assign mem_rd  = rd_bus;
  assign mem_bus = wr_dir ? databus : rd_bus;

  always_comb begin
    assert ($onehot0({rom_oe, ram0_oe, ram1_oe, dev_oe, wr_dir}))
      else $error("memory bus: more than one driver");
  end
endmodule
