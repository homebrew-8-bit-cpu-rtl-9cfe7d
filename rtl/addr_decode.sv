// addr_decode: address decoder, one GAL22V10.  Defines the memory map.
//
// From address bits 23..8 it derives active-low chip selects:
//   000000-003EFF  boot ROM (15.75 KB)
//   003F00-003FFF  hardware devices (16 device slots of 16 bytes)
//   004000-07FFFF  RAM bank 0 (496 KB usable of a 512 KB chip)
//   080000-0FFFFF  RAM bank 1
//   100000-17FFFF  RAM bank 2 (select brought out, chip not fitted)
//   180000-1FFFFF  RAM bank 3 (select brought out, chip not fitted)
// Addresses from 200000 up select nothing.  Combinational; the map follows
// the source design.
module addr_decode (
  input  logic [23:8] a,
  output logic        ram3_cs_n,
  output logic        ram2_cs_n,
  output logic        ram1_cs_n,
  output logic        ram0_cs_n,
  output logic        rom_cs_n,
  output logic        hw_cs_n
);
  logic low_meg;   // A23..A19 all zero
  logic low_16k;   // A23..A14 all zero
  assign low_meg   = (a[23:19] == 5'b00000);
  assign low_16k   = low_meg && (a[18:14] == 5'b00000);

  assign ram3_cs_n = ~(a[23:19] == 5'b00011);
  assign ram2_cs_n = ~(a[23:19] == 5'b00010);
  assign ram1_cs_n = ~(a[23:19] == 5'b00001);
  assign ram0_cs_n = ~(low_meg && (a[18:14] != 5'b00000));
  assign rom_cs_n  = ~(low_16k && (a[13:8] != 6'b111111));
  assign hw_cs_n   = ~(low_16k && (a[13:8] == 6'b111111));
endmodule
