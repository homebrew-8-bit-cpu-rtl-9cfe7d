// flash_29f010: read behaviour of a 29F010 128K x 8 flash memory.
//
// Used for the three microcode ROMs and the boot ROM.  The chips are
// programmed out of circuit (their program-enable pin is tied inactive),
// so only reads are modelled: an asynchronous read of mem[a] that drives
// the data pins while /CE and /OE are both low (modelled as dq plus the
// active-high dq_oe).  The contents are loaded from INIT_FILE with
// $readmemh when the parameter is not empty; a simulation may also write
// the array directly.  Unloaded words read as 0xFF, like erased flash.
//
// The part and its pins come from the source design; the read-only model and
// the erased value are choices of this implementation.
module flash_29f010 #(
  parameter int unsigned AW        = 17,
  parameter string       INIT_FILE = ""
) (
  input  logic [AW-1:0] a,
  input  logic          ce_n,
  input  logic          oe_n,
  output logic [7:0]    dq,
  output logic          dq_oe
);
  logic [7:0] mem [2**AW];

  initial begin
    foreach (mem[i]) mem[i] = 8'hFF;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign dq    = mem[a];
  assign dq_oe = ~ce_n & ~oe_n;
endmodule
