// sram_628512: 512K x 8 static RAM (628512 type), used for RAM banks 0 and 1.
//
// Reads are asynchronous: with /CS and /OE low and /WE high the chip drives
// mem[a] (modelled as dout plus active-high dout_oe).  A write stores din
// at mem[a] while /CS and /WE are low.  The CPU only asserts /WE in the last
// quarter of a cycle; this model performs the write on the master clock
// edge that ends that quarter, i.e. once per CPU cycle.
//
// The part and its pins come from the source design; the write timing on the
// master clock is this implementation's choice.
module sram_628512 #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  input  logic          cs_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic [7:0]    din,
  output logic [7:0]    dout,
  output logic          dout_oe
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!cs_n && !we_n) mem[a] <= din;
  end

  assign dout    = mem[a];
  assign dout_oe = ~cs_n & ~oe_n & we_n;
endmodule
