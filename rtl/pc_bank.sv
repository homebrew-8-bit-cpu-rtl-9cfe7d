// pc_bank: bank byte (bits 23..16) of the program counter, one GAL22V10.
//
// Same counter as pc_lohi (reset, load, count on /CNT_IN), without a carry
// output.  It also forms the output enable of all three PC bytes:
// /OE_OUT = /ADRSEL_PC AND /RESET, i.e. the PC drives the address bus when
// the microcode selects it or while reset is active, so the boot ROM is
// read from address 0 during reset.  Equations follow the source design.
//
// Timing: registers update on the rising edge of Q0 (clk with ce high);
// /OE_OUT and q_oe are combinational.
module pc_bank (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] d,
  input  logic       reset_n,
  input  logic       cnt_in_n,
  input  logic       adrsel_pc_n,
  input  logic       ld_n,
  output logic       oe_out_n,
  output logic [7:0] q,
  output logic       q_oe
);
  always_ff @(posedge clk) begin
    if (ce) begin
      if (!reset_n)        q <= 8'h00;
      else if (!ld_n)      q <= d;
      else if (!cnt_in_n)  q <= q + 8'd1;
    end
  end
  assign oe_out_n = adrsel_pc_n & reset_n;
  assign q_oe     = ~oe_out_n;
endmodule
