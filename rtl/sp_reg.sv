// sp_reg: one byte of the 24-bit stack pointer SP, one GAL22V10.
//
// Load from D when /LD is low, else count when /CNT_IN is low, else hold.
// DIR = 1 counts up, DIR = 0 counts down.  No reset.  /CNT_OUT is the
// borrow/carry to the next byte: low when the byte is counting (/LD high,
// /CNT_IN low) and sits at 0xFF going up or at 0x00 going down.  Outputs
// drive the address bus while /OE (/ADRSEL_SP) is low.  Equations follow the
// source design.
//
// Timing: registers update on the rising edge of Q0 (clk with ce high).
module sp_reg (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] d,
  input  logic       dir,
  input  logic       cnt_in_n,
  input  logic       ld_n,
  input  logic       oe_n,
  output logic [7:0] q,
  output logic       q_oe,
  output logic       cnt_out_n
);
  always_ff @(posedge clk) begin
    if (ce) begin
      if (!ld_n)          q <= d;
      else if (!cnt_in_n) q <= dir ? q + 8'd1 : q - 8'd1;
    end
  end
  assign cnt_out_n = ~(ld_n & ~cnt_in_n & (dir ? (&q) : ~(|q)));
  assign q_oe      = ~oe_n;
endmodule
