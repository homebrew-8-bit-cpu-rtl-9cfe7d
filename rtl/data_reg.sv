// data_reg: generic 8-bit data register, one GAL20V8 in registered mode.
//
// Loads D on the clock edge when /LD is low, holds otherwise.  The outputs
// drive the ALU operand bus only while /OE is low; here the three-state
// output is modelled as the value q plus an active-high enable q_oe that the
// bus logic uses to select its driver.  Used for registers A, Y and T.
// Function follows the source design's equations.
//
// Timing: loads on the rising edge of Q0 (clk with ce high).
module data_reg (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] d,
  input  logic       ld_n,
  input  logic       oe_n,
  output logic [7:0] q,
  output logic       q_oe
);
  always_ff @(posedge clk) begin
    if (ce && !ld_n) q <= d;
  end
  assign q_oe = ~oe_n;
endmodule
