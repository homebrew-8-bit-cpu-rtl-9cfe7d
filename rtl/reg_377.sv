// reg_377: 74LS377 octal D register with active-low load enable.
//
// On the clock edge the register loads D when /G is low and holds otherwise.
// Outputs are always driven.  Used for the X register and the LCD data latch.
//
// Timing: loads on the rising edge of Q0 (clk with ce high).
//
// A standard part used by the source design; the model is written from its
// data-sheet function.
module reg_377 (
  input  logic       clk,
  input  logic       ce,
  input  logic       g_n,
  input  logic [7:0] d,
  output logic [7:0] q
);
  always_ff @(posedge clk) begin
    if (ce && !g_n) q <= d;
  end
endmodule
