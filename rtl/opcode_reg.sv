// opcode_reg: instruction (opcode) register, one GAL22V10.
//
// Holds the opcode of the instruction being executed; the opcode forms the
// top eight bits of the microcode address.  While reset is active it loads
// the memory bus every cycle (the program counter is forced to 0 and driven,
// so it holds the first byte of the boot ROM when reset ends).  When the
// microcode asserts /LDOP it loads the next opcode from the memory bus,
// unless an interrupt is pending (_irq low) and interrupts are enabled (_ie
// low): then it loads 0, so opcode 0 is the interrupt entry.  Otherwise it
// holds.  Equations follow the source design.
//
// Timing: loads on the rising edge of Q0 (clk with ce high).
module opcode_reg (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] d,        // memory bus
  input  logic       ldop_n,   // load opcode, active low
  input  logic       ie_n,     // interrupt enable, active low
  input  logic       irq_n,    // interrupt request, active low
  input  logic       reset_n,  // synchronised reset, active low
  output logic [7:0] q
);
  always_ff @(posedge clk) begin
    if (ce) begin
      if (!reset_n)     q <= d;
      else if (!ldop_n) q <= (irq_n | ie_n) ? d : 8'h00;
    end
  end
endmodule
