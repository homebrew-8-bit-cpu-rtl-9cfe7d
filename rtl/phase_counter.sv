// phase_counter: 74LS163 4-bit synchronous counter used as the microcode
// step ("phase") counter.
//
// It counts every CPU cycle (ENP and ENT tied high), so each instruction
// steps through microcode phases 0, 1, 2 ...  A synchronous clear (/RESETC)
// and a synchronous load of the constant 0 (on /LDOP, with the data inputs
// grounded) restart the sequence for a new instruction.  Clear has priority
// over load, load over count, as in the 74LS163.  RCO is high at 15 while
// ENT is high.
//
// Timing: all actions on the rising edge of Q0 (clk with ce high).
//
// The 74LS163 and its wiring come from the source design; the model is
// written from the part's data-sheet function.
module phase_counter (
  input  logic       clk,
  input  logic       ce,
  input  logic       clr_n,
  input  logic       load_n,
  input  logic       enp,
  input  logic       ent,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       rco
);
  always_ff @(posedge clk) begin
    if (ce) begin
      if (!clr_n)         q <= 4'd0;
      else if (!load_n)   q <= d;
      else if (enp & ent) q <= q + 4'd1;
    end
  end
  assign rco = ent & (q == 4'hF);
endmodule
