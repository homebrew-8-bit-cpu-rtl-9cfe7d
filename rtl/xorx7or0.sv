// xorx7or0: the X / X7 / zero operand buffer, one GAL20V8 in complex mode.
//
// Presents one of three pseudo-registers on the left ALU operand bus:
// X itself (/EN_X low), X7, which is bit 7 of X copied into all eight bits
// (/EN_X7 low, the sign extension used for signed address offsets), or zero
// (neither selected).  The shared enable /EN_XORX7OR0 turns the outputs on.
// The zero select (/EN_0) reaches the chip but the equations do not need
// it, since zero is what the outputs show when X and X7 are both off; it is
// therefore not a port here.  Equations follow the source design.
//
// Combinational.  q_oe is the active-high form of the three-state enable.
module xorx7or0 (
  input  logic [7:0] d,          // X register contents
  input  logic       en_x_n,
  input  logic       en_x7_n,
  input  logic       en_n,       // /EN_ALU_XORX7OR0
  output logic [7:0] q,
  output logic       q_oe
);
  assign q    = ({8{~en_x_n}} & d) | {8{~en_x7_n & d[7]}};
  assign q_oe = ~en_n;
endmodule
