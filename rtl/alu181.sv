// alu181: 74LS181 4-bit ALU slice, active-high data convention.
//
// Sixteen logic functions (M = 1) or sixteen arithmetic functions (M = 0)
// of A and B, chosen by S3..S0.  Internally each bit forms
//   O = A | (B & S0) | (~B & S1)   and   N = (A & ~B & S2) | (A & B & S3);
// arithmetic mode outputs O + N + carry, logic mode outputs ~(O ^ N).
// This reproduces the data-sheet table, e.g. S = 1001 is A plus B,
// S = 0110 is A minus B minus 1, S = 1111 in logic mode is A.  The carry
// input Cn and carry output Cn+4 are active low (Cn = 0 adds one).  A=B is
// high when all four F outputs are high.  Combinational.
//
// The part comes from the source design; the data-sheet function is written
// here as this implementation's own equations.
module alu181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn,
  output logic [3:0] f,
  output logic       cn4,
  output logic       aeqb
);
  logic [3:0] o, n;
  logic [4:0] sum;

  always_comb begin
    o   = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    n   = (a & ~b & {4{s[2]}}) | (a & b & {4{s[3]}});
    sum = {1'b0, o} + {1'b0, n} + {4'd0, ~cn};
    f   = m ? ~(o ^ n) : sum[3:0];
  end
  assign cn4  = ~sum[4];
  assign aeqb = &f;
endmodule
