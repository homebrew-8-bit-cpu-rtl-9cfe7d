// alu: the 8-bit ALU with its condition codes and data-bus driver.
//
// Two 74LS181 slices form an 8-bit ALU with a ripple carry from the low
// slice's Cn+4 to the high slice's Cn; the microcode drives the function
// (S3..S0), mode (M) and carry in (active low).  The high slice's carry
// out, /ALU_COUT, goes to the condition-code GAL and to the control GAL's
// address carry.  A 74LS244 puts the result on the data bus when /DRALU is
// low (modelled as f plus active-high f_oe).  The condition-code GAL takes
// the result, FUNC1 (subtraction), the operand sign bits and bit 3 of X.
//
// Timing: the result is combinational from the operand buses; flags update
// on the rising edge of Q0 (clk with ce high).
//
// The two-slice ALU, result buffer and condition-code wiring follow the
// source design's schematic; modelling the three-state buffer as a value
// plus enable is this implementation's choice.
module alu (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] left,
  input  logic [7:0] right,
  input  logic [3:0] func,
  input  logic       mode,
  input  logic       cin_n,
  input  logic       cc_s0,
  input  logic       cc_s1,
  input  logic       regx3,
  input  logic       dralu_n,
  output logic [7:0] f,
  output logic       f_oe,
  output logic       cout_n,
  output logic       cc_c_n,
  output logic       cc_n,
  output logic       cc_z_n,
  output logic       cc_v_n
);
  logic c4_n, aeqb0, aeqb1;

  alu181 u_alu0 (.a(left[3:0]), .b(right[3:0]), .s(func), .m(mode),
                 .cn(cin_n), .f(f[3:0]), .cn4(c4_n), .aeqb(aeqb0));
  alu181 u_alu1 (.a(left[7:4]), .b(right[7:4]), .s(func), .m(mode),
                 .cn(c4_n), .f(f[7:4]), .cn4(cout_n), .aeqb(aeqb1));

  alucc u_alucc (.clk, .ce, .f, .func1(func[1]), .a7(left[7]), .b7(right[7]),
                 .cin_n(cout_n), .s0(cc_s0), .s1(cc_s1), .regx3,
                 .cc_c_n, .cc_n, .cc_z_n, .cc_v_n);

  assign f_oe = ~dralu_n;
endmodule
