// control_gal: control-system GAL22V10.
//
// Registered functions (clocked by Q0):
//   * /RESETC, RESETC: the reset request retimed to a cycle boundary.
//   * /IE: interrupt enable, active low.  Forced to 1 (disabled) during
//     reset; loaded from the shared SPDIR_IEDATA microcode bit when /LD_IE is
//     low; held otherwise.
//   * /CARRY_A: the ALU carry out, kept for multi-byte address arithmetic.
//     It is loaded when the shared Y-or-X7 operand select is active with an
//     address-register destination (load3 = 0, i.e. X7 is the operand), and
//     held otherwise.  It is an input to the microcode address.
// Combinational functions:
//   * Y and X7 share one microcode select: with an address-register
//     destination (load3 = 0) it enables X7, otherwise Y.
//   * /EN_ALU_XORX7OR0 enables the X/X7/0 buffer when any of the three is
//     selected.
//   * Memory bus buffer enable, memory /OE, and memory /WE; /WE is only
//     active in the last quarter of the cycle (Q0 = 0, Q1 = 0).
// Equations follow the source design, except the /IE hold term (see README).
module control_gal (
  input  logic clk,
  input  logic ce,
  input  logic q0,
  input  logic q1,
  input  logic load3,
  input  logic spdir_iedata,
  input  logic resetnc_n,
  input  logic ld_ie_n,
  input  logic en_alu_yorx7_n,
  input  logic alu_cout_n,
  input  logic ldmem_n,
  input  logic dralu_n,
  input  logic en_alu_x_n,
  input  logic en_alu_0_n,
  output logic resetc_n,
  output logic resetc,
  output logic ie_n,
  output logic carry_a_n,
  output logic en_alu_x7_n,
  output logic en_alu_y_n,
  output logic en_alu_xorx7or0_n,
  output logic en_membuf_n,
  output logic oe_mem_n,
  output logic we_mem_n
);
  always_ff @(posedge clk) begin
    if (ce) begin
      resetc_n <= resetnc_n;
      resetc   <= ~resetnc_n;
      if (!resetc_n)    ie_n <= 1'b1;
      else if (!ld_ie_n) ie_n <= spdir_iedata;
      if (!en_alu_yorx7_n && !load3) carry_a_n <= alu_cout_n;
    end
  end

  assign en_alu_x7_n       = en_alu_yorx7_n | load3;
  assign en_alu_y_n        = en_alu_yorx7_n | ~load3;
  assign en_alu_xorx7or0_n = (en_alu_x_n & en_alu_yorx7_n & en_alu_0_n)
                           | (en_alu_x_n & load3 & en_alu_0_n);
  assign en_membuf_n       = ~(dralu_n | ~ldmem_n);
  assign oe_mem_n          = ~ldmem_n;
  assign we_mem_n          = ~(~ldmem_n & ~q0 & ~q1);
endmodule
