// data_registers: the data registers and the two ALU operand buses.
//
// Registers A, Y and T (GAL20V8 data registers) and X (74LS377) load from
// the data bus.  The left operand bus carries A, Y, or the X/X7/zero
// buffer; the right operand bus carries T or one byte (low, high, bank) of
// whichever address register currently drives the address bus, through
// three 74LS244 buffers.  So address arithmetic such as AR + X reads AR via
// the address bus.  Bit 3 of X goes to the condition-code GAL (shift-right
// input).
//
// The three-state buses are modelled as OR-ing the enabled drivers; an
// assertion checks that at most one driver is enabled per bus, and a bus
// with no driver reads 0.  Register contents are also brought out for
// observation.
//
// Timing: registers load on the rising edge of Q0 (clk with ce high);
// operand buses are combinational.
//
// The registers, buffers and bus connections follow the source design's
// schematic; the bus model is this implementation's choice.
module data_registers
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic [7:0]  databus,
  input  logic [23:0] adrbus,
  input  ctrl_t       ctrl,
  output logic [7:0]  alubus_left,
  output logic [7:0]  alubus_right,
  output logic        regx3,
  output logic [7:0]  reg_a,
  output logic [7:0]  reg_x,
  output logic [7:0]  reg_y,
  output logic [7:0]  reg_t
);
  logic       a_oe, y_oe, t_oe, xb_oe;
  logic [7:0] xb;

  data_reg u_rega (.clk, .ce, .d(databus), .ld_n(ctrl.ld_a_n),
                   .oe_n(ctrl.en_alu_a_n), .q(reg_a), .q_oe(a_oe));
  data_reg u_regy (.clk, .ce, .d(databus), .ld_n(ctrl.ld_y_n),
                   .oe_n(ctrl.en_alu_y_n), .q(reg_y), .q_oe(y_oe));
  data_reg u_regt (.clk, .ce, .d(databus), .ld_n(ctrl.ld_t_n),
                   .oe_n(ctrl.en_alu_t_n), .q(reg_t), .q_oe(t_oe));
  reg_377  u_regx (.clk, .ce, .g_n(ctrl.ld_x_n), .d(databus), .q(reg_x));

  xorx7or0 u_xorx7or0 (.d(reg_x), .en_x_n(ctrl.en_alu_x_n),
                       .en_x7_n(ctrl.en_alu_x7_n),
                       .en_n(ctrl.en_alu_xorx7or0_n), .q(xb), .q_oe(xb_oe));

  assign alubus_left  = ({8{a_oe}} & reg_a) | ({8{y_oe}} & reg_y)
                      | ({8{xb_oe}} & xb);
  assign alubus_right = ({8{t_oe}} & reg_t)
                      | ({8{~ctrl.en_alu_adrlo_n}}   & adrbus[7:0])
                      | ({8{~ctrl.en_alu_adrhi_n}}   & adrbus[15:8])
                      | ({8{~ctrl.en_alu_adrbank_n}} & adrbus[23:16]);
  assign regx3 = reg_x[3];

  always_comb begin
    assert ($onehot0({a_oe, y_oe, xb_oe}))
      else $error("left ALU bus: more than one driver");
    assert ($onehot0({t_oe, ~ctrl.en_alu_adrlo_n, ~ctrl.en_alu_adrhi_n,
                      ~ctrl.en_alu_adrbank_n}))
      else $error("right ALU bus: more than one driver");
  end
endmodule
