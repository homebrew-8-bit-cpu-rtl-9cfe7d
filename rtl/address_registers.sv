// address_registers: the three 24-bit address registers PC, AR and SP.
//
// Each register is three GAL22V10 bytes (low, high, bank) loaded one byte
// at a time from the data bus through a 74LS244, with /CNT_OUT to /CNT_IN
// carry chaining so that one count strobe steps all 24 bits on the same
// edge.  PC resets to 0 and counts up; AR counts up; SP counts up or down
// (SPDIR = 1 up).  One of them drives the 24-bit address bus, chosen by the
// microcode; the PC also drives it throughout reset.  The bus is modelled
// as OR-ing the enabled drivers, with an assertion that at most one is on;
// an undriven bus reads 0.
//
// Timing: registers update on the rising edge of Q0 (clk with ce high);
// the address bus is combinational.
//
// The register set, carry chains and bus connections follow the source
// design's schematic; the OR-bus model and the direct connection in place of
// the data-bus input buffer are choices of this implementation.
module address_registers
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic [7:0]  databus,
  input  logic        resetc_n,
  input  ctrl_t       ctrl,
  output logic [23:0] adrbus,
  output logic [23:0] pc,
  output logic [23:0] ar,
  output logic [23:0] sp
);
  logic [7:0] buf_d;
  logic       pc_oe_n;
  logic [2:0] pc_oe, ar_oe, sp_oe;
  logic       pclo_co_n, pchi_co_n, arlo_co_n, arhi_co_n, arbank_co_n;
  logic       splo_co_n, sphi_co_n, spbank_co_n;

  assign buf_d = databus;   // 74LS244, both halves always enabled

  pc_lohi u_pclo (.clk, .ce, .d(buf_d), .reset_n(resetc_n),
                  .cnt_in_n(ctrl.cntpc_n), .ld_n(ctrl.ld_pclo_n),
                  .oe_n(pc_oe_n), .q(pc[7:0]), .q_oe(pc_oe[0]),
                  .cnt_out_n(pclo_co_n));
  pc_lohi u_pchi (.clk, .ce, .d(buf_d), .reset_n(resetc_n),
                  .cnt_in_n(pclo_co_n), .ld_n(ctrl.ld_pchi_n),
                  .oe_n(pc_oe_n), .q(pc[15:8]), .q_oe(pc_oe[1]),
                  .cnt_out_n(pchi_co_n));
  pc_bank u_pcbank (.clk, .ce, .d(buf_d), .reset_n(resetc_n),
                    .cnt_in_n(pchi_co_n), .adrsel_pc_n(ctrl.adrsel_pc_n),
                    .ld_n(ctrl.ld_pcbank_n), .oe_out_n(pc_oe_n),
                    .q(pc[23:16]), .q_oe(pc_oe[2]));

  ar_reg u_arlo (.clk, .ce, .d(buf_d), .cnt_in_n(ctrl.cntar_n),
                 .ld_n(ctrl.ld_arlo_n), .oe_n(ctrl.adrsel_ar_n),
                 .q(ar[7:0]), .q_oe(ar_oe[0]), .cnt_out_n(arlo_co_n));
  ar_reg u_arhi (.clk, .ce, .d(buf_d), .cnt_in_n(arlo_co_n),
                 .ld_n(ctrl.ld_arhi_n), .oe_n(ctrl.adrsel_ar_n),
                 .q(ar[15:8]), .q_oe(ar_oe[1]), .cnt_out_n(arhi_co_n));
  ar_reg u_arbank (.clk, .ce, .d(buf_d), .cnt_in_n(arhi_co_n),
                   .ld_n(ctrl.ld_arbank_n), .oe_n(ctrl.adrsel_ar_n),
                   .q(ar[23:16]), .q_oe(ar_oe[2]), .cnt_out_n(arbank_co_n));

  sp_reg u_splo (.clk, .ce, .d(buf_d), .dir(ctrl.spdir),
                 .cnt_in_n(ctrl.cntsp_n), .ld_n(ctrl.ld_splo_n),
                 .oe_n(ctrl.adrsel_sp_n), .q(sp[7:0]), .q_oe(sp_oe[0]),
                 .cnt_out_n(splo_co_n));
  sp_reg u_sphi (.clk, .ce, .d(buf_d), .dir(ctrl.spdir),
                 .cnt_in_n(splo_co_n), .ld_n(ctrl.ld_sphi_n),
                 .oe_n(ctrl.adrsel_sp_n), .q(sp[15:8]), .q_oe(sp_oe[1]),
                 .cnt_out_n(sphi_co_n));
  sp_reg u_spbank (.clk, .ce, .d(buf_d), .dir(ctrl.spdir),
                   .cnt_in_n(sphi_co_n), .ld_n(ctrl.ld_spbank_n),
                   .oe_n(ctrl.adrsel_sp_n), .q(sp[23:16]), .q_oe(sp_oe[2]),
                   .cnt_out_n(spbank_co_n));

  always_comb begin
    adrbus = 24'd0;
    for (int i = 0; i < 3; i++) begin
      if (pc_oe[i]) adrbus[8*i +: 8] |= pc[8*i +: 8];
      if (ar_oe[i]) adrbus[8*i +: 8] |= ar[8*i +: 8];
      if (sp_oe[i]) adrbus[8*i +: 8] |= sp[8*i +: 8];
    end
  end

  always_comb begin
    assert ($onehot0({pc_oe[0], ar_oe[0], sp_oe[0]}))
      else $error("address bus: more than one driver");
  end
endmodule
