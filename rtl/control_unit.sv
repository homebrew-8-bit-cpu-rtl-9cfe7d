// control_unit: the microcoded control module.
//
// Each CPU cycle one 24-bit microword is read from three 128K x 8 microcode
// ROMs addressed by {opcode, phase, V, Z, N, C, carry_a}.  The opcode
// register supplies the instruction, the phase counter the step within it,
// and the condition-code and address-carry flags let the microcode branch
// simply by having different words for different flag values.  The
// microword's encoded fields are expanded by TTL decoders:
//   ALUINA / ALUINB (74LS139)   left / right ALU operand enables
//   LOAD1 / LOAD0   (74LS138)   register load strobes; load3 picks the bank
//   ADRSEL_CNT/A,/B (74LS139)   PC/AR count or IE load, and address source
// The control GAL adds the Y/X7 sharing, memory strobes, reset retiming,
// the interrupt-enable flag and the address carry.  /LDOP ends an
// instruction: the opcode register loads the next opcode (or 0 for an
// interrupt) and the phase counter restarts at 0.
//
// Which field sits in which ROM bit is this design's reading of the
// schematic (see cpu_pkg); the ROM contents are not part of the design and
// are supplied by UROM*_FILE or written by a simulation.
//
// Timing: one microword per CPU cycle; all state changes on the rising edge
// of Q0 (clk with ce high).  Strobes are combinational from the microword.
module control_unit
  import cpu_pkg::*;
#(
  parameter string UROM0_FILE = "",
  parameter string UROM1_FILE = "",
  parameter string UROM2_FILE = ""
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        q0,
  input  logic        q1,
  input  logic        resetnc_n,
  input  logic [7:0]  mem_bus,
  input  logic        irq_n,
  input  logic        cc_c_n,
  input  logic        cc_n,
  input  logic        cc_z_n,
  input  logic        cc_v_n,
  input  logic        alu_cout_n,
  output ctrl_t       ctrl,
  output logic        resetc_n,
  output logic        ie_n,
  output logic [7:0]  opcode,
  output logic [3:0]  phase,
  output logic [UADDR_W-1:0] uaddr
);
  logic [7:0] urom0, urom1, urom2;
  logic       urom0_oe, urom1_oe, urom2_oe;
  uword_t     uw;
  logic       carry_a_n, resetc, phase_rco;
  logic [3:0] alu_a_n, alu_b_n, cnt_n, asel_n;
  logic [7:0] load1_n, load0_n;
  logic       en_alu_yorx7_n;

  assign uaddr = {opcode, phase, cc_v_n, cc_z_n, cc_n, cc_c_n, carry_a_n};

  flash_29f010 #(.AW(UADDR_W), .INIT_FILE(UROM0_FILE)) u_urom0 (
    .a(uaddr), .ce_n(1'b0), .oe_n(1'b0), .dq(urom0), .dq_oe(urom0_oe));
  flash_29f010 #(.AW(UADDR_W), .INIT_FILE(UROM1_FILE)) u_urom1 (
    .a(uaddr), .ce_n(1'b0), .oe_n(1'b0), .dq(urom1), .dq_oe(urom1_oe));
  flash_29f010 #(.AW(UADDR_W), .INIT_FILE(UROM2_FILE)) u_urom2 (
    .a(uaddr), .ce_n(1'b0), .oe_n(1'b0), .dq(urom2), .dq_oe(urom2_oe));

  assign uw = uword_t'({urom2, urom1, urom0});

  opcode_reg u_opcode (
    .clk, .ce, .d(mem_bus), .ldop_n(uw.ldop_n), .ie_n, .irq_n,
    .reset_n(resetc_n), .q(opcode));

  phase_counter u_phase (
    .clk, .ce, .clr_n(resetc_n), .load_n(uw.ldop_n), .enp(1'b1), .ent(1'b1),
    .d(4'd0), .q(phase), .rco(phase_rco));

  decoder_139 u_aluina (.g_n(1'b0), .sel(uw.lsel),   .y_n(alu_a_n));
  decoder_139 u_aluinb (.g_n(1'b0), .sel(uw.rsel),   .y_n(alu_b_n));
  decoder_139 u_cnt    (.g_n(1'b0), .sel(uw.cntsel), .y_n(cnt_n));
  decoder_139 u_asel   (.g_n(1'b0), .sel(uw.asel),   .y_n(asel_n));
  decoder_138 u_load1  (.g1(uw.load3), .g2a_n(1'b0), .g2b_n(1'b0),
                        .sel(uw.load), .y_n(load1_n));
  decoder_138 u_load0  (.g1(1'b1), .g2a_n(uw.load3), .g2b_n(1'b0),
                        .sel(uw.load), .y_n(load0_n));

  assign en_alu_yorx7_n = alu_a_n[LSEL_YORX7];

  control_gal u_cgal (
    .clk, .ce, .q0, .q1,
    .load3(uw.load3), .spdir_iedata(uw.spdir_iedata), .resetnc_n,
    .ld_ie_n(cnt_n[CNT_LD_IE]), .en_alu_yorx7_n, .alu_cout_n,
    .ldmem_n(load1_n[L1_MEM]), .dralu_n(uw.dralu_n),
    .en_alu_x_n(alu_a_n[LSEL_X]), .en_alu_0_n(alu_a_n[LSEL_ZERO]),
    .resetc_n, .resetc, .ie_n, .carry_a_n,
    .en_alu_x7_n(ctrl.en_alu_x7_n), .en_alu_y_n(ctrl.en_alu_y_n),
    .en_alu_xorx7or0_n(ctrl.en_alu_xorx7or0_n),
    .en_membuf_n(ctrl.en_membuf_n), .oe_mem_n(ctrl.oe_mem_n),
    .we_mem_n(ctrl.we_mem_n));

  always_comb begin
    ctrl.ld_mem_n       = load1_n[L1_MEM];
    ctrl.ld_splo_n      = load1_n[L1_SPLO];
    ctrl.ld_t_n         = load1_n[L1_T];
    ctrl.ld_y_n         = load1_n[L1_Y];
    ctrl.ld_x_n         = load1_n[L1_X];
    ctrl.ld_a_n         = load1_n[L1_A];
    ctrl.ld_sphi_n      = load0_n[L0_SPHI];
    ctrl.ld_spbank_n    = load0_n[L0_SPBANK];
    ctrl.ld_arlo_n      = load0_n[L0_ARLO];
    ctrl.ld_arhi_n      = load0_n[L0_ARHI];
    ctrl.ld_arbank_n    = load0_n[L0_ARBANK];
    ctrl.ld_pclo_n      = load0_n[L0_PCLO];
    ctrl.ld_pchi_n      = load0_n[L0_PCHI];
    ctrl.ld_pcbank_n    = load0_n[L0_PCBANK];
    ctrl.en_alu_a_n     = alu_a_n[LSEL_A];
    ctrl.en_alu_x_n     = alu_a_n[LSEL_X];
    ctrl.en_alu_0_n     = alu_a_n[LSEL_ZERO];
    ctrl.en_alu_t_n     = alu_b_n[RSEL_T];
    ctrl.en_alu_adrlo_n = alu_b_n[RSEL_ADRLO];
    ctrl.en_alu_adrhi_n = alu_b_n[RSEL_ADRHI];
    ctrl.en_alu_adrbank_n = alu_b_n[RSEL_ADRBANK];
    ctrl.cntpc_n        = cnt_n[CNT_PC];
    ctrl.cntar_n        = cnt_n[CNT_AR];
    ctrl.cntsp_n        = uw.cntsp_n;
    ctrl.spdir          = uw.spdir_iedata;
    ctrl.adrsel_pc_n    = asel_n[ASEL_PC];
    ctrl.adrsel_ar_n    = asel_n[ASEL_AR];
    ctrl.adrsel_sp_n    = asel_n[ASEL_SP];
    ctrl.dralu_n        = uw.dralu_n;
    ctrl.alu_func       = uw.alu_func;
    ctrl.alu_mode       = uw.alu_mode;
    ctrl.alu_cin        = uw.alu_cin;
    ctrl.cc_s0          = uw.cc_s0;
    ctrl.cc_s1          = uw.cc_s1;
  end
endmodule
