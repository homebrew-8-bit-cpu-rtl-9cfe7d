// cpu_pkg: types and constants shared by the microcoded 8-bit CPU.
//
// The control store is three 8-bit microcode ROMs read side by side, giving a
// 24-bit microword.  The packed struct below names its fields in ROM2..ROM0,
// bit 7..0 order.  Field meanings (which decoder output drives which enable)
// follow the control-module schematic; the exact bit order of the fields
// inside each ROM byte is this design's reading of that schematic.
//
// The microcode address is {opcode[7:0], phase[3:0], V, Z, N, C, carry_a}
// (17 bits, one 128K x 8 flash per microword byte).
package cpu_pkg;

  localparam int unsigned UADDR_W = 17;   // 29F010: 128K x 8
  localparam int unsigned ADDR_W  = 24;   // 16 MB address space

  // Left ALU operand select (74LS139 "ALUINA", outputs Y0..Y3)
  typedef enum logic [1:0] {
    LSEL_ZERO  = 2'd0,   // /EN_ALU_0
    LSEL_X     = 2'd1,   // /EN_ALU_X
    LSEL_YORX7 = 2'd2,   // /EN_ALU_Y_OR_X7 (Y or X7, see control GAL)
    LSEL_A     = 2'd3    // /EN_ALU_A
  } lsel_e;

  // Right ALU operand select (74LS139 "ALUINB")
  typedef enum logic [1:0] {
    RSEL_ADRBANK = 2'd0,
    RSEL_ADRHI   = 2'd1,
    RSEL_ADRLO   = 2'd2,
    RSEL_T       = 2'd3
  } rsel_e;

  // Count / interrupt-enable strobe select (74LS139 "ADRSEL_CNT/A")
  typedef enum logic [1:0] {
    CNT_LD_IE = 2'd0,
    CNT_AR    = 2'd1,
    CNT_PC    = 2'd2,
    CNT_NONE  = 2'd3
  } cntsel_e;

  // Address bus source select (74LS139 "ADRSEL_CNT/B")
  typedef enum logic [1:0] {
    ASEL_NONE = 2'd0,
    ASEL_SP   = 2'd1,
    ASEL_AR   = 2'd2,
    ASEL_PC   = 2'd3
  } asel_e;

  // Destination field: {load3, load[2:0]}.  load3 = 1 enables decoder LOAD1
  // (data destinations plus SPLO), load3 = 0 enables LOAD0 (address bytes).
  localparam logic [2:0] L1_MEM  = 3'd0, L1_SPLO = 3'd1, L1_T = 3'd2,
                         L1_Y    = 3'd3, L1_X    = 3'd4, L1_A = 3'd5,
                         L1_NONE = 3'd7;
  localparam logic [2:0] L0_SPHI = 3'd0, L0_SPBANK = 3'd1, L0_ARLO = 3'd2,
                         L0_ARHI = 3'd3, L0_ARBANK = 3'd4, L0_PCLO = 3'd5,
                         L0_PCHI = 3'd6, L0_PCBANK = 3'd7;

  typedef struct packed {
    // ROM2
    lsel_e       lsel;        // D7:D6
    rsel_e       rsel;        // D5:D4
    logic [2:0]  load;        // D3:D1 (decoder C,B,A)
    logic        load3;       // D0
    // ROM1
    logic [3:0]  alu_func;    // D7:D4 (74LS181 S3..S0)
    logic        alu_mode;    // D3    (74LS181 M)
    logic        alu_cin;     // D2    (74LS181 Cn, active low carry)
    logic        cc_s0;       // D1
    logic        cc_s1;       // D0
    // ROM0
    cntsel_e     cntsel;      // D7:D6
    asel_e       asel;        // D5:D4
    logic        cntsp_n;     // D3
    logic        spdir_iedata;// D2
    logic        dralu_n;     // D1
    logic        ldop_n;      // D0
  } uword_t;

  // Active-low control strobes decoded from the microword.
  typedef struct packed {
    logic ld_a_n, ld_x_n, ld_y_n, ld_t_n, ld_mem_n;
    logic ld_splo_n, ld_sphi_n, ld_spbank_n;
    logic ld_arlo_n, ld_arhi_n, ld_arbank_n;
    logic ld_pclo_n, ld_pchi_n, ld_pcbank_n;
    logic en_alu_a_n, en_alu_y_n, en_alu_x_n, en_alu_x7_n, en_alu_0_n;
    logic en_alu_xorx7or0_n;
    logic en_alu_t_n, en_alu_adrlo_n, en_alu_adrhi_n, en_alu_adrbank_n;
    logic cntpc_n, cntar_n, cntsp_n, spdir;
    logic adrsel_pc_n, adrsel_ar_n, adrsel_sp_n;
    logic dralu_n, en_membuf_n, oe_mem_n, we_mem_n;
    logic [3:0] alu_func;
    logic alu_mode, alu_cin, cc_s0, cc_s1;
  } ctrl_t;

endpackage
