// gcpu_pkg: types and constants shared by the G-CPU blocks.
//
// The G-CPU is a small accumulator machine with an 8-bit bidirectional data
// bus, a 16-bit address bus and a 6-bit opcode. This package holds the
// select-code enums for the ALU input muxes (MSA, MSB), the ALU function
// (MSC), the address bus mux (ADDR_SEL), the opcode map and the control word
// the controller sends to the datapath.
//
// Taken from the G-CPU block diagram: the 2-bit MSA/MSB selects, the 4-bit
// MSC select (16 functions), the ADDR_SEL input order (0 PC, 1 MAR, 2 X
// block, 3 Y block) and the list of control lines in the control word.
// Taken from the ASM charts and instruction examples: opcodes 00 TAB, 01 TBA,
// 02 LDAA #, 03 LDAB #, 04 LDAA addr, 08 LDX #, 0C LDAA dd,X and 0D LDAA dd,Y.
// The remaining opcodes, the MSA/MSB codes and the ALU function list are
// this design's own choices (the 16 functions are not listed anywhere); the
// instruction names follow the style of SUM_BA and SHFA_L.
package gcpu_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 16;
  localparam int unsigned IR_W   = 6;

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [IR_W-1:0]   opcode_t;

  // MUXA: next value of register A.
  typedef enum logic [1:0] {
    MSA_HOLD = 2'b00,   // keep A (protects A when not in use)
    MSA_BUS  = 2'b01,   // load from the data bus
    MSA_B    = 2'b10,   // copy B
    MSA_ALU  = 2'b11    // load the MUXC result
  } msa_e;

  // MUXB: next value of register B.
  typedef enum logic [1:0] {
    MSB_HOLD = 2'b00,
    MSB_BUS  = 2'b01,
    MSB_A    = 2'b10,
    MSB_ALU  = 2'b11
  } msb_e;

  // MUXC: the 16 ALU functions. Shifts and unary functions act on A.
  typedef enum logic [3:0] {
    ALU_PASSA = 4'h0,   // A
    ALU_PASSB = 4'h1,   // B
    ALU_ADD   = 4'h2,   // A + B          (SUM_BA)
    ALU_SUB   = 4'h3,   // A - B          (SUB_AB)
    ALU_AND   = 4'h4,   // A & B          (AND_BA)
    ALU_OR    = 4'h5,   // A | B          (OR_BA)
    ALU_XOR   = 4'h6,   // A ^ B          (XOR_BA)
    ALU_COMA  = 4'h7,   // ~A             (COMP_A)
    ALU_NEGA  = 4'h8,   // -A             (NEG_A)
    ALU_SHL   = 4'h9,   // A << 1         (SHFA_L)
    ALU_SHR   = 4'hA,   // A >> 1 logical (SHFA_R)
    ALU_ASR   = 4'hB,   // A >> 1 arith.  (ASHFA_R)
    ALU_ROL   = 4'hC,   // rotate A left  (ROTA_L)
    ALU_ROR   = 4'hD,   // rotate A right (ROTA_R)
    ALU_INCA  = 4'hE,   // A + 1          (INC_A)
    ALU_DECA  = 4'hF    // A - 1          (DEC_A)
  } alu_fn_e;

  // Address bus mux select, in the order printed on the block diagram.
  typedef enum logic [1:0] {
    ASEL_PC  = 2'b00,
    ASEL_MAR = 2'b01,
    ASEL_X   = 2'b10,
    ASEL_Y   = 2'b11
  } addr_sel_e;

  // Opcode map. The first group (marked *) is fixed by the charts and the
  // machine-code example; the rest is this design's assignment.
  localparam opcode_t OP_TAB      = 6'h00;  // * A => B
  localparam opcode_t OP_TBA      = 6'h01;  // * B => A
  localparam opcode_t OP_LDAA_IMM = 6'h02;  // * LDAA #mm
  localparam opcode_t OP_LDAB_IMM = 6'h03;  // * LDAB #mm
  localparam opcode_t OP_LDAA_EXT = 6'h04;  // * LDAA hhll
  localparam opcode_t OP_LDAB_EXT = 6'h05;  //   LDAB hhll
  localparam opcode_t OP_STAA_EXT = 6'h06;  //   STAA hhll
  localparam opcode_t OP_STAB_EXT = 6'h07;  //   STAB hhll
  localparam opcode_t OP_LDX_IMM  = 6'h08;  // * LDX #jjll
  localparam opcode_t OP_LDY_IMM  = 6'h09;  //   LDY #jjll
  localparam opcode_t OP_LDX_EXT  = 6'h0A;  //   LDX hhll
  localparam opcode_t OP_LDY_EXT  = 6'h0B;  //   LDY hhll
  localparam opcode_t OP_LDAA_X   = 6'h0C;  // * LDAA dd,X
  localparam opcode_t OP_LDAA_Y   = 6'h0D;  // * LDAA dd,Y
  localparam opcode_t OP_LDAB_X   = 6'h0E;  //   LDAB dd,X
  localparam opcode_t OP_LDAB_Y   = 6'h0F;  //   LDAB dd,Y
  localparam opcode_t OP_STAA_X   = 6'h10;  //   STAA dd,X
  localparam opcode_t OP_STAA_Y   = 6'h11;  //   STAA dd,Y
  localparam opcode_t OP_STAB_X   = 6'h12;  //   STAB dd,X
  localparam opcode_t OP_STAB_Y   = 6'h13;  //   STAB dd,Y
  localparam opcode_t OP_INX      = 6'h14;  //   X + 1 => X
  localparam opcode_t OP_INY      = 6'h15;  //   Y + 1 => Y
  localparam opcode_t OP_BEQ      = 6'h18;  //   branch if Z (PC_L <= bb)
  localparam opcode_t OP_BP       = 6'h19;  //   branch if not N (PC_L <= bb)
  // 6'h20 | fn: A <= MUXC(fn) for the ALU functions 2..15 (inherent).
  localparam opcode_t OP_ALU_BASE = 6'h20;

  // Control word, one field per control line of the block diagram.
  typedef struct packed {
    logic      ir_ld;
    logic      pc_inc;
    logic      pc_ld_u;
    logic      pc_ld_l;
    logic      mar_inc;
    logic      mar_ld_u;
    logic      mar_ld_l;
    logic      x_inc;
    logic      x_ld_u;
    logic      x_ld_l;
    logic      y_inc;
    logic      y_ld_u;
    logic      y_ld_l;
    logic      xd_ld;
    logic      yd_ld;
    logic      rw;        // 1 = read cycle, 0 = write cycle (R/-W)
    addr_sel_e addr_sel;
    msa_e      msa;
    msb_e      msb;
    alu_fn_e   msc;
  } ctrl_t;

  // Idle control word: read cycle, PC on the address bus, A and B held.
  localparam ctrl_t CTRL_IDLE = '{
    rw: 1'b1, addr_sel: ASEL_PC, msa: MSA_HOLD, msb: MSB_HOLD,
    msc: ALU_PASSA, default: 1'b0
  };

endpackage
