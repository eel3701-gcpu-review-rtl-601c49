// gcpu_controller: the G-CPU control unit, an ASM (algorithmic state
// machine) that sequences every instruction.
//
// Every instruction starts with the same two states. In FETCH the opcode at
// the address in PC is loaded into the IR (IR_LD). In DECODE the PC is
// incremented and the opcode is examined; inherent (ALU-level) instructions
// finish here, as conditional (Mealy) outputs of this state. The other
// addressing modes add execute states:
//   immediate 8-bit   +1 state : data => A/B, INC_PC
//   immediate 16-bit  +2 states: data => index L, then index H, INC_PC each
//   extended          +3 states: addrL => MARL, addrH => MARH (INC_PC each),
//                                then access M[MAR] (ADDR_SEL = MAR)
//   extended 16-bit   +4 states: as extended, the last access is two bytes
//                                (L then H) with MAR_INC between them
//   indexed           +2 states: dd => Xdisp/Ydisp with INC_PC, then access
//                                M[X+dd] or M[Y+dd]
//   absolute (branch) +1 state : Mealy decision on the flag; PC_L <= bb if
//                                taken, else INC_PC (PC_H is never changed)
// Outside its own rows a state keeps the defaults of the ASM notes: read
// cycle (R/-W = 1), ADDR_SEL = PC, A and B held.
//
// Interface: clk, rst (synchronous, returns to FETCH; while it is high the
// control word is the idle read cycle), ir (opcode), z and n
// flags from the ALU, ctrl (the control word, combinational from state, IR
// and flags), state (for observation). Total cycles per instruction: 2, 3,
// 4, 5 or 6 as listed above.
//
// From the document: the FETCH/DECODE pair, the IR_LD and INC_PC placement,
// the extra-state counts and contents for immediate, extended, indexed and
// branch instructions, the PC_L-only branch load and the defaults. This
// design's own choices: the state encoding (a step counter; the six-bit
// state numbers in the charts are only labels), the opcodes not in the
// charts, the 16-bit extended load sequence, and that unused opcodes act as
// two-cycle no-operations.
module gcpu_controller
  import gcpu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_t ir,
  input  logic    z,
  input  logic    n,
  output ctrl_t   ctrl,
  output logic [2:0] state
);

  typedef enum logic [2:0] {
    S_FETCH  = 3'd0,
    S_DECODE = 3'd1,
    S_E1     = 3'd2,
    S_E2     = 3'd3,
    S_E3     = 3'd4,
    S_E4     = 3'd5
  } state_e;

  state_e st, st_next;

  // Opcode classes.
  logic is_imm8, is_imm16, is_ext8, is_ext16, is_idx, is_br, is_alu;
  logic use_b, use_y, is_store, br_taken;

  always_comb begin
    is_imm8  = (ir == OP_LDAA_IMM) || (ir == OP_LDAB_IMM);
    is_imm16 = (ir == OP_LDX_IMM)  || (ir == OP_LDY_IMM);
    is_ext8  = (ir >= OP_LDAA_EXT) && (ir <= OP_STAB_EXT);
    is_ext16 = (ir == OP_LDX_EXT)  || (ir == OP_LDY_EXT);
    is_idx   = (ir >= OP_LDAA_X)   && (ir <= OP_STAB_Y);
    is_br    = (ir == OP_BEQ)      || (ir == OP_BP);
    is_alu   = (ir[5:4] == 2'b10)  && (ir[3:0] >= 4'h2);
    // Field meanings inside the classes (see the opcode map).
    use_b    = is_idx ? ir[1] : ir[0];
    use_y    = ir[0];
    is_store = is_ext8 ? ir[1] : ir[4];
    br_taken = (ir == OP_BEQ) ? z : !n;
  end

  // Register-A/B load and store helpers.
  function automatic ctrl_t load_acc(ctrl_t c, logic b);
    if (b) c.msb = MSB_BUS;
    else   c.msa = MSA_BUS;
    return c;
  endfunction

  function automatic ctrl_t store_acc(ctrl_t c, logic b);
    c.rw  = 1'b0;
    c.msc = b ? ALU_PASSB : ALU_PASSA;
    return c;
  endfunction

  always_comb begin
    ctrl    = CTRL_IDLE;
    st_next = S_FETCH;
    unique case (st)
      S_FETCH: begin
        ctrl.ir_ld = 1'b1;
        st_next    = S_DECODE;
      end

      S_DECODE: begin
        ctrl.pc_inc = 1'b1;
        if (ir == OP_TAB)      ctrl.msb = MSB_A;
        else if (ir == OP_TBA) ctrl.msa = MSA_B;
        else if (ir == OP_INX) ctrl.x_inc = 1'b1;
        else if (ir == OP_INY) ctrl.y_inc = 1'b1;
        else if (is_alu) begin
          ctrl.msc = alu_fn_e'(ir[3:0]);
          ctrl.msa = MSA_ALU;
        end
        if (is_imm8 || is_imm16 || is_ext8 || is_ext16 || is_idx || is_br)
          st_next = S_E1;
      end

      S_E1: begin
        if (is_imm8) begin
          ctrl        = load_acc(ctrl, use_b);
          ctrl.pc_inc = 1'b1;
        end else if (is_imm16) begin
          if (use_y) ctrl.y_ld_l = 1'b1;
          else       ctrl.x_ld_l = 1'b1;
          ctrl.pc_inc = 1'b1;
          st_next     = S_E2;
        end else if (is_ext8 || is_ext16) begin
          ctrl.mar_ld_l = 1'b1;
          ctrl.pc_inc   = 1'b1;
          st_next       = S_E2;
        end else if (is_idx) begin
          if (use_y) ctrl.yd_ld = 1'b1;
          else       ctrl.xd_ld = 1'b1;
          ctrl.pc_inc = 1'b1;
          st_next     = S_E2;
        end else if (is_br) begin
          if (br_taken) ctrl.pc_ld_l = 1'b1;
          else          ctrl.pc_inc  = 1'b1;
        end
      end

      S_E2: begin
        if (is_imm16) begin
          if (use_y) ctrl.y_ld_u = 1'b1;
          else       ctrl.x_ld_u = 1'b1;
          ctrl.pc_inc = 1'b1;
        end else if (is_ext8 || is_ext16) begin
          ctrl.mar_ld_u = 1'b1;
          ctrl.pc_inc   = 1'b1;
          st_next       = S_E3;
        end else if (is_idx) begin
          ctrl.addr_sel = use_y ? ASEL_Y : ASEL_X;
          if (is_store) ctrl = store_acc(ctrl, use_b);
          else          ctrl = load_acc(ctrl, use_b);
        end
      end

      S_E3: begin
        ctrl.addr_sel = ASEL_MAR;
        if (is_ext16) begin
          if (use_y) ctrl.y_ld_l = 1'b1;
          else       ctrl.x_ld_l = 1'b1;
          ctrl.mar_inc = 1'b1;
          st_next      = S_E4;
        end else if (is_store) begin
          ctrl = store_acc(ctrl, use_b);
        end else begin
          ctrl = load_acc(ctrl, use_b);
        end
      end

      S_E4: begin
        ctrl.addr_sel = ASEL_MAR;
        if (use_y) ctrl.y_ld_u = 1'b1;
        else       ctrl.x_ld_u = 1'b1;
      end

      default: st_next = S_FETCH;
    endcase
    // No register loads and no write cycle while reset is held, whatever
    // the state register holds before its first clock.
    if (rst) ctrl = CTRL_IDLE;
  end

  always_ff @(posedge clk) begin
    if (rst) st <= S_FETCH;
    else     st <= st_next;
  end

  assign state = st;

  // The opcode is only loaded in a read cycle with PC on the address bus.
  a_fetch_reads: assert property (@(posedge clk) disable iff (rst)
    ctrl.ir_ld |-> (ctrl.rw && ctrl.addr_sel == ASEL_PC));
  // The IR is loaded only in the fetch state.
  a_ir_ld_fetch: assert property (@(posedge clk) disable iff (rst)
    ctrl.ir_ld |-> (st == S_FETCH));

endmodule
