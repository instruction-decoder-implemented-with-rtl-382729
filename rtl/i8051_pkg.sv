// i8051_pkg: types and the first-byte decoder shared by the fetch and decode
// stages of the pipelined 8051 front end.
//
// The 8051 opcode map is split into a "regular" part and an "irregular" part.
// Regular opcodes are the three operand-mode columns (low nibble 5 = direct,
// 6/7 = @Ri, 8..F = Rn), where the high nibble names the operation and the low
// nibble the operand; they are decoded by two small tables (row and column)
// instead of one 256-way multiplexer. Irregular opcodes (low nibble 0..4:
// jumps, calls, bit operations, accumulator-only operations, immediates) are
// decoded one by one. Which opcodes count as regular is this design's choice;
// the split itself, the eight addressing modes and the 1-3 byte instruction
// lengths follow the 8051 instruction set.
//
// The decoded control word id_ctrl_t is what the ID1 sub-stage hands to ID2:
// the operation (opcode control), two read sources (read control), one write
// destination (write control) and the operation control (operand-byte layout,
// number of remaining bytes, branch class). Their encodings are this design's.
package i8051_pkg;

  typedef logic [15:0] addr_t;
  typedef logic [7:0]  byte_t;

  // Operand locations, used for the read and write controls.
  typedef enum logic [3:0] {
    LOC_NONE,   // no operand
    LOC_A,      // accumulator
    LOC_AB,     // A and B together (MUL, DIV)
    LOC_C,      // carry flag
    LOC_RN,     // register Rn of the current bank, n = reg_idx
    LOC_IRI,    // internal RAM at @Ri, i = reg_idx
    LOC_DIR,    // direct address in the first operand byte
    LOC_DIR2,   // direct address in the second operand byte (MOV dir,dir destination)
    LOC_IMM,    // immediate data
    LOC_BIT,    // bit address
    LOC_DPTR,   // data pointer
    LOC_XRAM,   // external data RAM (MOVX)
    LOC_CODE,   // code memory (MOVC)
    LOC_STACK,  // stack (PUSH, POP, calls, returns)
    LOC_PC      // program counter as an operand (MOVC A,@A+PC)
  } loc_e;

  // Operation (opcode control).
  typedef enum logic [5:0] {
    OP_NOP, OP_ADD, OP_ADDC, OP_SUBB, OP_INC, OP_DEC, OP_ANL, OP_ORL, OP_XRL,
    OP_ANL_NOT, OP_ORL_NOT, OP_MOV, OP_XCH, OP_XCHD, OP_CLR, OP_CPL, OP_SETB,
    OP_RL, OP_RLC, OP_RR, OP_RRC, OP_SWAP, OP_DA, OP_MUL, OP_DIV,
    OP_CJNE, OP_DJNZ, OP_JBC, OP_JB, OP_JNB, OP_JC, OP_JNC, OP_JZ, OP_JNZ,
    OP_SJMP, OP_AJMP, OP_LJMP, OP_ACALL, OP_LCALL, OP_RET, OP_RETI, OP_JMP,
    OP_PUSH, OP_POP, OP_MOVX, OP_MOVC, OP_ILLEGAL
  } op_e;

  // Layout of the operand bytes that follow the opcode byte.
  typedef enum logic [3:0] {
    FMT_NONE,     // 1-byte instruction
    FMT_DIR,      // b1 = direct address
    FMT_IMM,      // b1 = immediate
    FMT_BIT,      // b1 = bit address
    FMT_REL,      // b1 = relative offset
    FMT_ABS,      // b1 = A7-A0, A10-A8 in opcode[7:5]
    FMT_LONG,     // b1 = A15-A8, b2 = A7-A0
    FMT_IMM16,    // b1 = high byte, b2 = low byte of a 16-bit immediate
    FMT_DIR_DIR,  // b1 = source direct, b2 = destination direct
    FMT_DIR_IMM,  // b1 = direct, b2 = immediate
    FMT_IMM_REL,  // b1 = immediate, b2 = relative offset
    FMT_DIR_REL,  // b1 = direct, b2 = relative offset
    FMT_BIT_REL   // b1 = bit address, b2 = relative offset
  } fmt_e;

  // Branch class, which decides how ID2 hands the next PC back to ID1.
  typedef enum logic [1:0] {
    BR_NONE,      // falls through to the next instruction
    BR_JUMP,      // unconditional, target known in ID2 (SJMP, AJMP, LJMP, ACALL, LCALL)
    BR_COND,      // conditional, target known in ID2, outcome from the jmp channel
    BR_INDIRECT   // target known only after execution (JMP @A+DPTR, RET, RETI)
  } br_e;

  typedef struct packed {
    op_e        op;       // OpcodeOut
    loc_e       src1;     // ReadOut, first source
    loc_e       src2;     // ReadOut, second source
    loc_e       dst;      // WriteOut
    fmt_e       fmt;      // OperationCtrl: operand-byte layout
    br_e        br;       // OperationCtrl: branch class
    logic [1:0] rem;      // OperationCtrl: remaining bytes, 0..2
    logic       regular;  // decoded by the regular path
    logic [2:0] reg_idx;  // n of Rn or i of @Ri
  } id_ctrl_t;

  // ID1 -> ID2
  typedef struct packed {
    id_ctrl_t ctrl;
    byte_t    opcode;
    addr_t    pc;
  } id1_pkt_t;

  // ID2 -> OF: the complete decoded instruction.
  typedef struct packed {
    id_ctrl_t ctrl;
    byte_t    opcode;
    addr_t    pc;        // address of the opcode byte
    addr_t    next_pc;   // address of the following instruction (return address)
    byte_t    dir_addr;  // direct address (source, or the only one)
    byte_t    dir2_addr; // destination direct address of MOV dir,dir
    byte_t    imm;       // 8-bit immediate
    byte_t    bit_addr;  // bit address
    logic [15:0] imm16;  // MOV DPTR,#data16
    addr_t    target;    // branch target (SJMP, AJMP, LJMP, calls, conditional)
  } of_pkt_t;

  function automatic logic [1:0] fmt_rem(fmt_e f);
    case (f)
      FMT_NONE: return 2'd0;
      FMT_DIR, FMT_IMM, FMT_BIT, FMT_REL, FMT_ABS: return 2'd1;
      default: return 2'd2;
    endcase
  endfunction

  // Regular/irregular split of the first byte, by its low nibble.
  function automatic logic is_regular(logic [3:0] lo);
    return lo >= 4'h5;
  endfunction

  function automatic id_ctrl_t ctrl(op_e op, loc_e s1, loc_e s2, loc_e d, fmt_e f, br_e b);
    id_ctrl_t c;
    c.op = op; c.src1 = s1; c.src2 = s2; c.dst = d; c.fmt = f; c.br = b;
    c.rem = fmt_rem(f); c.regular = 1'b0; c.reg_idx = 3'd0;
    return c;
  endfunction

  // Regular path: operation from the high nibble, operand from the low nibble.
  function automatic id_ctrl_t decode_regular(byte_t opc);
    id_ctrl_t c;
    loc_e x;
    fmt_e xf;
    logic col5;
    col5 = (opc[3:0] == 4'h5);
    x    = col5 ? LOC_DIR : (opc[3] ? LOC_RN : LOC_IRI);
    xf   = col5 ? FMT_DIR : FMT_NONE;
    case (opc[7:4])
      4'h0: c = ctrl(OP_INC,  x,      LOC_NONE, x,     xf, BR_NONE);
      4'h1: c = ctrl(OP_DEC,  x,      LOC_NONE, x,     xf, BR_NONE);
      4'h2: c = ctrl(OP_ADD,  LOC_A,  x,        LOC_A, xf, BR_NONE);
      4'h3: c = ctrl(OP_ADDC, LOC_A,  x,        LOC_A, xf, BR_NONE);
      4'h4: c = ctrl(OP_ORL,  LOC_A,  x,        LOC_A, xf, BR_NONE);
      4'h5: c = ctrl(OP_ANL,  LOC_A,  x,        LOC_A, xf, BR_NONE);
      4'h6: c = ctrl(OP_XRL,  LOC_A,  x,        LOC_A, xf, BR_NONE);
      4'h7: c = ctrl(OP_MOV,  LOC_IMM, LOC_NONE, x, col5 ? FMT_DIR_IMM : FMT_IMM, BR_NONE);
      4'h8: c = col5 ? ctrl(OP_MOV, LOC_DIR, LOC_NONE, LOC_DIR2, FMT_DIR_DIR, BR_NONE)
                     : ctrl(OP_MOV, x, LOC_NONE, LOC_DIR, FMT_DIR, BR_NONE);
      4'h9: c = ctrl(OP_SUBB, LOC_A,  x,        LOC_A, xf, BR_NONE);
      4'hA: c = col5 ? ctrl(OP_ILLEGAL, LOC_NONE, LOC_NONE, LOC_NONE, FMT_NONE, BR_NONE)
                     : ctrl(OP_MOV, LOC_DIR, LOC_NONE, x, FMT_DIR, BR_NONE);
      4'hB: c = col5 ? ctrl(OP_CJNE, LOC_A, LOC_DIR, LOC_NONE, FMT_DIR_REL, BR_COND)
                     : ctrl(OP_CJNE, x, LOC_IMM, LOC_NONE, FMT_IMM_REL, BR_COND);
      4'hC: c = ctrl(OP_XCH,  LOC_A,  x,        x,     xf, BR_NONE);
      4'hD: c = col5     ? ctrl(OP_DJNZ, LOC_DIR, LOC_NONE, LOC_DIR, FMT_DIR_REL, BR_COND)
              : !opc[3]  ? ctrl(OP_XCHD, LOC_A, LOC_IRI, LOC_IRI, FMT_NONE, BR_NONE)
                         : ctrl(OP_DJNZ, LOC_RN, LOC_NONE, LOC_RN, FMT_REL, BR_COND);
      4'hE: c = ctrl(OP_MOV,  x,      LOC_NONE, LOC_A, xf, BR_NONE);
      default: c = ctrl(OP_MOV, LOC_A, LOC_NONE, x,    xf, BR_NONE);
    endcase
    c.regular = 1'b1;
    c.reg_idx = opc[3] ? opc[2:0] : {2'b00, opc[0]};
    return c;
  endfunction

  // Irregular path: columns 0..4 of the opcode map, one entry each.
  function automatic id_ctrl_t decode_irregular(byte_t opc);
    id_ctrl_t c;
    if (opc[3:0] == 4'h1)
      c = opc[4] ? ctrl(OP_ACALL, LOC_NONE, LOC_NONE, LOC_STACK, FMT_ABS, BR_JUMP)
                 : ctrl(OP_AJMP,  LOC_NONE, LOC_NONE, LOC_NONE,  FMT_ABS, BR_JUMP);
    else begin
      case (opc)
        8'h00: c = ctrl(OP_NOP,  LOC_NONE, LOC_NONE, LOC_NONE, FMT_NONE, BR_NONE);
        8'h10: c = ctrl(OP_JBC,  LOC_BIT,  LOC_NONE, LOC_BIT,  FMT_BIT_REL, BR_COND);
        8'h20: c = ctrl(OP_JB,   LOC_BIT,  LOC_NONE, LOC_NONE, FMT_BIT_REL, BR_COND);
        8'h30: c = ctrl(OP_JNB,  LOC_BIT,  LOC_NONE, LOC_NONE, FMT_BIT_REL, BR_COND);
        8'h40: c = ctrl(OP_JC,   LOC_C,    LOC_NONE, LOC_NONE, FMT_REL, BR_COND);
        8'h50: c = ctrl(OP_JNC,  LOC_C,    LOC_NONE, LOC_NONE, FMT_REL, BR_COND);
        8'h60: c = ctrl(OP_JZ,   LOC_A,    LOC_NONE, LOC_NONE, FMT_REL, BR_COND);
        8'h70: c = ctrl(OP_JNZ,  LOC_A,    LOC_NONE, LOC_NONE, FMT_REL, BR_COND);
        8'h80: c = ctrl(OP_SJMP, LOC_NONE, LOC_NONE, LOC_NONE, FMT_REL, BR_JUMP);
        8'h90: c = ctrl(OP_MOV,  LOC_IMM,  LOC_NONE, LOC_DPTR, FMT_IMM16, BR_NONE);
        8'hA0: c = ctrl(OP_ORL_NOT, LOC_C, LOC_BIT,  LOC_C,    FMT_BIT, BR_NONE);
        8'hB0: c = ctrl(OP_ANL_NOT, LOC_C, LOC_BIT,  LOC_C,    FMT_BIT, BR_NONE);
        8'hC0: c = ctrl(OP_PUSH, LOC_DIR,  LOC_NONE, LOC_STACK, FMT_DIR, BR_NONE);
        8'hD0: c = ctrl(OP_POP,  LOC_STACK, LOC_NONE, LOC_DIR, FMT_DIR, BR_NONE);
        8'hE0: c = ctrl(OP_MOVX, LOC_XRAM, LOC_DPTR, LOC_A,    FMT_NONE, BR_NONE);
        8'hF0: c = ctrl(OP_MOVX, LOC_A,    LOC_DPTR, LOC_XRAM, FMT_NONE, BR_NONE);
        8'h02: c = ctrl(OP_LJMP, LOC_NONE, LOC_NONE, LOC_NONE, FMT_LONG, BR_JUMP);
        8'h12: c = ctrl(OP_LCALL, LOC_NONE, LOC_NONE, LOC_STACK, FMT_LONG, BR_JUMP);
        8'h22: c = ctrl(OP_RET,  LOC_STACK, LOC_NONE, LOC_NONE, FMT_NONE, BR_INDIRECT);
        8'h32: c = ctrl(OP_RETI, LOC_STACK, LOC_NONE, LOC_NONE, FMT_NONE, BR_INDIRECT);
        8'h42: c = ctrl(OP_ORL,  LOC_DIR,  LOC_A,    LOC_DIR,  FMT_DIR, BR_NONE);
        8'h52: c = ctrl(OP_ANL,  LOC_DIR,  LOC_A,    LOC_DIR,  FMT_DIR, BR_NONE);
        8'h62: c = ctrl(OP_XRL,  LOC_DIR,  LOC_A,    LOC_DIR,  FMT_DIR, BR_NONE);
        8'h72: c = ctrl(OP_ORL,  LOC_C,    LOC_BIT,  LOC_C,    FMT_BIT, BR_NONE);
        8'h82: c = ctrl(OP_ANL,  LOC_C,    LOC_BIT,  LOC_C,    FMT_BIT, BR_NONE);
        8'h92: c = ctrl(OP_MOV,  LOC_C,    LOC_NONE, LOC_BIT,  FMT_BIT, BR_NONE);
        8'hA2: c = ctrl(OP_MOV,  LOC_BIT,  LOC_NONE, LOC_C,    FMT_BIT, BR_NONE);
        8'hB2: c = ctrl(OP_CPL,  LOC_BIT,  LOC_NONE, LOC_BIT,  FMT_BIT, BR_NONE);
        8'hC2: c = ctrl(OP_CLR,  LOC_NONE, LOC_NONE, LOC_BIT,  FMT_BIT, BR_NONE);
        8'hD2: c = ctrl(OP_SETB, LOC_NONE, LOC_NONE, LOC_BIT,  FMT_BIT, BR_NONE);
        8'hE2, 8'hE3: c = ctrl(OP_MOVX, LOC_XRAM, LOC_RN, LOC_A, FMT_NONE, BR_NONE);
        8'hF2, 8'hF3: c = ctrl(OP_MOVX, LOC_A, LOC_RN, LOC_XRAM, FMT_NONE, BR_NONE);
        8'h03: c = ctrl(OP_RR,   LOC_A,    LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        8'h13: c = ctrl(OP_RRC,  LOC_A,    LOC_C,    LOC_A,    FMT_NONE, BR_NONE);
        8'h23: c = ctrl(OP_RL,   LOC_A,    LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        8'h33: c = ctrl(OP_RLC,  LOC_A,    LOC_C,    LOC_A,    FMT_NONE, BR_NONE);
        8'h43: c = ctrl(OP_ORL,  LOC_DIR,  LOC_IMM,  LOC_DIR,  FMT_DIR_IMM, BR_NONE);
        8'h53: c = ctrl(OP_ANL,  LOC_DIR,  LOC_IMM,  LOC_DIR,  FMT_DIR_IMM, BR_NONE);
        8'h63: c = ctrl(OP_XRL,  LOC_DIR,  LOC_IMM,  LOC_DIR,  FMT_DIR_IMM, BR_NONE);
        8'h73: c = ctrl(OP_JMP,  LOC_A,    LOC_DPTR, LOC_NONE, FMT_NONE, BR_INDIRECT);
        8'h83: c = ctrl(OP_MOVC, LOC_CODE, LOC_PC,   LOC_A,    FMT_NONE, BR_NONE);
        8'h93: c = ctrl(OP_MOVC, LOC_CODE, LOC_DPTR, LOC_A,    FMT_NONE, BR_NONE);
        8'hA3: c = ctrl(OP_INC,  LOC_DPTR, LOC_NONE, LOC_DPTR, FMT_NONE, BR_NONE);
        8'hB3: c = ctrl(OP_CPL,  LOC_C,    LOC_NONE, LOC_C,    FMT_NONE, BR_NONE);
        8'hC3: c = ctrl(OP_CLR,  LOC_NONE, LOC_NONE, LOC_C,    FMT_NONE, BR_NONE);
        8'hD3: c = ctrl(OP_SETB, LOC_NONE, LOC_NONE, LOC_C,    FMT_NONE, BR_NONE);
        8'h04: c = ctrl(OP_INC,  LOC_A,    LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        8'h14: c = ctrl(OP_DEC,  LOC_A,    LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        8'h24: c = ctrl(OP_ADD,  LOC_A,    LOC_IMM,  LOC_A,    FMT_IMM, BR_NONE);
        8'h34: c = ctrl(OP_ADDC, LOC_A,    LOC_IMM,  LOC_A,    FMT_IMM, BR_NONE);
        8'h44: c = ctrl(OP_ORL,  LOC_A,    LOC_IMM,  LOC_A,    FMT_IMM, BR_NONE);
        8'h54: c = ctrl(OP_ANL,  LOC_A,    LOC_IMM,  LOC_A,    FMT_IMM, BR_NONE);
        8'h64: c = ctrl(OP_XRL,  LOC_A,    LOC_IMM,  LOC_A,    FMT_IMM, BR_NONE);
        8'h74: c = ctrl(OP_MOV,  LOC_IMM,  LOC_NONE, LOC_A,    FMT_IMM, BR_NONE);
        8'h84: c = ctrl(OP_DIV,  LOC_AB,   LOC_NONE, LOC_AB,   FMT_NONE, BR_NONE);
        8'h94: c = ctrl(OP_SUBB, LOC_A,    LOC_IMM,  LOC_A,    FMT_IMM, BR_NONE);
        8'hA4: c = ctrl(OP_MUL,  LOC_AB,   LOC_NONE, LOC_AB,   FMT_NONE, BR_NONE);
        8'hB4: c = ctrl(OP_CJNE, LOC_A,    LOC_IMM,  LOC_NONE, FMT_IMM_REL, BR_COND);
        8'hC4: c = ctrl(OP_SWAP, LOC_A,    LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        8'hD4: c = ctrl(OP_DA,   LOC_A,    LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        8'hE4: c = ctrl(OP_CLR,  LOC_NONE, LOC_NONE, LOC_A,    FMT_NONE, BR_NONE);
        default: c = ctrl(OP_CPL, LOC_A,   LOC_NONE, LOC_A,    FMT_NONE, BR_NONE); // F4
      endcase
    end
    c.regular = 1'b0;
    c.reg_idx = {2'b00, opc[0]};
    return c;
  endfunction

  function automatic id_ctrl_t decode(byte_t opc);
    return is_regular(opc[3:0]) ? decode_regular(opc) : decode_irregular(opc);
  endfunction

endpackage
