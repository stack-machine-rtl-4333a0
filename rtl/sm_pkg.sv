// sm_pkg: types and constants shared by the stack machine.
//
// The machine is an 8-bit stack computer with a 16 KB byte memory. Code and
// data grow upward from 0x0000 to 0x2FFF; the stack segment starts at 0x3FFF
// and grows down towards 0x3000. Instructions are one to three bytes: an
// opcode byte followed by an 8-bit immediate/port number or a little-endian
// 16-bit address/immediate.
//
// This package holds
//   * the opcode encoding (from the instruction encoding table),
//   * the ALU operation codes and the flag struct (C, O, S, Z),
//   * the micro-program: for every opcode, the ordered list of micro-steps
//     (pop, push, memory read/write, ALU step, jump) that the control unit
//     walks through, one micro-step per clock. The step lists follow the
//     published micro-step descriptions; how each step maps onto a single
//     memory port is this design's choice,
//   * the clock-unit cost of every opcode from the instruction table, which
//     the control unit can use to stretch an instruction to its published
//     execution time.
package sm_pkg;

  // ---------------------------------------------------------------- memory map
  localparam int unsigned MEM_ADDR_W   = 14;        // 16 KB
  localparam logic [15:0] STACK_TOP    = 16'h3FFF;  // first push goes here
  localparam logic [15:0] STACK_BOTTOM = 16'h3000;  // lowest stack byte
  localparam int unsigned IO_PORTS     = 256;

  // ----------------------------------------------------------------- opcodes
  typedef enum logic [7:0] {
    OP_LDI  = 8'h00, OP_LDIW = 8'h01, OP_LDD  = 8'h02, OP_LDDW = 8'h03,
    OP_LDA  = 8'h04, OP_STA  = 8'h05, OP_STD  = 8'h06, OP_STDW = 8'h07,
    OP_IN   = 8'h08, OP_OUT  = 8'h09,
    OP_MUL  = 8'h10, OP_MULW = 8'h11, OP_DIV  = 8'h12, OP_DIVW = 8'h13,
    OP_SUB  = 8'h14, OP_SUBW = 8'h15, OP_ADD  = 8'h16, OP_ADDW = 8'h17,
    OP_INC  = 8'h18, OP_INCW = 8'h19, OP_DEC  = 8'h1A, OP_DECW = 8'h1B,
    OP_CALL = 8'h20, OP_RET  = 8'h21,
    OP_JMP  = 8'h30, OP_JMR  = 8'h31, OP_JZ   = 8'h32, OP_JNZ  = 8'h33,
    OP_JO   = 8'h34, OP_JNO  = 8'h35, OP_JC   = 8'h36, OP_JNC  = 8'h37,
    OP_JS   = 8'h38, OP_JNS  = 8'h39,
    OP_NOP  = 8'h40, OP_HLT  = 8'h41,
    OP_SHL  = 8'h50, OP_SHLW = 8'h51, OP_SHR  = 8'h52, OP_SHRW = 8'h53,
    OP_ROL  = 8'h54, OP_ROLW = 8'h55, OP_ROR  = 8'h56, OP_RORW = 8'h57,
    OP_AND  = 8'h60, OP_ANDW = 8'h61, OP_OR   = 8'h62, OP_ORW  = 8'h63,
    OP_NOT  = 8'h64, OP_NOTW = 8'h65, OP_XOR  = 8'h66, OP_XORW = 8'h67,
    OP_CMP  = 8'h68, OP_CMPW = 8'h69, OP_LDAW = 8'h6A, OP_STAW = 8'h6B
  } opcode_e;

  // ------------------------------------------------------------ ALU and flags
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_INC, ALU_DEC,
    ALU_AND, ALU_OR,  ALU_XOR, ALU_NOT, ALU_SHL, ALU_SHR,
    ALU_ROL, ALU_ROR
  } alu_op_e;

  typedef struct packed {
    logic c;   // carry / borrow / bit shifted out
    logic o;   // signed overflow, or divide by zero
    logic s;   // sign
    logic z;   // zero
  } flags_t;

  // ------------------------------------------------------------- micro-steps
  typedef enum logic [3:0] {
    U_END,    // no more steps
    U_OPND,   // AR[byte] <= MEM[PC]; PC++            (operand fetch)
    U_POPA,   // A[byte]  <= MEM[SP+1]; SP++         (pop into ALU latch A)
    U_POPB,   // B[byte]  <= MEM[SP+1]; SP++         (pop into ALU latch B)
    U_ALU,    // C <= A op B; update flags
    U_PUSH,   // MEM[SP] <= source; SP--
    U_RDT,    // T[byte]  <= MEM[address]            (pointer read)
    U_RDD,    // D[byte]  <= MEM[address]            (data read)
    U_WR,     // MEM[address] <= A[byte]
    U_IN,     // MEM[SP] <= IO[AR.lo]; SP--
    U_OUT,    // IO[AR.lo] <= A.lo
    U_JCC,    // if condition(IR) PC <= AR
    U_JMR,    // PC <= PC + sign-extended AR.lo
    U_CALLJ,  // MEM[SP] <= PC.lo; SP--; PC <= AR
    U_RET,    // PC <= A
    U_HLT     // stop
  } uop_kind_e;

  typedef enum logic [1:0] {ASEL_AR, ASEL_AR1, ASEL_T, ASEL_T1} asel_e;

  typedef enum logic [2:0] {
    SRC_AR, SRC_C, SRC_R, SRC_D, SRC_PC
  } psrc_e;

  typedef struct packed {
    uop_kind_e kind;
    logic      hi;     // byte select: 0 = low byte, 1 = high byte
    asel_e     asel;   // address for U_RDT, U_RDD, U_WR
    psrc_e     src;    // source for U_PUSH
  } uop_t;

  localparam int unsigned MAX_STEPS = 10;

  function automatic uop_t mk(uop_kind_e k, logic hi = 1'b0,
                              asel_e a = ASEL_AR, psrc_e s = SRC_AR);
    uop_t u;
    u.kind = k; u.hi = hi; u.asel = a; u.src = s;
    return u;
  endfunction

  // Opcode classes used by the micro-program.
  function automatic logic is_word_op(logic [7:0] op);
    // ALU instructions whose low opcode bit selects the 16-bit form
    return ((op[7:4] == 4'h1) || (op[7:4] == 4'h5) || (op[7:4] == 4'h6 && op[3:0] <= 4'h9))
           && op[0];
  endfunction

  function automatic logic is_alu_binary(logic [7:0] op);
    case (op)
      OP_ADD, OP_ADDW, OP_SUB, OP_SUBW, OP_MUL, OP_MULW, OP_DIV, OP_DIVW,
      OP_AND, OP_ANDW, OP_OR, OP_ORW, OP_XOR, OP_XORW, OP_CMP, OP_CMPW:
        return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic is_alu_unary(logic [7:0] op);
    case (op)
      OP_INC, OP_INCW, OP_DEC, OP_DECW, OP_NOT, OP_NOTW,
      OP_SHL, OP_SHLW, OP_SHR, OP_SHRW, OP_ROL, OP_ROLW, OP_ROR, OP_RORW:
        return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic alu_op_e alu_op_of(logic [7:0] op);
    case (op)
      OP_ADD, OP_ADDW: return ALU_ADD;
      OP_SUB, OP_SUBW, OP_CMP, OP_CMPW: return ALU_SUB;
      OP_MUL, OP_MULW: return ALU_MUL;
      OP_DIV, OP_DIVW: return ALU_DIV;
      OP_INC, OP_INCW: return ALU_INC;
      OP_DEC, OP_DECW: return ALU_DEC;
      OP_AND, OP_ANDW: return ALU_AND;
      OP_OR,  OP_ORW:  return ALU_OR;
      OP_XOR, OP_XORW: return ALU_XOR;
      OP_NOT, OP_NOTW: return ALU_NOT;
      OP_SHL, OP_SHLW: return ALU_SHL;
      OP_SHR, OP_SHRW: return ALU_SHR;
      OP_ROL, OP_ROLW: return ALU_ROL;
      default:         return ALU_ROR;
    endcase
  endfunction

  // Width of the ALU operation: MULW multiplies two bytes into a word, so its
  // operands are bytes while its result is a word.
  function automatic logic alu_word_operands(logic [7:0] op);
    return is_word_op(op) && (op != OP_MULW);
  endfunction

  function automatic logic alu_word_result(logic [7:0] op);
    return is_word_op(op);
  endfunction

  // Micro-step `step` of instruction `op`.
  function automatic uop_t uprog(logic [7:0] op, int unsigned step);
    uop_t p [MAX_STEPS];
    for (int i = 0; i < MAX_STEPS; i++) p[i] = mk(U_END);
    case (op)
      OP_LDI:  begin p[0] = mk(U_OPND); p[1] = mk(U_PUSH, 0, ASEL_AR, SRC_AR); end
      OP_LDIW: begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_PUSH, 1, ASEL_AR, SRC_AR); p[3] = mk(U_PUSH, 0, ASEL_AR, SRC_AR); end
      OP_LDD:  begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_RDD, 0, ASEL_AR); p[3] = mk(U_PUSH, 0, ASEL_AR, SRC_D); end
      OP_LDDW: begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_RDD, 0, ASEL_AR); p[3] = mk(U_RDD, 1, ASEL_AR1);
                     p[4] = mk(U_PUSH, 1, ASEL_AR, SRC_D); p[5] = mk(U_PUSH, 0, ASEL_AR, SRC_D); end
      OP_LDA:  begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_RDT, 0, ASEL_AR); p[3] = mk(U_RDT, 1, ASEL_AR1);
                     p[4] = mk(U_RDD, 0, ASEL_T);  p[5] = mk(U_PUSH, 0, ASEL_AR, SRC_D); end
      OP_LDAW: begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_RDT, 0, ASEL_AR); p[3] = mk(U_RDT, 1, ASEL_AR1);
                     p[4] = mk(U_RDD, 0, ASEL_T);  p[5] = mk(U_RDD, 1, ASEL_T1);
                     p[6] = mk(U_PUSH, 1, ASEL_AR, SRC_D); p[7] = mk(U_PUSH, 0, ASEL_AR, SRC_D); end
      OP_STD:  begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_POPA); p[3] = mk(U_WR, 0, ASEL_AR); end
      OP_STDW: begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_POPA); p[3] = mk(U_POPA, 1);
                     p[4] = mk(U_WR, 0, ASEL_AR); p[5] = mk(U_WR, 1, ASEL_AR1); end
      OP_STA:  begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_RDT, 0, ASEL_AR); p[3] = mk(U_RDT, 1, ASEL_AR1);
                     p[4] = mk(U_POPA); p[5] = mk(U_WR, 0, ASEL_T); end
      OP_STAW: begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_RDT, 0, ASEL_AR); p[3] = mk(U_RDT, 1, ASEL_AR1);
                     p[4] = mk(U_POPA); p[5] = mk(U_POPA, 1);
                     p[6] = mk(U_WR, 0, ASEL_T); p[7] = mk(U_WR, 1, ASEL_T1); end
      OP_IN:   begin p[0] = mk(U_OPND); p[1] = mk(U_IN); end
      OP_OUT:  begin p[0] = mk(U_OPND); p[1] = mk(U_POPA); p[2] = mk(U_OUT); end
      OP_CALL: begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1);
                     p[2] = mk(U_PUSH, 1, ASEL_AR, SRC_PC); p[3] = mk(U_CALLJ); end
      OP_RET:  begin p[0] = mk(U_POPA); p[1] = mk(U_POPA, 1); p[2] = mk(U_RET); end
      OP_JMR:  begin p[0] = mk(U_OPND); p[1] = mk(U_JMR); end
      OP_JMP, OP_JZ, OP_JNZ, OP_JO, OP_JNO, OP_JC, OP_JNC, OP_JS, OP_JNS:
               begin p[0] = mk(U_OPND); p[1] = mk(U_OPND, 1); p[2] = mk(U_JCC); end
      OP_HLT:  begin p[0] = mk(U_HLT); end
      OP_DIV:  begin p[0] = mk(U_POPA); p[1] = mk(U_POPB); p[2] = mk(U_ALU);
                     p[3] = mk(U_PUSH, 0, ASEL_AR, SRC_C); p[4] = mk(U_PUSH, 0, ASEL_AR, SRC_R); end
      OP_DIVW: begin p[0] = mk(U_POPA); p[1] = mk(U_POPA, 1);
                     p[2] = mk(U_POPB); p[3] = mk(U_POPB, 1); p[4] = mk(U_ALU);
                     p[5] = mk(U_PUSH, 1, ASEL_AR, SRC_C); p[6] = mk(U_PUSH, 0, ASEL_AR, SRC_C);
                     p[7] = mk(U_PUSH, 1, ASEL_AR, SRC_R); p[8] = mk(U_PUSH, 0, ASEL_AR, SRC_R); end
      default: begin
        if (is_alu_binary(op) || is_alu_unary(op)) begin
          int unsigned n;
          n = 0;
          p[n] = mk(U_POPA); n++;
          if (alu_word_operands(op)) begin p[n] = mk(U_POPA, 1); n++; end
          if (is_alu_binary(op)) begin
            p[n] = mk(U_POPB); n++;
            if (alu_word_operands(op)) begin p[n] = mk(U_POPB, 1); n++; end
          end
          p[n] = mk(U_ALU); n++;
          if (op != OP_CMP && op != OP_CMPW) begin
            if (alu_word_result(op)) begin p[n] = mk(U_PUSH, 1, ASEL_AR, SRC_C); n++; end
            p[n] = mk(U_PUSH, 0, ASEL_AR, SRC_C);
          end
        end
      end
    endcase
    return (step < MAX_STEPS) ? p[step] : mk(U_END);
  endfunction

  // Execution time in clock units from the instruction table, not counting
  // the one unit of fetch and decode. The table prints SHL as 6 and SHLW as
  // 4; every other shift/rotate pair costs 4 (byte) and 6 (word), so SHL and
  // SHLW are taken as 4 and 6.
  function automatic logic [3:0] clock_units(logic [7:0] op);
    case (op)
      OP_LDI: return 4'd3;  OP_LDIW: return 4'd4;  OP_LDD: return 4'd4;  OP_LDDW: return 4'd5;
      OP_LDA: return 4'd5;  OP_STA:  return 4'd5;  OP_STD: return 4'd4;  OP_STDW: return 4'd5;
      OP_IN:  return 4'd3;  OP_OUT:  return 4'd3;
      OP_MUL: return 4'd5;  OP_MULW: return 4'd8;  OP_DIV: return 4'd5;  OP_DIVW: return 4'd8;
      OP_SUB: return 4'd6;  OP_SUBW: return 4'd8;  OP_ADD: return 4'd6;  OP_ADDW: return 4'd9;
      OP_INC: return 4'd4;  OP_INCW: return 4'd6;  OP_DEC: return 4'd4;  OP_DECW: return 4'd6;
      OP_CALL: return 4'd4; OP_RET:  return 4'd3;
      OP_JMP: return 4'd5;  OP_JMR:  return 4'd4;
      OP_JZ, OP_JNZ, OP_JO, OP_JNO, OP_JC, OP_JNC, OP_JS, OP_JNS: return 4'd5;
      OP_NOP: return 4'd3;  OP_HLT:  return 4'd0;
      OP_SHL: return 4'd4;  OP_SHLW: return 4'd6;  OP_SHR: return 4'd4;  OP_SHRW: return 4'd6;
      OP_ROL: return 4'd4;  OP_ROLW: return 4'd6;  OP_ROR: return 4'd4;  OP_RORW: return 4'd6;
      OP_AND: return 4'd5;  OP_ANDW: return 4'd9;  OP_OR:  return 4'd6;  OP_ORW:  return 4'd9;
      OP_NOT: return 4'd5;  OP_NOTW: return 4'd7;  OP_XOR: return 4'd6;  OP_XORW: return 4'd8;
      OP_CMP: return 4'd5;  OP_CMPW: return 4'd7;  OP_LDAW: return 4'd6; OP_STAW: return 4'd6;
      default: return 4'd0;
    endcase
  endfunction

  // Jump condition of a JMP/Jcc opcode.
  function automatic logic jump_taken(logic [7:0] op, flags_t f);
    case (op)
      OP_JZ:  return  f.z;  OP_JNZ: return !f.z;
      OP_JO:  return  f.o;  OP_JNO: return !f.o;
      OP_JC:  return  f.c;  OP_JNC: return !f.c;
      OP_JS:  return  f.s;  OP_JNS: return !f.s;
      default: return 1'b1;
    endcase
  endfunction

endpackage
