// tb_sm_random: random programs run on the stack machine against a
// reference model of the instruction set.
//
// Each round builds a random program with the assembler: pushes (LDI, LDIW,
// LDD, LDDW, LDA, LDAW, IN), stores (STD, STDW, STA, STAW, OUT), every byte
// and word ALU instruction, conditional and unconditional jumps, JMR, CALL
// to a small subroutine, and NOP, ending in HLT. The generator tracks the
// stack depth so that no instruction pops below the program's own data, and
// biases pushed immediates towards 0, 0x7F, 0x80 and 0xFF so that carries,
// overflows and divides by zero occur. Memory outside the program starts
// with random bytes, and the input ports hold random values.
//
// The reference model below is a plain instruction-level interpreter written
// from the instruction descriptions, independent of the micro-program: it
// executes one whole instruction at a time on its own copy of memory. At
// every instruction boundary (the cycle `instr_start` is high) the test
// compares the DUT's PC, SP and flags with the model, and checks the length
// of the instruction that just ended. Every output-port write is checked
// against the value and port the model expects. After HLT the whole 16 KB
// memory is read back through the host port and compared byte for byte.
//
// Each mechanism (divide by zero, carry, overflow, jumps taken and not
// taken, calls, port reads and writes) is counted and must occur at least
// once over all rounds. Runs at the default parameters.
module tb_sm_random;
  import sm_pkg::*;
  import sm_asm_pkg::*;

  localparam int unsigned ROUNDS = 24;
  localparam int unsigned NINSTR = 400;      // generated instructions per round
  localparam int unsigned DATA   = 32'h2000; // byte data area, 256 bytes
  localparam int unsigned PTRS   = 32'h2100; // 16 pointers into the data area
  localparam int unsigned MEMSZ  = 16384;

  logic              clk = 1'b0, rst;
  logic              host_en, host_we;
  logic [15:0]       host_addr;
  logic [7:0]        host_wdata, host_rdata;
  logic [255:0][7:0] port_in, port_out;
  logic [255:0]      port_wstb;
  logic              halted, instr_start, stretch;
  logic [15:0]       pc, sp;
  logic [7:0]        ir;
  flags_t            flags;

  int checks = 0, failures = 0;

  stack_machine dut (.clk, .rst, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
                     .port_in, .port_out, .port_wstb, .halted, .instr_start, .stretch,
                     .pc, .sp, .ir, .flags);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- reference model
  byte unsigned m_mem [MEMSZ];
  byte unsigned m_in  [256];
  logic [15:0]  m_pc, m_sp;
  flags_t       m_f;
  logic         m_halted;
  int           exp_port [$];
  int           exp_val  [$];
  int n_divzero = 0, n_carry = 0, n_ovf = 0, n_taken = 0, n_not_taken = 0;
  int n_call = 0, n_in = 0, n_out = 0;

  function automatic byte unsigned rd(int unsigned a);
    return m_mem[a % MEMSZ];
  endfunction

  function automatic void wr(int unsigned a, byte unsigned d);
    m_mem[a % MEMSZ] = d;
  endfunction

  function automatic void push(byte unsigned d);
    wr(m_sp, d);
    m_sp--;
  endfunction

  function automatic byte unsigned pop();
    m_sp++;
    return rd(m_sp);
  endfunction

  function automatic void pushw(int unsigned w);
    push(8'(w >> 8));
    push(8'(w));
  endfunction

  function automatic int unsigned popw();
    int unsigned lo;
    lo = pop();
    return (int'(pop()) << 8) | lo;
  endfunction

  // One ALU operation of width `bits` (8 or 16). Returns the result; sets
  // the flags it changes.
  function automatic int unsigned alu(byte unsigned op, int unsigned a, int unsigned b,
                                      int unsigned bits, output int unsigned rem);
    int unsigned mask, top, r;
    mask = (1 << bits) - 1;
    top  = 1 << (bits - 1);
    rem  = 0;
    r    = 0;
    case (op)
      OP_ADD, OP_ADDW: begin
        r = a + b;
        m_f.c = r > mask;
        r &= mask;
        m_f.o = ((a & top) == (b & top)) && ((r & top) != (a & top));
      end
      OP_SUB, OP_SUBW, OP_CMP, OP_CMPW: begin
        r = (a - b) & mask;
        m_f.c = a < b;
        m_f.o = ((a & top) != (b & top)) && ((r & top) != (a & top));
      end
      OP_INC, OP_INCW: begin
        r = (a + 1) & mask;
        m_f.c = a == mask;
        m_f.o = a == top - 1;
      end
      OP_DEC, OP_DECW: begin
        r = (a - 1) & mask;
        m_f.c = a == 0;
        m_f.o = a == top;
      end
      OP_MUL: begin
        r = a * b;
        m_f.c = r > 255;
        m_f.o = m_f.c;
        r &= 255;
      end
      OP_MULW: begin
        r = a * b;
        m_f.c = 1'b0;
        m_f.o = 1'b0;
      end
      OP_DIV, OP_DIVW: begin
        m_f.c = 1'b0;
        m_f.o = b == 0;
        r   = (b == 0) ? mask : a / b;
        rem = (b == 0) ? a : a % b;
      end
      OP_AND, OP_ANDW: begin r = a & b; m_f.c = 1'b0; m_f.o = 1'b0; end
      OP_OR,  OP_ORW:  begin r = a | b; m_f.c = 1'b0; m_f.o = 1'b0; end
      OP_XOR, OP_XORW: begin r = a ^ b; m_f.c = 1'b0; m_f.o = 1'b0; end
      OP_NOT, OP_NOTW: begin r = ~a & mask; m_f.c = 1'b0; m_f.o = 1'b0; end
      OP_SHL, OP_SHLW: begin r = (a << 1) & mask; m_f.c = (a & top) != 0; m_f.o = 1'b0; end
      OP_SHR, OP_SHRW: begin r = a >> 1; m_f.c = a[0]; m_f.o = 1'b0; end
      OP_ROL, OP_ROLW: begin
        m_f.c = (a & top) != 0;
        return ((a << 1) & mask) | int'(m_f.c);
      end
      OP_ROR, OP_RORW: begin
        m_f.c = a[0];
        return (a >> 1) | (m_f.c ? top : 0);
      end
      default: ;
    endcase
    m_f.z = r == 0;
    case (op)
      OP_SUB, OP_SUBW, OP_CMP, OP_CMPW, OP_DEC, OP_DECW: m_f.s = m_f.c;
      OP_MULW: m_f.s = r[15];
      default: m_f.s = (r & top) != 0;
    endcase
    if (m_f.c) n_carry++;
    if (m_f.o) n_ovf++;
    return r;
  endfunction

  // Execute the instruction at m_pc.
  function automatic void step();
    byte unsigned op, b1;
    int unsigned  w, a, b, r, rem, ptr;
    logic         take;
    op = rd(m_pc);
    b1 = rd(m_pc + 1);
    w  = {rd(m_pc + 2), b1};
    ptr = {rd(w + 1), rd(w)};
    case (op)
      OP_LDI:  begin push(b1); m_pc += 2; end
      OP_LDIW: begin pushw(w); m_pc += 3; end
      OP_LDD:  begin push(rd(w)); m_pc += 3; end
      OP_LDDW: begin push(rd(w + 1)); push(rd(w)); m_pc += 3; end
      OP_LDA:  begin push(rd(ptr)); m_pc += 3; end
      OP_LDAW: begin push(rd(ptr + 1)); push(rd(ptr)); m_pc += 3; end
      OP_STD:  begin wr(w, pop()); m_pc += 3; end
      OP_STDW: begin wr(w, pop()); wr(w + 1, pop()); m_pc += 3; end
      OP_STA:  begin wr(ptr, pop()); m_pc += 3; end
      OP_STAW: begin wr(ptr, pop()); wr(ptr + 1, pop()); m_pc += 3; end
      OP_IN:   begin push(m_in[b1]); m_pc += 2; n_in++; end
      OP_OUT:  begin exp_port.push_back(b1); exp_val.push_back(pop()); m_pc += 2; n_out++; end
      OP_CALL: begin pushw(m_pc + 3); m_pc = w; n_call++; end
      OP_RET:  m_pc = popw();
      OP_JMR:  m_pc = m_pc + 2 + {{8{b1[7]}}, b1};
      OP_JMP, OP_JZ, OP_JNZ, OP_JO, OP_JNO, OP_JC, OP_JNC, OP_JS, OP_JNS: begin
        case (op)
          OP_JZ:  take =  m_f.z;  OP_JNZ: take = !m_f.z;
          OP_JO:  take =  m_f.o;  OP_JNO: take = !m_f.o;
          OP_JC:  take =  m_f.c;  OP_JNC: take = !m_f.c;
          OP_JS:  take =  m_f.s;  OP_JNS: take = !m_f.s;
          default: take = 1'b1;
        endcase
        if (op != OP_JMP) begin
          if (take) n_taken++; else n_not_taken++;
        end
        m_pc = take ? w : m_pc + 3;
      end
      OP_NOP:  m_pc += 1;
      OP_HLT:  m_halted = 1'b1;
      OP_MULW: begin
        a = pop(); b = pop();
        pushw(alu(op, a, b, 16, rem));
        m_pc += 1;
      end
      OP_DIV, OP_DIVW: begin
        if (op == OP_DIV) begin a = pop(); b = pop(); end
        else              begin a = popw(); b = popw(); end
        if (b == 0) n_divzero++;
        r = alu(op, a, b, (op == OP_DIV) ? 8 : 16, rem);
        if (op == OP_DIV) begin push(8'(r)); push(8'(rem)); end
        else              begin pushw(r); pushw(rem); end
        m_pc += 1;
      end
      OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_CMP: begin
        a = pop(); b = pop();
        r = alu(op, a, b, 8, rem);
        if (op != OP_CMP) push(8'(r));
        m_pc += 1;
      end
      OP_ADDW, OP_SUBW, OP_ANDW, OP_ORW, OP_XORW, OP_CMPW: begin
        a = popw(); b = popw();
        r = alu(op, a, b, 16, rem);
        if (op != OP_CMPW) pushw(r);
        m_pc += 1;
      end
      OP_INC, OP_DEC, OP_NOT, OP_SHL, OP_SHR, OP_ROL, OP_ROR: begin
        push(8'(alu(op, pop(), 0, 8, rem)));
        m_pc += 1;
      end
      OP_INCW, OP_DECW, OP_NOTW, OP_SHLW, OP_SHRW, OP_ROLW, OP_RORW: begin
        pushw(alu(op, popw(), 0, 16, rem));
        m_pc += 1;
      end
      default: m_pc += 1;
    endcase
  endfunction

  // ------------------------------------------------------ program generator
  sm_asm as;
  int    n_lbl;

  function automatic byte unsigned rand_imm();
    case ($urandom_range(7))
      0: return 8'h00;
      1: return 8'hFF;
      2: return ($urandom_range(1) != 0) ? 8'h7F : 8'h80;
      default: return 8'($urandom);
    endcase
  endfunction

  function automatic int unsigned rand_data();
    return DATA + $urandom_range(254);
  endfunction

  function automatic int unsigned rand_ptr();
    return PTRS + 2 * $urandom_range(15);
  endfunction

  // a stack-neutral filler that a jump can skip
  function automatic void filler();
    as.op1(OP_LDI, rand_imm());
    as.op2(OP_STD, rand_data());
  endfunction

  function automatic void gen_program();
    byte unsigned bin8  [8] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_XOR, OP_CMP};
    byte unsigned bin16 [7] = '{OP_ADDW, OP_SUBW, OP_ANDW, OP_ORW, OP_XORW, OP_DIVW, OP_CMPW};
    byte unsigned un8   [7] = '{OP_INC, OP_DEC, OP_NOT, OP_SHL, OP_SHR, OP_ROL, OP_ROR};
    byte unsigned un16  [7] = '{OP_INCW, OP_DECW, OP_NOTW, OP_SHLW, OP_SHRW, OP_ROLW, OP_RORW};
    byte unsigned jcc   [9] = '{OP_JMP, OP_JZ, OP_JNZ, OP_JO, OP_JNO, OP_JC, OP_JNC, OP_JS, OP_JNS};
    int d = 0;                      // bytes this program has on the stack
    int kind;
    byte unsigned op;
    string l;
    as = new();
    for (int a = 0; a < MEMSZ; a++) as.img[a] = 8'($urandom);
    for (int k = 0; k < 16; k++) as.img[PTRS + 2 * k] = 8'(rand_data());
    for (int k = 0; k < 16; k++) as.img[PTRS + 2 * k + 1] = 8'(DATA >> 8);
    as.org(0);
    for (int i = 0; i < NINSTR; i++) begin
      kind = $urandom_range(9);
      if (d < 4 && kind >= 4) kind = 0;
      if (d > 48) kind = 3;
      case (kind)
        0, 1: begin                                 // push
          case ($urandom_range(6))
            0: begin as.op1(OP_LDI, rand_imm()); d += 1; end
            1: begin as.op2(OP_LDIW, {rand_imm(), rand_imm()}); d += 2; end
            2: begin as.op2(OP_LDD, rand_data()); d += 1; end
            3: begin as.op2(OP_LDDW, rand_data()); d += 2; end
            4: begin as.op2(OP_LDA, rand_ptr()); d += 1; end
            5: begin as.op2(OP_LDAW, rand_ptr()); d += 2; end
            default: begin as.op1(OP_IN, 8'($urandom)); d += 1; end
          endcase
        end
        2: begin                                    // control flow
          l = $sformatf("L%0d", n_lbl++);
          case ($urandom_range(3))
            0: as.op2l(jcc[$urandom_range(8)], l);
            1: as.op1r(OP_JMR, l);
            2: as.op2l(jcc[1 + $urandom_range(7)], l);
            default: begin as.op2l(OP_CALL, "sub"); as.op0(OP_NOP); end
          endcase
          filler();
          as.label(l);
        end
        3: begin                                    // store
          if (d >= 2 && $urandom_range(1) != 0) begin
            if ($urandom_range(1) != 0) as.op2(OP_STDW, rand_data());
            else                        as.op2(OP_STAW, rand_ptr());
            d -= 2;
          end else if (d >= 1) begin
            case ($urandom_range(2))
              0: as.op2(OP_STD, rand_data());
              1: as.op2(OP_STA, rand_ptr());
              default: as.op1(OP_OUT, 8'($urandom));
            endcase
            d -= 1;
          end
        end
        4, 5: begin                                 // byte binary
          op = bin8[$urandom_range(7)];
          if ($urandom_range(7) == 0) op = OP_MULW;
          as.op0(op);
          d -= (op == OP_CMP) ? 2 : (op == OP_DIV || op == OP_MULW) ? 0 : 1;
        end
        6: begin                                    // word binary
          op = bin16[$urandom_range(6)];
          as.op0(op);
          d -= (op == OP_CMPW) ? 4 : (op == OP_DIVW) ? 0 : 2;
        end
        7: as.op0(un8[$urandom_range(6)]);          // byte unary
        8: as.op0(un16[$urandom_range(6)]);         // word unary
        default: begin                              // compare then branch
          as.op0(($urandom_range(1) != 0) ? OP_CMP : OP_CMPW);
          d -= (as.img[as.pc - 1] == OP_CMP) ? 2 : 4;
          l = $sformatf("L%0d", n_lbl++);
          as.op2l(jcc[1 + $urandom_range(7)], l);
          filler();
          as.label(l);
        end
      endcase
    end
    as.op0(OP_HLT);
    as.label("sub");                                // stack-neutral subroutine
    as.op1(OP_LDI, rand_imm());
    as.op0(OP_INC);
    as.op2(OP_STD, rand_data());
    as.op0(OP_RET);
    as.resolve();
  endfunction

  // --------------------------------------------------------------- monitors
  int  cyc = 0, last_start = -1, n_instr = 0;
  byte unsigned last_op;
  logic running = 1'b0, seen_halt;

  always @(posedge clk) begin
    if (running && !rst) begin
      if (port_wstb != '0) begin
        for (int p = 0; p < 256; p++) if (port_wstb[p]) begin
          checks++;
          if (exp_port.size() == 0) begin
            failures++;
            $display("FAIL unexpected write of %h to port %0d", port_out[p], p);
          end else begin
            if (p != exp_port[0] || port_out[p] != 8'(exp_val[0])) begin
              failures++;
              $display("FAIL port write %h to %0d, expected %h to %0d", port_out[p], p,
                       exp_val[0], exp_port[0]);
            end
            void'(exp_port.pop_front());
            void'(exp_val.pop_front());
          end
        end
      end
      if (instr_start || (halted && !seen_halt)) begin
        if (last_start >= 0) begin
          checks++;
          if (cyc - last_start != expected_cycles(last_op)) begin
            failures++;
            $display("FAIL opcode %h took %0d cycles, expected %0d", last_op, cyc - last_start,
                     expected_cycles(last_op));
          end
        end
        checks++;
        if (sp !== m_sp || flags !== m_f || (instr_start && pc !== m_pc) || halted !== m_halted) begin
          failures++;
          $display("FAIL after opcode %h: pc %h sp %h flags %b halted %b, model pc %h sp %h flags %b halted %b",
                   last_op, pc, sp, flags, halted, m_pc, m_sp, m_f, m_halted);
        end
        if (instr_start) begin
          last_start = cyc;
          last_op    = rd(m_pc);
          n_instr++;
          step();
        end else begin
          seen_halt  = 1'b1;
          last_start = -1;
        end
      end
      cyc++;
    end
  end

  task automatic host_write(int unsigned a, byte unsigned d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = 16'(a); host_wdata = d;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  initial begin
    int unsigned bad;
    byte unsigned got;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    port_in = '0;
    n_lbl = 0;
    for (int round = 0; round < ROUNDS; round++) begin
      gen_program();
      foreach (m_in[p]) begin m_in[p] = 8'($urandom); port_in[p] = m_in[p]; end
      foreach (m_mem[a]) m_mem[a] = as.img[a];
      m_pc = '0; m_sp = 16'h3FFF; m_f = '0; m_halted = 1'b0;
      exp_port.delete(); exp_val.delete();
      rst = 1'b1;
      for (int a = 0; a < MEMSZ; a++) host_write(a, as.img[a]);
      @(negedge clk);
      host_en = 1'b0; host_we = 1'b0;
      last_start = -1; seen_halt = 1'b0;
      running = 1'b1;
      rst = 1'b0;
      wait (halted && seen_halt);
      repeat (2) @(posedge clk);
      running = 1'b0;
      checks++;
      if (exp_port.size() != 0) begin
        failures++;
        $display("FAIL round %0d: %0d port writes missing", round, exp_port.size());
      end
      bad = 0;
      for (int a = 0; a < MEMSZ; a++) begin
        @(negedge clk);
        host_en = 1'b1; host_addr = 16'(a);
        #1 got = host_rdata;
        checks++;
        if (got !== m_mem[a]) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL round %0d: MEM[%h] = %h, model %h", round, a, got, m_mem[a]);
        end
      end
      @(negedge clk);
      host_en = 1'b0;
    end
    $display("%0d rounds, %0d instructions, %0d cycles", ROUNDS, n_instr, cyc);
    $display("  divides by zero %0d, carries %0d, overflows %0d, jumps taken %0d, not taken %0d",
             n_divzero, n_carry, n_ovf, n_taken, n_not_taken);
    $display("  calls %0d, port reads %0d, port writes %0d", n_call, n_in, n_out);
    begin
      int counts [8];
      counts = '{n_divzero, n_carry, n_ovf, n_taken, n_not_taken, n_call, n_in, n_out};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
