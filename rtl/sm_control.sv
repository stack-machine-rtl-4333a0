// sm_control: fetch, decode and micro-step sequencing of the stack machine.
//
// The control unit holds the three address registers of the machine -- the
// instruction register IR, the program counter PC and the stack pointer SP --
// and a few internal byte-pair registers: AR (the instruction's operand:
// address, immediate or port number), T (a pointer read from memory by the
// indirect LDA/STA forms) and D (data read from memory by loads).
//
// Every instruction starts with one fetch/decode cycle (IR <= MEM[PC], PC++).
// The control unit then walks the instruction's micro-steps from
// sm_pkg::uprog, one per clock: operand fetch, pop into ALU latch A or B,
// ALU step, push, memory read, memory write, I/O access, jump. A push writes
// MEM[SP] and then decrements SP; a pop increments SP and reads MEM[SP], so
// SP always points at the next free stack byte (0x3FFF after reset). Words
// live on the stack with the high byte pushed first, so the low byte is on
// top, and in memory low byte first.
//
// Execution time: with STRETCH = 1 (the default) an instruction whose
// micro-steps finish early is held until it has used the number of clock
// units the instruction table gives for it, so each instruction takes
// 1 + max(table units, micro-steps) cycles. The cycles spent waiting are
// flagged on `stretch`. With STRETCH = 0 every instruction takes
// 1 + micro-steps cycles. HLT stops the sequencer until reset.
//
// Following the published micro-steps: operand order (A = first value
// popped), CALL pushing the return address high byte first, RET, and the
// jumps. This design's choices: JMR is relative to the address of the next
// instruction, LDA/STA (and LDAW/STAW) read a 16-bit pointer at the operand
// address and access the byte(s) it points to, undefined opcodes execute as
// one-cycle no-ops, and reset is synchronous and active high.
//
// Interface: one memory port (mem_*), ALU latch/execute controls (alu_*),
// the flag register output (flags), the I/O bus (io_*), and status outputs.
// `instr_start` pulses in every fetch cycle.
module sm_control
  import sm_pkg::*;
#(
  parameter bit          STRETCH = 1'b1,
  parameter logic [15:0] SP_INIT = STACK_TOP
) (
  input  logic        clk,
  input  logic        rst,
  // memory
  output logic [15:0] mem_addr,
  output logic        mem_we,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata,
  // ALU
  output logic        alu_load_a,
  output logic        alu_load_b,
  output logic        alu_load_hi,
  output logic [7:0]  alu_din,
  output logic        alu_exec,
  output alu_op_e     alu_op,
  output logic        alu_word,
  output logic        alu_wide_mul,
  input  logic [15:0] alu_a,
  input  logic [15:0] alu_c,
  input  logic [15:0] alu_r,
  // flag register
  input  flags_t      flags,
  // I/O ports
  output logic [7:0]  io_addr,
  output logic        io_we,
  output logic [7:0]  io_wdata,
  input  logic [7:0]  io_rdata,
  // status
  output logic        instr_start,
  output logic        stretch,
  output logic        halted,
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [7:0]  ir
);

  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_PAD, S_HALT} state_e;

  state_e      state_q;
  logic [15:0] pc_q, sp_q, ar_q, t_q, d_q;
  logic [7:0]  ir_q;
  logic [3:0]  step_q;
  logic [3:0]  budget_q;

  uop_t        u, u_next, u_first;
  logic [3:0]  units_fetch;
  logic [15:0] asel_addr;
  logic [7:0]  push_byte;

  always_comb begin
    u       = uprog(ir_q, 32'(step_q));
    u_next  = uprog(ir_q, 32'(step_q) + 1);
    u_first = uprog(mem_rdata, 0);
    units_fetch = STRETCH ? clock_units(mem_rdata) : 4'd0;

    unique case (u.asel)
      ASEL_AR:  asel_addr = ar_q;
      ASEL_AR1: asel_addr = ar_q + 16'd1;
      ASEL_T:   asel_addr = t_q;
      default:  asel_addr = t_q + 16'd1;
    endcase

    unique case (u.src)
      SRC_AR:  push_byte = u.hi ? ar_q[15:8]  : ar_q[7:0];
      SRC_C:   push_byte = u.hi ? alu_c[15:8] : alu_c[7:0];
      SRC_R:   push_byte = u.hi ? alu_r[15:8] : alu_r[7:0];
      SRC_D:   push_byte = u.hi ? d_q[15:8]   : d_q[7:0];
      default: push_byte = u.hi ? pc_q[15:8]  : pc_q[7:0];
    endcase
  end

  // Datapath control for the current cycle.
  always_comb begin
    mem_addr     = pc_q;
    mem_we       = 1'b0;
    mem_wdata    = push_byte;
    alu_load_a   = 1'b0;
    alu_load_b   = 1'b0;
    alu_load_hi  = u.hi;
    alu_din      = mem_rdata;
    alu_exec     = 1'b0;
    alu_op       = alu_op_of(ir_q);
    alu_word     = alu_word_operands(ir_q);
    alu_wide_mul = (ir_q == OP_MULW);
    io_addr      = ar_q[7:0];
    io_we        = 1'b0;
    io_wdata     = alu_a[7:0];
    if (state_q == S_EXEC) begin
      unique case (u.kind)
        U_OPND:  mem_addr = pc_q;
        U_POPA:  begin mem_addr = sp_q + 16'd1; alu_load_a = 1'b1; end
        U_POPB:  begin mem_addr = sp_q + 16'd1; alu_load_b = 1'b1; end
        U_ALU:   alu_exec = 1'b1;
        U_PUSH:  begin mem_addr = sp_q; mem_we = 1'b1; end
        U_RDT,
        U_RDD:   mem_addr = asel_addr;
        U_WR:    begin
                   mem_addr  = asel_addr;
                   mem_we    = 1'b1;
                   mem_wdata = u.hi ? alu_a[15:8] : alu_a[7:0];
                 end
        U_IN:    begin mem_addr = sp_q; mem_we = 1'b1; mem_wdata = io_rdata; end
        U_OUT:   io_we = 1'b1;
        U_CALLJ: begin mem_addr = sp_q; mem_we = 1'b1; mem_wdata = pc_q[7:0]; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= S_FETCH;
      pc_q     <= '0;
      sp_q     <= SP_INIT;
      ar_q     <= '0;
      t_q      <= '0;
      d_q      <= '0;
      ir_q     <= OP_NOP;
      step_q   <= '0;
      budget_q <= '0;
    end else begin
      unique case (state_q)
        S_FETCH: begin
          ir_q     <= mem_rdata;
          pc_q     <= pc_q + 16'd1;
          step_q   <= '0;
          budget_q <= units_fetch;
          if (u_first.kind != U_END)  state_q <= S_EXEC;
          else if (units_fetch != '0) state_q <= S_PAD;
          else                        state_q <= S_FETCH;
        end
        S_EXEC: begin
          step_q   <= step_q + 4'd1;
          budget_q <= (budget_q != '0) ? budget_q - 4'd1 : '0;
          unique case (u.kind)
            U_OPND: begin
              if (u.hi) ar_q[15:8] <= mem_rdata;
              else      ar_q[7:0]  <= mem_rdata;
              pc_q <= pc_q + 16'd1;
            end
            U_POPA, U_POPB: sp_q <= sp_q + 16'd1;
            U_PUSH, U_IN:   sp_q <= sp_q - 16'd1;
            U_RDT: begin
              if (u.hi) t_q[15:8] <= mem_rdata;
              else      t_q[7:0]  <= mem_rdata;
            end
            U_RDD: begin
              if (u.hi) d_q[15:8] <= mem_rdata;
              else      d_q[7:0]  <= mem_rdata;
            end
            U_JCC:   if (jump_taken(ir_q, flags)) pc_q <= ar_q;
            U_JMR:   pc_q <= pc_q + {{8{ar_q[7]}}, ar_q[7:0]};
            U_CALLJ: begin sp_q <= sp_q - 16'd1; pc_q <= ar_q; end
            U_RET:   pc_q <= alu_a;
            default: ;
          endcase
          if (u.kind == U_HLT)           state_q <= S_HALT;
          else if (u_next.kind == U_END) state_q <= (budget_q > 4'd1) ? S_PAD : S_FETCH;
        end
        S_PAD: begin
          budget_q <= budget_q - 4'd1;
          if (budget_q <= 4'd1) state_q <= S_FETCH;
        end
        default: state_q <= S_HALT;
      endcase
    end
  end

  assign instr_start = (state_q == S_FETCH);
  assign stretch     = (state_q == S_PAD);
  assign halted      = (state_q == S_HALT);
  assign pc          = pc_q;
  assign sp          = sp_q;
  assign ir          = ir_q;

  // The memory port and the I/O bus are never written in the same cycle,
  // and nothing is written while halted.
  a_one_writer: assert property (@(posedge clk) disable iff (rst) !(mem_we && io_we));
  a_halt_quiet: assert property (@(posedge clk) disable iff (rst) halted |-> !(mem_we || io_we));

endmodule
