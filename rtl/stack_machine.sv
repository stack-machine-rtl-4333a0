// stack_machine: an 8-bit zero-address stack computer with its memory and
// I/O ports.
//
// All operands live on a byte stack in memory. Arithmetic and logic
// instructions pop their operands into the ALU's input latches A and B,
// compute into the output latch C, set the C/O/S/Z flags and push the
// result back; loads push, stores pop, and jumps test the flags. The blocks:
//
//   sm_control   fetch/decode and micro-step sequencer, holds IR, PC, SP
//   sm_alu       ALU with the A, B and C latches
//   sm_flags     flag register C, O, S, Z
//   sm_memory    16 KB memory: code+data 0x0000-0x2FFF, stack 0x3FFF down
//   sm_io_ports  256 input and 256 output byte ports for IN/OUT
//
// The memory has a single port shared by the processor and a host port
// (host_*), through which a program is loaded and results read back. The
// host port takes the memory whenever host_en is high; use it only while the
// processor is held in reset or has halted. The host port is this design's
// addition: it stands for whatever loads a program into the machine.
//
// Timing: one fetch/decode cycle per instruction, then one cycle per
// micro-step, stretched to the instruction table's clock units when STRETCH
// is set (see sm_control). Reset is synchronous, active high: PC = 0,
// SP = 0x3FFF, flags and output ports cleared. `instr_start` pulses in each
// fetch cycle, `halted` rises after HLT.
module stack_machine
  import sm_pkg::*;
#(
  parameter int unsigned ADDR_W  = MEM_ADDR_W,
  parameter int unsigned N_PORTS = IO_PORTS,
  parameter bit          STRETCH = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst,
  // host access to memory
  input  logic                       host_en,
  input  logic                       host_we,
  input  logic [15:0]                host_addr,
  input  logic [7:0]                 host_wdata,
  output logic [7:0]                 host_rdata,
  // I/O port pins
  input  logic [N_PORTS-1:0][7:0]    port_in,
  output logic [N_PORTS-1:0][7:0]    port_out,
  output logic [N_PORTS-1:0]         port_wstb,
  // status
  output logic                       halted,
  output logic                       instr_start,
  output logic                       stretch,
  output logic [15:0]                pc,
  output logic [15:0]                sp,
  output logic [7:0]                 ir,
  output flags_t                     flags
);

  // processor <-> memory
  logic [15:0] cpu_addr;
  logic        cpu_we;
  logic [7:0]  cpu_wdata;
  logic [7:0]  mem_rdata;
  logic [ADDR_W-1:0] mem_addr;
  logic        mem_we;
  logic [7:0]  mem_wdata;

  // processor <-> ALU / flags
  logic        alu_load_a, alu_load_b, alu_load_hi, alu_exec, alu_word, alu_wide_mul;
  logic [7:0]  alu_din;
  alu_op_e     alu_op;
  logic [15:0] alu_a, alu_c, alu_r;
  flags_t      flags_d, flags_we, flags_q;

  // processor <-> I/O
  logic [7:0]  io_addr, io_wdata, io_rdata;
  logic        io_we;

  sm_control #(.STRETCH(STRETCH)) u_control (
    .clk, .rst,
    .mem_addr (cpu_addr), .mem_we (cpu_we), .mem_wdata (cpu_wdata), .mem_rdata,
    .alu_load_a, .alu_load_b, .alu_load_hi, .alu_din, .alu_exec, .alu_op,
    .alu_word, .alu_wide_mul, .alu_a, .alu_c, .alu_r,
    .flags (flags_q),
    .io_addr, .io_we, .io_wdata, .io_rdata,
    .instr_start, .stretch, .halted, .pc, .sp, .ir
  );

  sm_alu u_alu (
    .clk, .rst,
    .load_a (alu_load_a), .load_b (alu_load_b), .load_hi (alu_load_hi),
    .din (alu_din), .exec (alu_exec), .op (alu_op), .word (alu_word),
    .wide_mul (alu_wide_mul),
    .a (alu_a), .c (alu_c), .r (alu_r),
    .flags_d, .flags_we
  );

  sm_flags u_flags (
    .clk, .rst, .we (flags_we), .d (flags_d), .q (flags_q)
  );

  always_comb begin
    if (host_en) begin
      mem_addr  = host_addr[ADDR_W-1:0];
      mem_we    = host_we;
      mem_wdata = host_wdata;
    end else begin
      mem_addr  = cpu_addr[ADDR_W-1:0];
      mem_we    = cpu_we;
      mem_wdata = cpu_wdata;
    end
  end

  sm_memory #(.ADDR_W(ADDR_W)) u_memory (
    .clk, .addr (mem_addr), .we (mem_we), .wdata (mem_wdata), .rdata (mem_rdata)
  );

  sm_io_ports #(.N_PORTS(N_PORTS)) u_io (
    .clk, .rst,
    .addr (io_addr[$clog2(N_PORTS)-1:0]), .we (io_we), .wdata (io_wdata), .rdata (io_rdata),
    .port_in, .port_out, .port_wstb
  );

  assign host_rdata = mem_rdata;
  assign flags      = flags_q;

  // The host may only use the memory while the processor is stopped.
  a_host_when_stopped: assert property (@(posedge clk) host_en |-> (rst || halted));

endmodule
