// tb_stack_machine: end-to-end test of the whole stack machine.
//
// Loads a program through the host port while the processor is in reset,
// runs it to HLT and checks the results through the output ports and the
// host port. The program loops eight times over a table: it reads an input
// port (IN), reads the next table byte through a pointer (LDA), calls a
// subroutine (CALL/RET) that combines the two (XOR, ROL) and writes the
// result to an output port (OUT); the loop counter is counted down with DEC
// and tested with JNZ. It then divides by zero and tests the overflow flag
// with JO, and stores the quotient and remainder.
//
// Checked: the eight output values in order, the result bytes, the final
// pointer and counter, SP back at 0x3FFF, and every instruction's length in
// cycles. Counted, and each required to happen at least once: instruction
// stretching to the table's clock units, conditional jumps taken and not
// taken, calls, returns, port reads, port writes, divide by zero and halt.
module tb_stack_machine;
  import sm_pkg::*;
  import sm_asm_pkg::*;

  localparam int unsigned N_PORTS = 256;
  localparam byte unsigned KEY    = 8'h5C;       // value on input port 5
  localparam int unsigned TBL = 16'h1000, PTR = 16'h1100, CNT = 16'h1102;
  localparam int unsigned RET = 16'h1104, ERR = 16'h1106, DZQ = 16'h1107, DZR = 16'h1108;

  logic                    clk = 1'b0, rst;
  logic                    host_en, host_we;
  logic [15:0]             host_addr;
  logic [7:0]              host_wdata, host_rdata;
  logic [N_PORTS-1:0][7:0] port_in, port_out;
  logic [N_PORTS-1:0]      port_wstb;
  logic                    halted, instr_start, stretch;
  logic [15:0]             pc, sp;
  logic [7:0]              ir;
  flags_t                  flags;

  int checks = 0, failures = 0;

  stack_machine dut (.clk, .rst, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
                     .port_in, .port_out, .port_wstb, .halted, .instr_start, .stretch,
                     .pc, .sp, .ir, .flags);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  int cyc = 0, last_start = -1, n_instr = 0;
  logic [15:0] last_pc;
  byte unsigned last_op;
  int n_stretch = 0, n_taken = 0, n_not_taken = 0, n_call = 0, n_ret = 0;
  int n_in = 0, n_out = 0, n_divzero = 0, n_halt = 0;
  byte unsigned outs [$];

  always @(posedge clk) if (!rst) begin
    if (stretch) n_stretch++;
    if (port_wstb[7]) outs.push_back(port_out[7]);
    if (instr_start || (halted && last_start >= 0)) begin
      if (last_start >= 0) begin
        checks++;
        if (cyc - last_start != expected_cycles(last_op)) begin
          failures++;
          $display("FAIL opcode %h at %h took %0d cycles, expected %0d", last_op, last_pc,
                   cyc - last_start, expected_cycles(last_op));
        end
        case (last_op)
          OP_JZ, OP_JNZ, OP_JO, OP_JNO, OP_JC, OP_JNC, OP_JS, OP_JNS:
            if (pc != last_pc + 16'd3) n_taken++; else n_not_taken++;
          OP_CALL: n_call++;
          OP_RET:  n_ret++;
          OP_IN:   n_in++;
          OP_OUT:  n_out++;
          OP_DIV:  if (flags.o) n_divzero++;
          default: ;
        endcase
      end
      if (instr_start) begin
        last_start = cyc;
        last_pc    = pc;
        last_op    = host_rdata;         // the opcode being fetched
        n_instr++;
      end else begin
        last_start = -1;
        n_halt++;
      end
    end
    cyc++;
  end

  // ------------------------------------------------------------- host access
  task automatic host_write(int unsigned a, byte unsigned d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = 16'(a); host_wdata = d;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  task automatic host_read(int unsigned a, output byte unsigned d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b0; host_addr = 16'(a);
    #1 d = host_rdata;
  endtask

  task automatic check_byte(int unsigned a, byte unsigned v, string what);
    byte unsigned d;
    host_read(a, d);
    checks++;
    if (d !== v) begin failures++; $display("FAIL %s: [%h] = %h, expected %h", what, a, d, v); end
  endtask

  task automatic require(int n, string what);
    checks++;
    $display("  %-24s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  sm_asm as;
  byte unsigned table_v [8] = '{8'h01, 8'h80, 8'hFF, 8'h5C, 8'h00, 8'h3A, 8'hC5, 8'h7E};

  initial begin
    byte unsigned v, exp_out;
    as = new();
    as.op1(OP_LDI, 8);        as.op2(OP_STD, CNT);
    as.op2(OP_LDIW, TBL);     as.op2(OP_STDW, PTR);
    as.label("loop");
    as.op2(OP_LDA, PTR);                 // table byte
    as.op1(OP_IN, 5);                    // key from port 5
    as.op2l(OP_CALL, "mix");             // leaves the mixed byte on the stack
    as.op1(OP_OUT, 7);
    as.op2(OP_LDDW, PTR); as.op0(OP_INCW); as.op2(OP_STDW, PTR);
    as.op2(OP_LDD, CNT);  as.op0(OP_DEC);  as.op2(OP_STD, CNT);
    as.op2l(OP_JNZ, "loop");
    as.op1(OP_LDI, 0); as.op1(OP_LDI, 9); as.op0(OP_DIV);   // 9 / 0
    as.op2l(OP_JO, "dz");
    as.op1(OP_LDI, 1); as.op2(OP_STD, ERR);
    as.label("dz");
    as.op2(OP_STD, DZR); as.op2(OP_STD, DZQ);
    as.op0(OP_HLT);
    as.label("mix");                     // stack: tbl, key, return address
    as.op2(OP_STDW, RET);
    as.op0(OP_XOR); as.op0(OP_ROL);
    as.op2(OP_LDDW, RET);
    as.op0(OP_RET);
    as.resolve();
    foreach (table_v[i]) as.img[TBL + i] = table_v[i];

    port_in = '0;
    port_in[5] = KEY;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    rst = 1'b1;
    for (int a = 0; a < 16384; a++) host_write(a, as.img[a]);
    @(negedge clk);
    host_en = 1'b0;
    rst = 1'b0;
    wait (halted);
    repeat (2) @(posedge clk);

    checks++;
    if (outs.size() != 8) begin failures++; $display("FAIL %0d port writes, expected 8", outs.size()); end
    foreach (table_v[i]) begin
      v = table_v[i] ^ KEY;
      exp_out = {v[6:0], v[7]};
      checks++;
      if (i >= outs.size() || outs[i] !== exp_out) begin
        failures++;
        $display("FAIL output %0d = %h, expected %h", i, (i < outs.size()) ? outs[i] : 8'h00, exp_out);
      end
    end
    check_byte(CNT, 8'h00, "loop counter");
    check_byte(PTR, 8'((TBL + 8) & 255), "pointer lo");
    check_byte(PTR + 1, 8'((TBL + 8) >> 8), "pointer hi");
    check_byte(DZQ, 8'hFF, "divide-by-zero quotient");
    check_byte(DZR, 8'd9, "divide-by-zero remainder");
    checks++;
    if (sp !== 16'h3FFF) begin failures++; $display("FAIL SP = %h at halt", sp); end
    $display("%0d instructions in %0d cycles", n_instr, cyc);
    require(n_stretch,   "stretch cycles");
    require(n_taken,     "jumps taken");
    require(n_not_taken, "jumps not taken");
    require(n_call,      "calls");
    require(n_ret,       "returns");
    require(n_in,        "port reads");
    require(n_out,       "port writes");
    require(n_divzero,   "divides by zero");
    require(n_halt,      "halts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
