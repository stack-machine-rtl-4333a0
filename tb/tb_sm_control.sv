// tb_sm_control: self-checking test of the control unit.
//
// Two copies of the control unit run side by side, one with STRETCH = 1 (the
// default: instructions stretched to the table's clock units) and one with
// STRETCH = 0 (bare micro-step timing). Each has the real ALU and flag
// register, and a memory array and 256 I/O ports modelled here. A program
// built with sm_asm executes every opcode at least once and stores its
// results in a result area; the test then compares each copy's result area,
// output ports, PC and SP with values worked out by hand. Every instruction's
// length in cycles (fetch cycle to next fetch cycle) is compared with the
// numbers sm_asm_pkg lists per opcode: expected_cycles() for the stretched
// copy and bare_cycles() for the other.
module tb_sm_control;
  import sm_pkg::*;
  import sm_asm_pkg::*;

  localparam int unsigned RES = 16'h2000;  // result area

  logic        clk = 1'b0, rst;
  byte unsigned mem [2][16384];
  byte unsigned io_out [2][256];
  logic [15:0] pc_v [2], sp_v [2];
  logic        halted_v [2];
  int          cyc_v [2];
  int          checks = 0, failures = 0;
  bit          seen [256];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 2; k++) begin : g_cpu
    logic [15:0] mem_addr;
    logic        mem_we;
    logic [7:0]  mem_wdata, mem_rdata;
    logic        alu_load_a, alu_load_b, alu_load_hi, alu_exec, alu_word, alu_wide_mul;
    logic [7:0]  alu_din;
    alu_op_e     alu_op;
    logic [15:0] alu_a, alu_c, alu_r;
    flags_t      flags_d, flags_we, flags_q;
    logic [7:0]  io_addr, io_wdata, io_rdata;
    logic        io_we;
    logic        instr_start, stretch, halted;
    logic [15:0] pc, sp;
    logic [7:0]  ir;

    sm_control #(.STRETCH(k == 0)) dut (
      .clk, .rst, .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
      .alu_load_a, .alu_load_b, .alu_load_hi, .alu_din, .alu_exec, .alu_op,
      .alu_word, .alu_wide_mul, .alu_a, .alu_c, .alu_r,
      .flags (flags_q), .io_addr, .io_we, .io_wdata, .io_rdata,
      .instr_start, .stretch, .halted, .pc, .sp, .ir
    );

    sm_alu u_alu (.clk, .rst, .load_a (alu_load_a), .load_b (alu_load_b),
                  .load_hi (alu_load_hi), .din (alu_din), .exec (alu_exec), .op (alu_op),
                  .word (alu_word), .wide_mul (alu_wide_mul), .a (alu_a), .c (alu_c),
                  .r (alu_r), .flags_d, .flags_we);

    sm_flags u_flags (.clk, .rst, .we (flags_we), .d (flags_d), .q (flags_q));

    // memory and I/O models
    assign mem_rdata = mem[k][mem_addr[13:0]];
    assign io_rdata  = 8'(io_addr * 3 + 1);   // input port n reads 3n+1
    always @(posedge clk) begin
      if (mem_we) mem[k][mem_addr[13:0]] <= mem_wdata;
      if (io_we)  io_out[k][io_addr] <= io_wdata;
    end
    assign pc_v[k]     = pc;
    assign sp_v[k]     = sp;
    assign halted_v[k] = halted;

    // cycle accounting
    int  cyc = 0, last_start = -1, expect_len;
    byte unsigned last_op;
    always @(posedge clk) if (!rst) begin
      if (instr_start || (halted && last_start >= 0)) begin
        if (last_start >= 0) begin
          expect_len = (k == 0) ? expected_cycles(last_op) : bare_cycles(last_op);
          checks++;
          if (cyc - last_start != expect_len) begin
            failures++;
            $display("FAIL STRETCH=%0d opcode %h took %0d cycles, expected %0d", k == 0,
                     last_op, cyc - last_start, expect_len);
          end
        end
        if (instr_start) begin
          last_start = cyc;
          last_op    = mem_rdata;
          seen[mem_rdata] = 1'b1;
        end else begin
          last_start = -1;
        end
      end
      if (!halted) cyc++;
    end
    assign cyc_v[k] = cyc;
  end

  sm_asm as;
  int unsigned slot;

  // store the top byte/word of the stack at the next result slot
  function automatic void keep();
    as.op2(OP_STD, RES + slot); slot++;
  endfunction
  function automatic void keepw();
    as.op2(OP_STDW, RES + slot); slot += 2;
  endfunction
  // record whether a conditional jump was taken: slot gets 1 if not taken
  function automatic void jtest(byte unsigned op, string tag);
    as.op2l(op, tag);
    as.op1(OP_LDI, 1);
    as.op2(OP_STD, RES + slot);
    as.label(tag);
    slot++;
  endfunction

  int cur;   // copy being checked

  function automatic byte unsigned rd(int unsigned i);
    return mem[cur][RES + i];
  endfunction

  task automatic expect_res(int unsigned i, byte unsigned v, string what);
    checks++;
    if (rd(i) !== v) begin
      failures++;
      $display("FAIL STRETCH=%0d %s: result[%0d] = %h, expected %h", cur == 0, what, i, rd(i), v);
    end
  endtask

  task automatic expect_resw(int unsigned i, int unsigned v, string what);
    expect_res(i, v[7:0], {what, " lo"});
    expect_res(i + 1, v[15:8], {what, " hi"});
  endtask

  initial begin
    as = new();
    slot = 0;
    // ---- arithmetic (A = top of stack, B = next; C = A op B)
    as.op1(OP_LDI, 8'h25); as.op1(OP_LDI, 8'h17); as.op0(OP_ADD); keep();      // 0: 3C
    as.op1(OP_LDI, 8'h05); as.op1(OP_LDI, 8'h30); as.op0(OP_SUB); keep();      // 1: 2B
    as.op2(OP_LDIW, 16'h1234); as.op2(OP_LDIW, 16'h0FF0); as.op0(OP_ADDW); keepw(); // 2: 2224
    as.op2(OP_LDIW, 16'h1000); as.op2(OP_LDIW, 16'h3000); as.op0(OP_SUBW); keepw(); // 4: 2000
    as.op1(OP_LDI, 7); as.op1(OP_LDI, 9); as.op0(OP_MUL); keep();              // 6: 3F
    as.op1(OP_LDI, 100); as.op1(OP_LDI, 200); as.op0(OP_MULW); keepw();        // 7: 4E20
    as.op1(OP_LDI, 7); as.op1(OP_LDI, 100); as.op0(OP_DIV); keep(); keep();    // 9: rem 2, 10: quo 14
    as.op2(OP_LDIW, 7); as.op2(OP_LDIW, 1000); as.op0(OP_DIVW); keepw(); keepw(); // 11: rem 6, 13: quo 142
    as.op1(OP_LDI, 8'hFF); as.op0(OP_INC); keep();                              // 15: 00
    as.op2(OP_LDIW, 16'h00FF); as.op0(OP_INCW); keepw();                        // 16: 0100
    as.op1(OP_LDI, 8'h00); as.op0(OP_DEC); keep();                              // 18: FF
    as.op2(OP_LDIW, 16'h0100); as.op0(OP_DECW); keepw();                        // 19: 00FF
    // ---- logic, shifts, rotates
    as.op1(OP_LDI, 8'hF0); as.op1(OP_LDI, 8'h3C); as.op0(OP_AND); keep();      // 21: 30
    as.op2(OP_LDIW, 16'hF0F0); as.op2(OP_LDIW, 16'h3C3C); as.op0(OP_ANDW); keepw(); // 22: 3030
    as.op1(OP_LDI, 8'hF0); as.op1(OP_LDI, 8'h3C); as.op0(OP_OR); keep();       // 24: FC
    as.op2(OP_LDIW, 16'hF000); as.op2(OP_LDIW, 16'h000F); as.op0(OP_ORW); keepw(); // 25: F00F
    as.op1(OP_LDI, 8'hF0); as.op1(OP_LDI, 8'h3C); as.op0(OP_XOR); keep();      // 27: CC
    as.op2(OP_LDIW, 16'hFFFF); as.op2(OP_LDIW, 16'h1234); as.op0(OP_XORW); keepw(); // 28: EDCB
    as.op1(OP_LDI, 8'h5A); as.op0(OP_NOT); keep();                              // 30: A5
    as.op2(OP_LDIW, 16'h1234); as.op0(OP_NOTW); keepw();                        // 31: EDCB
    as.op1(OP_LDI, 8'h81); as.op0(OP_SHL); keep();                              // 33: 02
    as.op2(OP_LDIW, 16'h8181); as.op0(OP_SHLW); keepw();                        // 34: 0302
    as.op1(OP_LDI, 8'h81); as.op0(OP_SHR); keep();                              // 36: 40
    as.op2(OP_LDIW, 16'h8181); as.op0(OP_SHRW); keepw();                        // 37: 40C0
    as.op1(OP_LDI, 8'h81); as.op0(OP_ROL); keep();                              // 39: 03
    as.op2(OP_LDIW, 16'h8001); as.op0(OP_ROLW); keepw();                        // 40: 0003
    as.op1(OP_LDI, 8'h81); as.op0(OP_ROR); keep();                              // 42: C0
    as.op2(OP_LDIW, 16'h8001); as.op0(OP_RORW); keepw();                        // 43: C000
    // ---- loads and stores: data at 0x1800, pointer at 0x1810 -> 0x1820
    as.op2(OP_LDD, 16'h1800); keep();                                           // 45: 11
    as.op2(OP_LDDW, 16'h1800); keepw();                                         // 46: 2211
    as.op2(OP_LDA, 16'h1810); keep();                                           // 48: 77
    as.op2(OP_LDAW, 16'h1810); keepw();                                         // 49: 8877
    as.op1(OP_LDI, 8'h99); as.op2(OP_STA, 16'h1810);                            // [1820] = 99
    as.op2(OP_LDIW, 16'hBEEF); as.op2(OP_STAW, 16'h1812);                       // [1830] = BEEF
    // ---- I/O
    as.op1(OP_IN, 8'd10); keep();                                               // 51: 1F
    as.op1(OP_LDI, 8'h66); as.op1(OP_OUT, 8'd200);                              // port 200 = 66
    // ---- compare and conditional jumps (result slot 1 = not taken)
    as.op1(OP_LDI, 8'd5); as.op1(OP_LDI, 8'd5); as.op0(OP_CMP);                 // Z=1 S=0 C=0
    jtest(OP_JZ,  "t0"); jtest(OP_JNZ, "t1"); jtest(OP_JS, "t2"); jtest(OP_JNS, "t3"); // 52..55
    as.op1(OP_LDI, 8'd200); as.op1(OP_LDI, 8'd10); as.op0(OP_CMP);              // 10-200: S=1 C=1
    jtest(OP_JS,  "t4"); jtest(OP_JC,  "t5"); jtest(OP_JNC, "t6"); jtest(OP_JZ, "t7"); // 56..59
    as.op2(OP_LDIW, 16'h0001); as.op2(OP_LDIW, 16'h8000); as.op0(OP_CMPW);      // 8000-0001: O=1
    jtest(OP_JO,  "t8"); jtest(OP_JNO, "t9");                                   // 60, 61
    // ---- JMR forward and backward, JMP, CALL/RET
    as.op1r(OP_JMR, "fwd");
    as.op1(OP_LDI, 1); as.op2(OP_STD, RES + 62);                                // skipped
    as.label("back");
    as.op2l(OP_JMP, "after");
    as.label("fwd");
    as.op1r(OP_JMR, "back");
    as.label("sub");
    as.op1(OP_LDI, 8'h42); as.op2(OP_STD, RES + 63); as.op0(OP_RET);
    as.label("after");
    as.op0(OP_NOP);
    as.op2l(OP_CALL, "sub");
    as.op1(OP_LDI, 8'h43); as.op2(OP_STD, RES + 64);
    as.op0(OP_HLT);
    as.resolve();

    for (int k = 0; k < 2; k++) begin
      foreach (as.img[i]) mem[k][i] = as.img[i];
      mem[k][16'h1800] = 8'h11; mem[k][16'h1801] = 8'h22;
      mem[k][16'h1810] = 8'h20; mem[k][16'h1811] = 8'h18;     // pointer -> 0x1820
      mem[k][16'h1812] = 8'h30; mem[k][16'h1813] = 8'h18;     // pointer -> 0x1830
      mem[k][16'h1820] = 8'h77; mem[k][16'h1821] = 8'h88;
      for (int i = 0; i < 256; i++) io_out[k][i] = 8'h00;
    end

    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (pc_v[k] !== 16'h0 || sp_v[k] !== 16'h3FFF) begin failures++; $display("FAIL reset PC/SP"); end
    end
    wait (halted_v[0] && halted_v[1]);
    repeat (3) @(posedge clk);

    for (cur = 0; cur < 2; cur++) begin
      expect_res(0, 8'h3C, "ADD");     expect_res(1, 8'h2B, "SUB");
      expect_resw(2, 16'h2224, "ADDW"); expect_resw(4, 16'h2000, "SUBW");
      expect_res(6, 8'h3F, "MUL");     expect_resw(7, 16'h4E20, "MULW");
      expect_res(9, 8'd2, "DIV rem");  expect_res(10, 8'd14, "DIV quo");
      expect_resw(11, 16'd6, "DIVW rem"); expect_resw(13, 16'd142, "DIVW quo");
      expect_res(15, 8'h00, "INC");    expect_resw(16, 16'h0100, "INCW");
      expect_res(18, 8'hFF, "DEC");    expect_resw(19, 16'h00FF, "DECW");
      expect_res(21, 8'h30, "AND");    expect_resw(22, 16'h3030, "ANDW");
      expect_res(24, 8'hFC, "OR");     expect_resw(25, 16'hF00F, "ORW");
      expect_res(27, 8'hCC, "XOR");    expect_resw(28, 16'hEDCB, "XORW");
      expect_res(30, 8'hA5, "NOT");    expect_resw(31, 16'hEDCB, "NOTW");
      expect_res(33, 8'h02, "SHL");    expect_resw(34, 16'h0302, "SHLW");
      expect_res(36, 8'h40, "SHR");    expect_resw(37, 16'h40C0, "SHRW");
      expect_res(39, 8'h03, "ROL");    expect_resw(40, 16'h0003, "ROLW");
      expect_res(42, 8'hC0, "ROR");    expect_resw(43, 16'hC000, "RORW");
      expect_res(45, 8'h11, "LDD");    expect_resw(46, 16'h2211, "LDDW");
      expect_res(48, 8'h77, "LDA");    expect_resw(49, 16'h8877, "LDAW");
      checks++;
      if (mem[cur][16'h1820] !== 8'h99) begin failures++; $display("FAIL STA"); end
      checks++;
      if ({mem[cur][16'h1831], mem[cur][16'h1830]} !== 16'hBEEF) begin failures++; $display("FAIL STAW"); end
      expect_res(51, 8'h1F, "IN");
      checks++;
      if (io_out[cur][200] !== 8'h66) begin failures++; $display("FAIL OUT port 200 = %h", io_out[cur][200]); end
      expect_res(52, 0, "JZ taken");   expect_res(53, 1, "JNZ not taken");
      expect_res(54, 1, "JS not taken"); expect_res(55, 0, "JNS taken");
      expect_res(56, 0, "JS taken");   expect_res(57, 0, "JC taken");
      expect_res(58, 1, "JNC not taken"); expect_res(59, 1, "JZ not taken");
      expect_res(60, 0, "JO taken");   expect_res(61, 1, "JNO not taken");
      expect_res(62, 0, "JMR skipped"); expect_res(63, 8'h42, "CALL body");
      expect_res(64, 8'h43, "RET returned");
      checks++;
      if (sp_v[cur] !== 16'h3FFF) begin failures++; $display("FAIL stack not balanced: SP = %h", sp_v[cur]); end
      checks++;
      if (pc_v[cur] !== 16'(as.pc)) begin failures++; $display("FAIL halt PC = %h expected %h", pc_v[cur], as.pc); end
    end
    // every defined opcode was executed
    for (int op = 0; op < 256; op++)
      if (expected_cycles(8'(op)) > 0) begin
        checks++;
        if (!seen[op]) begin failures++; $display("FAIL opcode %h never executed", op); end
      end
    $display("program ran %0d cycles stretched, %0d cycles bare", cyc_v[0], cyc_v[1]);
    checks++;
    if (cyc_v[1] >= cyc_v[0]) begin failures++; $display("FAIL bare timing is not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
