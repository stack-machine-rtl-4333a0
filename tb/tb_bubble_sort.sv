// tb_bubble_sort: the exchange-sort benchmark on the full-size machine.
//
// The program sorts 100 bytes stored at address 1000 (decimal) in place,
// into ascending order. Two word pointers, ai and aj, walk the array: for
// each ai, aj runs from ai+1 to the last element; the bytes they point at
// are compared (LDA ai-value, LDA aj-value, CMP, JS) and swapped through the
// stack (LDA, LDA, STA, STA) when [ai] >= [aj]. Pointers are advanced with
// LDDW/INCW/STDW and tested against the end addresses with CMPW/JZ/JNZ.
//
// The 100 values are the sorted list the benchmark is known to produce; the
// test stores them shuffled (a fixed linear-congruential shuffle), runs the
// program on the stack machine with all parameters at their defaults, and
// checks that memory holds the sorted list afterwards. It also checks each
// instruction's length in cycles and prints the cycles per instruction.
module tb_bubble_sort;
  import sm_pkg::*;
  import sm_asm_pkg::*;

  localparam int unsigned N     = 100;
  localparam int unsigned FIRST = 1000;   // address of the first element

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

  // sorted result of the benchmark
  byte unsigned sorted_v [N] = '{
      0,   1,   2,   6,   7,   9,  10,  11,  12,  12,  12,  13,  15,  16,  17,  18,  19,  20,
     28,  30,  34,  40,  41,  42,  43,  44,  45,  46,  47,  48,  49,  50,  51,  52,  53,  54,
     55,  56,  56,  57,  58,  59,  60,  61,  62,  63,  64,  65,  66,  67,  67,  68,  69,  78,
     90, 100, 101, 102, 103, 104, 105, 106, 107, 108, 109, 110, 111, 112, 113, 114, 115, 116,
    117, 118, 119, 120, 121, 122, 123, 124, 125, 126, 127, 128, 129, 130, 131, 132, 133, 150,
    151, 152, 153, 154, 155, 156, 157, 158, 200, 255};

  // ---------------------------------------------------------------- monitors
  int cyc = 0, last_start = -1, n_instr = 0, n_bad_len = 0, n_swaps = 0;
  byte unsigned last_op;
  always @(posedge clk) if (!rst) begin
    if (instr_start || (halted && last_start >= 0)) begin
      if (last_start >= 0 && cyc - last_start != expected_cycles(last_op)) begin
        n_bad_len++;
        if (n_bad_len < 10)
          $display("FAIL opcode %h took %0d cycles, expected %0d", last_op, cyc - last_start,
                   expected_cycles(last_op));
      end
      if (instr_start) begin
        last_start = cyc;
        last_op    = host_rdata;
        n_instr++;
        if (host_rdata == OP_STA) n_swaps++;
      end else begin
        last_start = -1;
      end
    end
    if (!halted) cyc++;
  end

  task automatic host_write(int unsigned a, byte unsigned d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = 16'(a); host_wdata = d;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  sm_asm as;

  initial begin
    byte unsigned data_v [N];
    byte unsigned tmp, got;
    int unsigned  seed, j, ai, aj;
    as = new();
    // ------------------------------------------------------------ program
    as.org(0);
    as.op2(OP_LDIW, FIRST);      as.op2l(OP_STDW, "ai");    // ai -> first
    as.op2(OP_LDIW, FIRST + 1);  as.op2l(OP_STDW, "aj");    // aj -> second
    as.label("OuterLoop");
    as.op2(OP_LDIW, FIRST + N - 1);                         // last element
    as.op2l(OP_LDDW, "ai");
    as.op0(OP_CMPW);                                        // ai - last
    as.op2l(OP_JZ, "eloop");
    as.label("chkaj");
    as.op2(OP_LDIW, FIRST + N);                             // one past the end
    as.op2l(OP_LDDW, "aj");
    as.op0(OP_CMPW);                                        // aj - end
    as.op2l(OP_JNZ, "InnerLoop");
    as.op2l(OP_LDDW, "ai"); as.op0(OP_INCW); as.op2l(OP_STDW, "ai");   // ai++
    as.op2l(OP_LDDW, "ai"); as.op0(OP_INCW); as.op2l(OP_STDW, "aj");   // aj = ai+1
    as.op2l(OP_JMP, "OuterLoop");
    as.label("InnerLoop");
    as.op2l(OP_LDA, "aj");
    as.op2l(OP_LDA, "ai");
    as.op0(OP_CMP);                                         // [ai] - [aj]
    as.op2l(OP_JS, "SkipSwap");                             // [ai] < [aj]: keep
    as.op2l(OP_LDA, "ai");
    as.op2l(OP_LDA, "aj");
    as.op2l(OP_STA, "ai");                                  // [ai] <- old [aj]
    as.op2l(OP_STA, "aj");                                  // [aj] <- old [ai]
    as.label("SkipSwap");
    as.op2l(OP_LDDW, "aj"); as.op0(OP_INCW); as.op2l(OP_STDW, "aj");   // aj++
    as.op2l(OP_JMP, "chkaj");
    as.label("eloop");
    as.op0(OP_HLT);
    as.label("ai"); as.dw(0);
    as.label("aj"); as.dw(0);
    as.resolve();
    checks++;
    if (as.pc >= FIRST) begin failures++; $display("FAIL program overlaps the data"); end

    // ------------------------------------------------------ shuffled data
    foreach (data_v[i]) data_v[i] = sorted_v[i];
    seed = 32'd12345;
    for (int i = N - 1; i > 0; i--) begin
      seed = seed * 32'd1103515245 + 32'd12345;
      j = (seed >> 16) % (i + 1);
      tmp = data_v[i]; data_v[i] = data_v[j]; data_v[j] = tmp;
    end
    foreach (data_v[i]) as.img[FIRST + i] = data_v[i];

    port_in = '0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    rst = 1'b1;
    for (int a = 0; a < 16384; a++) host_write(a, as.img[a]);
    @(negedge clk);
    host_en = 1'b0;
    rst = 1'b0;
    wait (halted);
    repeat (2) @(posedge clk);

    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      host_en = 1'b1; host_addr = 16'(FIRST + i);
      #1 got = host_rdata;
      checks++;
      if (got !== sorted_v[i]) begin
        failures++;
        $display("FAIL MEM[%0d] = %0d, expected %0d", FIRST + i, got, sorted_v[i]);
      end
    end
    checks++;
    if (n_bad_len != 0) begin failures++; $display("FAIL %0d instructions had a wrong length", n_bad_len); end
    checks++;
    if (sp !== 16'h3FFF) begin failures++; $display("FAIL SP = %h at halt", sp); end
    checks++;
    if (n_swaps == 0) begin failures++; $display("FAIL no swap happened"); end
    $display("sorted %0d bytes: %0d instructions, %0d cycles, %0d stores by STA, CPI = %0.2f",
             N, n_instr, cyc, n_swaps, real'(cyc) / real'(n_instr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
