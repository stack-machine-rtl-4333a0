// tb_sm_alu: self-checking test of the ALU and its A, B and C latches.
//
// For random operations, widths and operands (plus corner values such as 0,
// 0x7F, 0x80 and all ones) it loads the operands byte by byte as pops would,
// pulses exec, and compares C, R, the flag values and the flag write enables
// with a reference model written with plain integer arithmetic.
module tb_sm_alu;
  import sm_pkg::*;

  logic        clk = 1'b0, rst;
  logic        load_a, load_b, load_hi, exec, word, wide_mul;
  logic [7:0]  din;
  alu_op_e     op;
  logic [15:0] a, c, r;
  flags_t      flags_d, flags_we;
  int          checks = 0, failures = 0;

  sm_alu dut (.clk, .rst, .load_a, .load_b, .load_hi, .din, .exec, .op, .word,
              .wide_mul, .a, .c, .r, .flags_d, .flags_we);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(bit to_b, bit hi, logic [7:0] v);
    @(negedge clk);
    load_a = !to_b; load_b = to_b; load_hi = hi; din = v;
    @(posedge clk); #1;
    load_a = 1'b0; load_b = 1'b0;
  endtask

  function automatic int sgn(int v, int w);
    return (v >= (1 << (w - 1))) ? v - (1 << w) : v;
  endfunction

  task automatic run(alu_op_e o, bit w16, bit wm, int av, int bv);
    int w, m, res, rem, exact;
    bit fc, fo, fs, fz;
    flags_t exp_we, got_d, got_we;
    w = w16 ? 16 : 8;
    m = (1 << w) - 1;
    if (wm) m = 255;
    av &= m; bv &= m;
    load(0, 0, av[7:0]);
    if (w16) load(0, 1, av[15:8]);
    load(1, 0, bv[7:0]);
    if (w16) load(1, 1, bv[15:8]);
    fc = 0; fo = 0; rem = 0;
    exp_we = 4'b1111;
    case (o)
      ALU_ADD: begin exact = av + bv; res = exact & m; fc = exact > m;
                     fo = (sgn(av,w) + sgn(bv,w) > m/2) || (sgn(av,w) + sgn(bv,w) < -(m/2) - 1); end
      ALU_SUB: begin res = (av - bv) & m; fc = av < bv;
                     fo = (sgn(av,w) - sgn(bv,w) > m/2) || (sgn(av,w) - sgn(bv,w) < -(m/2) - 1); end
      ALU_INC: begin res = (av + 1) & m; fc = (av == m); fo = (av == m/2); end
      ALU_DEC: begin res = (av - 1) & m; fc = (av == 0); fo = (av == m/2 + 1); end
      ALU_MUL: begin exact = av * bv;
                     if (wm) res = exact;
                     else if (w16) res = exact & 16'hFFFF;
                     else begin res = exact & 255; fc = exact > 255; fo = fc; end
               end
      ALU_DIV: if (bv == 0) begin res = m; rem = av; fo = 1; end
               else begin res = av / bv; rem = av % bv; end
      ALU_AND: res = av & bv;
      ALU_OR:  res = av | bv;
      ALU_XOR: res = av ^ bv;
      ALU_NOT: res = m - av;
      ALU_SHL: begin res = (av * 2) & m; fc = av > m/2; end
      ALU_SHR: begin res = av / 2; fc = av % 2; end
      ALU_ROL: begin res = ((av * 2) & m) + (av > m/2 ? 1 : 0); fc = av > m/2; exp_we = 4'b1000; end
      default: begin res = av / 2 + ((av % 2) ? (m/2 + 1) : 0); fc = av % 2; exp_we = 4'b1000; end
    endcase
    if (wm) w = 16;
    fz = (res == 0);
    fs = (o == ALU_SUB || o == ALU_DEC) ? fc : (res >= (1 << (w - 1)));
    @(negedge clk);
    op = o; word = w16; wide_mul = wm; exec = 1'b1;
    #1;
    got_d = flags_d; got_we = flags_we;
    @(posedge clk); #1;
    exec = 1'b0;
    checks++;
    if (c !== 16'(res) || r !== 16'(rem)) begin
      failures++;
      $display("FAIL %s w16=%0d wm=%0d a=%h b=%h: C=%h R=%h expected %h %h",
               o.name(), w16, wm, av, bv, c, r, res, rem);
    end
    checks++;
    if (got_we !== exp_we) begin
      failures++; $display("FAIL %s flag enables %b expected %b", o.name(), got_we, exp_we);
    end
    checks++;
    if ((got_d & exp_we) !== ({fc, fo, fs, fz} & exp_we)) begin
      failures++;
      $display("FAIL %s w16=%0d a=%h b=%h flags %b expected %b (enabled %b)",
               o.name(), w16, av, bv, got_d, {fc, fo, fs, fz}, exp_we);
    end
  endtask

  initial begin
    int corner [8] = '{0, 1, 16'h7F, 16'h80, 16'hFF, 16'h7FFF, 16'h8000, 16'hFFFF};
    rst = 1'b1; load_a = 0; load_b = 0; load_hi = 0; exec = 0; din = 0;
    op = ALU_ADD; word = 0; wide_mul = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (a !== 16'h0 || c !== 16'h0) begin failures++; $display("FAIL reset"); end
    // A byte load clears the high byte of the latch.
    load(0, 1, 8'hAB); load(0, 0, 8'h12);
    checks++;
    if (a !== 16'h0012) begin failures++; $display("FAIL byte load a=%h", a); end
    for (int o = 0; o <= int'(ALU_ROR); o++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          run(alu_op_e'(o), 0, 0, corner[i], corner[j]);
          run(alu_op_e'(o), 1, 0, corner[i], corner[j]);
        end
      for (int k = 0; k < 60; k++) begin
        run(alu_op_e'(o), 0, 0, $urandom, $urandom);
        run(alu_op_e'(o), 1, 0, $urandom, $urandom);
      end
    end
    for (int k = 0; k < 100; k++) run(ALU_MUL, 0, 1, $urandom, $urandom);
    run(ALU_MUL, 0, 1, 255, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
