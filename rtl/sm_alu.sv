// sm_alu: arithmetic logic unit with input latches A, B and output latch C.
//
// The ALU has two 16-bit input latches, A and B, filled one byte at a time as
// the control unit pops operands off the stack, and an output latch C (plus
// R, the remainder of a division). A byte load into the low half also clears
// the high half, so byte operations see zero-extended operands. On `exec` the
// operation `op` is computed from A and B and latched into C/R at the next
// clock edge; `flags_d`/`flags_we` carry the new flag values and which flags
// the operation updates, for the flag register to take on the same edge.
//
// Operand order follows the micro-steps: A is the first value popped (the
// top of the stack), B the second, and C = A op B.
//
// Flag rules (the published micro-steps only say UPDATE-FLAG; the details are
// this design's choice):
//   Z  result (of the result width) is zero
//   S  most significant bit of the result, except for SUB/CMP/DEC where S is
//      the sign of the true difference of the unsigned operands (A < B). This
//      makes `CMP ; JS` an unsigned less-than test, which the published bubble
//      sort needs to order values 0..255.
//   C  carry out (ADD, INC), borrow (SUB, DEC), bit shifted out (SHL, SHR),
//      bit rotated round (ROL, ROR), high byte non-zero (byte MUL)
//   O  signed overflow (ADD, SUB, INC, DEC), high byte non-zero (byte MUL),
//      divide by zero (DIV)
//   ROL and ROR update only C, as in their micro-steps; the other operations
//   update all four flags.
// MULW multiplies the two popped bytes into a 16-bit product. Division by
// zero gives an all-ones quotient and the dividend as remainder.
//
// Timing: latches load on the rising edge; C, R and the flags are valid the
// cycle after `exec`. flags_d/flags_we are combinational from A, B and op.
module sm_alu
  import sm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load_a,     // A[byte] <= din
  input  logic        load_b,     // B[byte] <= din
  input  logic        load_hi,    // byte select for load_a/load_b
  input  logic [7:0]  din,
  input  logic        exec,       // latch C/R from op
  input  alu_op_e     op,
  input  logic        word,       // 16-bit operation
  input  logic        wide_mul,   // MUL with a 16-bit product (MULW)
  output logic [15:0] a,
  output logic [15:0] c,
  output logic [15:0] r,
  output flags_t      flags_d,
  output flags_t      flags_we
);

  logic [15:0] a_q, b_q, c_q, r_q;
  logic [15:0] res, rem;
  flags_t      f;
  flags_t      we;

  // width-dependent helpers
  logic [16:0] sum, diff;
  logic [15:0] msb_mask;
  logic [31:0] prod;

  always_comb begin
    msb_mask = word ? 16'h8000 : 16'h0080;
    sum      = {1'b0, a_q} + {1'b0, b_q};
    diff     = {1'b0, a_q} - {1'b0, b_q};
    prod     = a_q * b_q;
    res      = '0;
    rem      = '0;
    f        = '0;
    we       = '{c: 1'b1, o: 1'b1, s: 1'b1, z: 1'b1};
    unique case (op)
      ALU_ADD: begin
        res = sum[15:0];
        f.c = word ? sum[16] : sum[8];
        f.o = ((a_q & msb_mask) == (b_q & msb_mask)) && ((res & msb_mask) != (a_q & msb_mask));
      end
      ALU_SUB: begin
        res = diff[15:0];
        f.c = a_q < b_q;
        f.o = ((a_q & msb_mask) != (b_q & msb_mask)) && ((res & msb_mask) != (a_q & msb_mask));
      end
      ALU_INC: begin
        res = a_q + 16'd1;
        f.c = word ? (a_q == 16'hFFFF) : (a_q[7:0] == 8'hFF);
        f.o = word ? (a_q == 16'h7FFF) : (a_q[7:0] == 8'h7F);
      end
      ALU_DEC: begin
        res = a_q - 16'd1;
        f.c = word ? (a_q == 16'h0000) : (a_q[7:0] == 8'h00);
        f.o = word ? (a_q == 16'h8000) : (a_q[7:0] == 8'h80);
      end
      ALU_MUL: begin
        res = prod[15:0];
        if (!wide_mul && !word) begin
          f.c = prod[15:8] != 8'h00;
          f.o = f.c;
        end
      end
      ALU_DIV: begin
        if (b_q == 16'h0000) begin
          res = 16'hFFFF;
          rem = a_q;
          f.o = 1'b1;
        end else begin
          res = a_q / b_q;
          rem = a_q % b_q;
        end
      end
      ALU_AND: res = a_q & b_q;
      ALU_OR:  res = a_q | b_q;
      ALU_XOR: res = a_q ^ b_q;
      ALU_NOT: res = ~a_q;
      ALU_SHL: begin
        res = a_q << 1;
        f.c = (a_q & msb_mask) != 0;
      end
      ALU_SHR: begin
        res = a_q >> 1;
        f.c = a_q[0];
      end
      ALU_ROL: begin
        f.c = (a_q & msb_mask) != 0;
        res = (a_q << 1) | {15'd0, f.c};
        we  = '{c: 1'b1, o: 1'b0, s: 1'b0, z: 1'b0};
      end
      ALU_ROR: begin
        f.c = a_q[0];
        res = (a_q >> 1) | (f.c ? msb_mask : 16'h0000);
        we  = '{c: 1'b1, o: 1'b0, s: 1'b0, z: 1'b0};
      end
      default: res = '0;
    endcase
    // trim to the result width
    if (!(word || (op == ALU_MUL && wide_mul))) begin
      res = {8'h00, res[7:0]};
      rem = {8'h00, rem[7:0]};
    end
    f.z = (res == 16'h0000);
    if (op == ALU_SUB || op == ALU_DEC) f.s = f.c;
    else if (op == ALU_MUL && wide_mul) f.s = res[15];
    else                                f.s = (res & msb_mask) != 0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      r_q <= '0;
    end else begin
      if (load_a) begin
        if (load_hi) a_q[15:8] <= din;
        else         a_q       <= {8'h00, din};
      end
      if (load_b) begin
        if (load_hi) b_q[15:8] <= din;
        else         b_q       <= {8'h00, din};
      end
      if (exec) begin
        c_q <= res;
        r_q <= rem;
      end
    end
  end

  assign a        = a_q;
  assign c        = c_q;
  assign r        = r_q;
  assign flags_d  = f;
  assign flags_we = exec ? we : '0;

endmodule
