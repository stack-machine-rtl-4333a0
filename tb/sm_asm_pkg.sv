// sm_asm_pkg: a small two-pass assembler for the stack machine, used by the
// testbenches to build program images.
//
// An sm_asm object holds a 16 KB image. op0/op1/op2 emit one-, two- and
// three-byte instructions (operands little-endian), op2l and op1r emit an
// instruction whose operand is a label (absolute 16-bit, or 8-bit relative
// to the next instruction as JMR uses), label() defines a label at the
// current address, db/dw place data. resolve() patches every label
// reference; an undefined label is reported with $error.
package sm_asm_pkg;

  typedef struct {
    int unsigned at;
    string       name;
    bit          rel;
  } fixup_t;

  class sm_asm;
    byte unsigned img [16384];
    int unsigned  pc;
    int unsigned  labels [string];
    fixup_t       fixups [$];

    function new();
      foreach (img[i]) img[i] = 8'h00;
      pc = 0;
    endfunction

    function void org(int unsigned a);
      pc = a;
    endfunction

    function void label(string name);
      labels[name] = pc;
    endfunction

    function void db(byte unsigned b);
      img[pc] = b;
      pc++;
    endfunction

    function void dw(int unsigned w);
      db(w[7:0]);
      db(w[15:8]);
    endfunction

    function void op0(byte unsigned op);
      db(op);
    endfunction

    function void op1(byte unsigned op, byte unsigned b);
      db(op);
      db(b);
    endfunction

    function void op2(byte unsigned op, int unsigned w);
      db(op);
      dw(w);
    endfunction

    function void op2l(byte unsigned op, string name);
      fixup_t f;
      db(op);
      f.at = pc; f.name = name; f.rel = 1'b0;
      fixups.push_back(f);
      dw(0);
    endfunction

    function void op1r(byte unsigned op, string name);
      fixup_t f;
      db(op);
      f.at = pc; f.name = name; f.rel = 1'b1;
      fixups.push_back(f);
      db(0);
    endfunction

    function void resolve();
      foreach (fixups[i]) begin
        if (!labels.exists(fixups[i].name)) begin
          $error("undefined label %s", fixups[i].name);
        end else if (fixups[i].rel) begin
          int d;
          d = int'(labels[fixups[i].name]) - int'(fixups[i].at + 1);
          img[fixups[i].at] = d[7:0];
        end else begin
          img[fixups[i].at]     = labels[fixups[i].name] & 8'hFF;
          img[fixups[i].at + 1] = (labels[fixups[i].name] >> 8) & 8'hFF;
        end
      end
    endfunction
  endclass

  // Expected instruction length in cycles, fetch cycle included:
  // 1 + max(clock units of the instruction table, micro-steps).
  function automatic int expected_cycles(byte unsigned op);
    case (op)
      8'h00: return 4;  8'h01: return 5;  8'h02: return 5;  8'h03: return 7;
      8'h04: return 7;  8'h05: return 7;  8'h06: return 5;  8'h07: return 7;
      8'h08: return 4;  8'h09: return 4;
      8'h10: return 6;  8'h11: return 9;  8'h12: return 6;  8'h13: return 10;
      8'h14: return 7;  8'h15: return 9;  8'h16: return 7;  8'h17: return 10;
      8'h18: return 5;  8'h19: return 7;  8'h1A: return 5;  8'h1B: return 7;
      8'h20: return 5;  8'h21: return 4;
      8'h30: return 6;  8'h31: return 5;
      8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39: return 6;
      8'h40: return 4;  8'h41: return 2;
      8'h50, 8'h52, 8'h54, 8'h56: return 5;
      8'h51, 8'h53, 8'h55, 8'h57: return 7;
      8'h60: return 6;  8'h61: return 10; 8'h62: return 7;  8'h63: return 10;
      8'h64: return 6;  8'h65: return 8;  8'h66: return 7;  8'h67: return 9;
      8'h68: return 6;  8'h69: return 8;  8'h6A: return 9;  8'h6B: return 9;
      default: return -1;
    endcase
  endfunction

  // Instruction length in cycles without stretching: 1 + micro-steps.
  function automatic int bare_cycles(byte unsigned op);
    case (op)
      8'h00: return 3;  8'h01: return 5;  8'h02: return 5;  8'h03: return 7;
      8'h04: return 7;  8'h05: return 7;  8'h06: return 5;  8'h07: return 7;
      8'h08: return 3;  8'h09: return 4;
      8'h10: return 5;  8'h11: return 6;  8'h12: return 6;  8'h13: return 10;
      8'h14: return 5;  8'h15: return 8;  8'h16: return 5;  8'h17: return 8;
      8'h18: return 4;  8'h19: return 6;  8'h1A: return 4;  8'h1B: return 6;
      8'h20: return 5;  8'h21: return 4;
      8'h30: return 4;  8'h31: return 3;
      8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39: return 4;
      8'h40: return 1;  8'h41: return 2;
      8'h50, 8'h52, 8'h54, 8'h56: return 4;
      8'h51, 8'h53, 8'h55, 8'h57: return 6;
      8'h60: return 5;  8'h61: return 8;  8'h62: return 5;  8'h63: return 8;
      8'h64: return 4;  8'h65: return 6;  8'h66: return 5;  8'h67: return 8;
      8'h68: return 4;  8'h69: return 6;  8'h6A: return 9;  8'h6B: return 9;
      default: return -1;
    endcase
  endfunction

endpackage
