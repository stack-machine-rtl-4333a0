// sm_memory: the machine's single byte-wide memory.
//
// One 2**ADDR_W-byte array (16 KB by default) holds all three segments: code
// and data from 0x0000 up to 0x2FFF and the stack from 0x3FFF down to
// 0x3000. The segments are a software convention; the memory itself is flat.
//
// Interface: one port. `rdata` shows the byte at `addr` in the same cycle
// (asynchronous read), so a pop, an operand fetch or a data read completes
// in one clock as the machine's one-unit-per-memory-access cost model
// assumes. When `we` is high, `wdata` is written at `addr` on the rising
// clock edge. The memory has no reset; its contents are loaded from outside
// before the processor is started.
module sm_memory #(
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata
);

  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
