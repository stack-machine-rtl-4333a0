// sm_flags: the flag register (C carry, O overflow, S sign, Z zero).
//
// Four flip-flops, each with its own write enable, so that an operation can
// update a subset of the flags (rotates change only C) while the others keep
// their value. The conditional jumps read the register output.
//
// Interface: `we` selects which flags take the matching bit of `d` on the
// rising clock edge; `q` is the current value. Synchronous active-high reset
// clears all flags; the reset value is this design's choice.
module sm_flags
  import sm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  flags_t we,
  input  flags_t d,
  output flags_t q
);

  flags_t q_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      q_r <= '0;
    end else begin
      if (we.c) q_r.c <= d.c;
      if (we.o) q_r.o <= d.o;
      if (we.s) q_r.s <= d.s;
      if (we.z) q_r.z <= d.z;
    end
  end

  assign q = q_r;

endmodule
