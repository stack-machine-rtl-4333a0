// tb_sm_flags: self-checking test of the flag register.
//
// Applies random values with random per-flag write enables and checks each
// flag against a model that keeps a flag unchanged unless its enable is set.
// Also checks that reset clears all four flags.
module tb_sm_flags;
  import sm_pkg::*;

  logic   clk = 1'b0, rst;
  flags_t we, d, q, model;
  int     checks = 0, failures = 0;

  sm_flags dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = '0; d = '1;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (q !== 4'b0000) begin failures++; $display("FAIL reset value %b", q); end
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = flags_t'($urandom);
      d  = flags_t'($urandom);
      @(posedge clk); #1;
      if (we.c) model.c = d.c;
      if (we.o) model.o = d.o;
      if (we.s) model.s = d.s;
      if (we.z) model.z = d.z;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d we=%b d=%b q=%b expected %b", i, we, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
