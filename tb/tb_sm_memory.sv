// tb_sm_memory: self-checking test of the 16 KB memory.
//
// Writes random bytes to random addresses (plus both ends of the address
// range), keeping its own copy, then reads every written address back and
// checks that the read is combinational (valid in the cycle the address is
// applied) and that unwritten neighbours are not disturbed.
module tb_sm_memory;
  localparam int unsigned ADDR_W = 14;

  logic              clk = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic              we;
  logic [7:0]        wdata, rdata;
  int                checks = 0, failures = 0;
  byte unsigned      model [int];

  sm_memory #(.ADDR_W(ADDR_W)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int unsigned a, byte unsigned d);
    @(negedge clk);
    addr = a[ADDR_W-1:0]; wdata = d; we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
    model[a] = d;
  endtask

  initial begin
    int unsigned a;
    we = 1'b0; addr = '0; wdata = '0;
    // fill a neighbourhood with a known pattern
    for (int i = 0; i < 16; i++) write(16'h1000 + i, 8'hA0 + i);
    write(0, 8'h5A);
    write(2**ADDR_W - 1, 8'hC3);
    for (int i = 0; i < 500; i++) begin
      a = $urandom_range(2**ADDR_W - 1);
      if (a >= 16'h1000 && a < 16'h1010) continue;
      write(a, 8'($urandom));
    end
    // overwrite inside the pattern; the neighbours must keep their value
    write(16'h1008, 8'h11);
    foreach (model[k]) begin
      @(negedge clk);
      addr = k[ADDR_W-1:0];
      #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        $display("FAIL addr %h read %h expected %h", k, rdata, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
