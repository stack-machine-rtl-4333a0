// tb_sm_io_ports: self-checking test of the 256 I/O ports.
//
// Writes random values to random output ports and checks that exactly that
// port changes, that its write strobe pulses for one cycle, and that all
// other ports hold. Reads random input ports and checks the combinational
// read path. Checks that reset clears the output ports.
module tb_sm_io_ports;
  localparam int unsigned N = 256;

  logic               clk = 1'b0, rst;
  logic [7:0]         addr, wdata, rdata;
  logic               we;
  logic [N-1:0][7:0]  port_in, port_out, model;
  logic [N-1:0]       port_wstb;
  int                 checks = 0, failures = 0;

  sm_io_ports #(.N_PORTS(N)) dut (.clk, .rst, .addr, .we, .wdata, .rdata,
                                  .port_in, .port_out, .port_wstb);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < N; i++) port_in[i] = 8'($urandom);
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    model = '0;
    checks++;
    if (port_out !== model) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      addr = 8'($urandom); wdata = 8'($urandom); we = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (rdata !== port_in[addr]) begin
        failures++; $display("FAIL read port %0d got %h expected %h", addr, rdata, port_in[addr]);
      end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++;
      if (port_out !== model) begin failures++; $display("FAIL outputs after write to %0d", addr); end
      checks++;
      if (port_wstb !== (we ? (N'(1) << addr) : '0)) begin
        failures++; $display("FAIL strobe after write to %0d", addr);
      end
      we = 1'b0;
      port_in[$urandom_range(N-1)] = 8'($urandom);
    end
    @(negedge clk); rst = 1'b1; @(posedge clk); #1;
    checks++;
    if (port_out !== '0) begin failures++; $display("FAIL reset clears outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
