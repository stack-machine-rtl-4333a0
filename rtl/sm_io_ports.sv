// sm_io_ports: the machine's 256 byte-wide I/O ports.
//
// IN n reads input port n, OUT n writes output port n. Each output port is a
// byte register that holds the last value written to it; each write also
// gives a one-cycle strobe on that port's `port_wstb` bit so that a device
// can tell a new value from an old one. Input ports are read
// combinationally: `rdata` is port_in[addr] in the same cycle.
//
// Interface: processor side `addr`, `we`, `wdata`, `rdata`; pin side
// `port_in`, `port_out`, `port_wstb`. Writes take effect on the rising clock
// edge. Synchronous active-high reset clears the output registers. Separate
// input and output registers per port number, the strobe and the reset value
// are this design's choices.
module sm_io_ports #(
  parameter int unsigned N_PORTS = 256
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(N_PORTS)-1:0] addr,
  input  logic                       we,
  input  logic [7:0]                 wdata,
  output logic [7:0]                 rdata,
  input  logic [N_PORTS-1:0][7:0]    port_in,
  output logic [N_PORTS-1:0][7:0]    port_out,
  output logic [N_PORTS-1:0]         port_wstb
);

  logic [N_PORTS-1:0][7:0] out_q;
  logic [N_PORTS-1:0]      stb_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_q <= '0;
      stb_q <= '0;
    end else begin
      stb_q <= '0;
      if (we) begin
        out_q[addr] <= wdata;
        stb_q[addr] <= 1'b1;
      end
    end
  end

  assign rdata     = port_in[addr];
  assign port_out  = out_q;
  assign port_wstb = stb_q;

endmodule
