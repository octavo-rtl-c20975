// Simple dual-port block RAM: one synchronous write port and one read port.
//
// This is the storage element of every Octavo memory. The read address is
// registered on the clock edge and the word it selects appears at rdata
// during the following cycle, which is how an FPGA block RAM without its
// optional output register behaves; the I memory uses it this way as a
// one-cycle memory. A write happens on the clock edge when we is high.
// When a read and a write address the same word on the same edge, the read
// returns the newly written word (write forwarding, as the block RAMs the
// design was tuned for are configured). Contents are not reset.
//
// Ports: clk; we/waddr/wdata write port; raddr read address (sampled on the
// edge); rdata read data (valid the cycle after raddr was sampled).
module octavo_ram #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned ADDR  = 10
) (
  input  logic             clk,
  input  logic             we,
  input  logic [ADDR-1:0]  waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [ADDR-1:0]  raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [2**ADDR];
  logic [ADDR-1:0]  raddr_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    raddr_q <= raddr;
  end

  assign rdata = mem[raddr_q];

endmodule
