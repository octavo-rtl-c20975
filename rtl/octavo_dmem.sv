// A or B data memory of Octavo: a block RAM with memory-mapped, word-wide
// I/O ports in front of its read and write ports.
//
// The IO_PORTS uppermost addresses (IO_PORTS a power of two) are I/O
// locations. Read (two cycles, RD0 and RD1): in RD0 the address goes to the
// RAM while the low address bits select one of the I/O inputs, which is
// registered together with the high address bits; in RD1 the high bits
// decide whether the RAM word or the registered I/O word is returned, and
// the result is registered. rdata is therefore valid two cycles after raddr
// was presented. Write (two cycles, WR0 and WR1): in WR0 the address and
// data are registered for the RAM, the data is registered onto the shared
// I/O output bus and, if the address is an I/O location, the write-enable
// of that I/O port is registered high; in WR1 the RAM is written. A write
// to an I/O location is also stored in the RAM.
//
// The structure follows the published memory design. The I/O input is
// sampled in RD0, io_wdata/io_wren are valid for one cycle after WR0, and
// while rst is high the RAM is not written and the I/O write enables are
// cleared.
module octavo_dmem #(
  parameter int unsigned WIDTH    = 36,
  parameter int unsigned ADDR     = 10,
  parameter int unsigned IO_PORTS = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  // write port (result R written at address D)
  input  logic                 we,
  input  logic [ADDR-1:0]      waddr,
  input  logic [WIDTH-1:0]     wdata,
  // read port
  input  logic [ADDR-1:0]      raddr,
  output logic [WIDTH-1:0]     rdata,
  // memory-mapped I/O
  input  logic [WIDTH-1:0]     io_rdata [IO_PORTS],
  output logic [WIDTH-1:0]     io_wdata,
  output logic [IO_PORTS-1:0]  io_wren
);

  localparam int unsigned LSB = (IO_PORTS > 1) ? $clog2(IO_PORTS) : 1;
  localparam int unsigned MSB = ADDR - LSB;

  initial begin
    assert (IO_PORTS >= 2 && (1 << $clog2(IO_PORTS)) == IO_PORTS)
      else $error("IO_PORTS must be a power of two, at least 2");
  end

  // ---------------- write: WR0 registers, WR1 writes the RAM -------------
  logic             we_q;
  logic [ADDR-1:0]  waddr_q;
  logic [WIDTH-1:0] wdata_q;

  always_ff @(posedge clk) begin
    waddr_q  <= waddr;
    wdata_q  <= wdata;
    io_wdata <= wdata;
    if (rst) begin
      we_q    <= 1'b0;
      io_wren <= '0;
    end else begin
      we_q    <= we;
      io_wren <= '0;
      if (we && (waddr[ADDR-1:LSB] == '1)) io_wren[waddr[LSB-1:0]] <= 1'b1;
    end
  end

  // ---------------- read: RD0 selects, RD1 chooses and registers ---------
  logic [WIDTH-1:0] ram_rdata;
  logic [WIDTH-1:0] io_sel_q;
  logic [MSB-1:0]   msb_q;

  octavo_ram #(.WIDTH(WIDTH), .ADDR(ADDR)) u_ram (
    .clk   (clk),
    .we    (we_q & !rst),
    .waddr (waddr_q),
    .wdata (wdata_q),
    .raddr (raddr),
    .rdata (ram_rdata)
  );

  always_ff @(posedge clk) begin
    io_sel_q <= io_rdata[raddr[LSB-1:0]];
    msb_q    <= raddr[ADDR-1:LSB];
    rdata    <= (msb_q == '1) ? io_sel_q : ram_rdata;
  end

  // At most one I/O port is written per cycle, and only in the cycle
  // after a write to its address.
  a_io_wren_onehot: assert property (@(posedge clk) disable iff (rst)
    (io_wren & (io_wren - 1'b1)) == '0);
  a_io_wren_cause: assert property (@(posedge clk) disable iff (rst)
    (io_wren != '0) |-> $past(we && (waddr[ADDR-1:LSB] == '1)));

endmodule
