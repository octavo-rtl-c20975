// Self-checking testbench for octavo_dmem (A/B memory with memory-mapped
// I/O). Random simultaneous reads and writes, including I/O addresses,
// against a reference model:
//  - a read returns its word exactly two cycles after the address;
//  - it sees every write presented in an earlier cycle (the RAM write in
//    WR1 overlaps the next read's RD0), but not one presented in the same
//    cycle;
//  - a read of an I/O address returns the I/O input sampled in RD0;
//  - a write to an I/O address raises exactly that port's write strobe
//    for one cycle with the data on io_wdata.
module octavo_dmem_tb;
  localparam int W = 36, A = 6, P = 4, LAT = 2;
  logic clk = 0, rst, we;
  logic [A-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, io_wdata;
  logic [W-1:0] io_rdata [P];
  logic [P-1:0] io_wren;
  logic [W-1:0] ref_mem [2**A];
  logic [W-1:0] exp_pipe [LAT+1];
  bit           v_pipe   [LAT+1];
  logic [P-1:0] exp_wren;
  logic [W-1:0] exp_wdata;
  int checks = 0, failures = 0, io_reads = 0, io_writes = 0;

  octavo_dmem #(.WIDTH(W), .ADDR(A), .IO_PORTS(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_io(logic [A-1:0] x);
    return x >= A'(2**A - P);
  endfunction

  initial begin
    for (int i = 0; i <= LAT; i++) v_pipe[i] = 0;
    rst = 1; we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < P; i++) io_rdata[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2**A; i++) begin
      @(negedge clk);
      we = 1; waddr = A'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    exp_wren = '0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (v_pipe[LAT]) begin
        checks++;
        if (rdata !== exp_pipe[LAT]) begin
          failures++;
          $display("read mismatch: got %h expected %h", rdata, exp_pipe[LAT]);
        end
      end
      checks++;
      if (io_wren !== exp_wren || (exp_wren != 0 && io_wdata !== exp_wdata)) begin
        failures++;
        $display("I/O write mismatch: wren %b expected %b", io_wren, exp_wren);
      end
      for (int i = LAT; i > 0; i--) begin
        exp_pipe[i] = exp_pipe[i-1]; v_pipe[i] = v_pipe[i-1];
      end
      for (int i = 0; i < P; i++) io_rdata[i] = {$urandom, $urandom};
      raddr = (n % 3 == 0) ? A'(2**A - 1 - $urandom_range(0, P-1)) : A'($urandom);
      we    = $urandom_range(0, 1) == 1;
      waddr = (n % 4 == 0) ? A'(2**A - 1 - $urandom_range(0, P-1))
            : (n % 4 == 1) ? raddr : A'($urandom);
      wdata = {$urandom, $urandom};
      // expected read: previous cycles' writes only
      if (is_io(raddr)) begin
        exp_pipe[1] = io_rdata[raddr[$clog2(P)-1:0]];
        io_reads++;
      end else begin
        exp_pipe[1] = ref_mem[raddr];
      end
      v_pipe[1] = 1;
      exp_wren = '0;
      if (we) begin
        ref_mem[waddr] = wdata;
        if (is_io(waddr)) begin
          exp_wren[waddr[$clog2(P)-1:0]] = 1'b1;
          io_writes++;
        end
      end
      exp_wdata = wdata;
    end
    if (io_reads == 0 || io_writes == 0) begin
      failures++;
      $display("I/O reads %0d writes %0d: not exercised", io_reads, io_writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
