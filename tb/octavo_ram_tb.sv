// Self-checking testbench for octavo_ram: random writes and reads against a
// reference array. Checks one-cycle read latency and that a read and a
// write of the same word on the same edge return the new word. The read
// address is changed right after each edge to show it is registered.
module octavo_ram_tb;
  localparam int W = 36, A = 6;
  logic clk = 0, we;
  logic [A-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [2**A];
  logic [W-1:0] exp_q;
  bit exp_v = 0;
  int checks = 0, failures = 0;

  octavo_ram #(.WIDTH(W), .ADDR(A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word once
    for (int i = 0; i < 2**A; i++) begin
      @(negedge clk);
      we = 1; waddr = A'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          $display("read mismatch: got %h expected %h", rdata, exp_q);
        end
      end
      raddr = A'($urandom);
      we    = $urandom_range(0, 1) == 1;
      waddr = (n % 4 == 0) ? raddr : A'($urandom);
      wdata = {$urandom, $urandom};
      if (we) ref_mem[waddr] = wdata;     // write forwarding: new word
      exp_q = ref_mem[raddr];
      exp_v = 1;
      // the address is sampled on the edge only: change it right after
      @(posedge clk);
      #1 raddr = A'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
