// Self-checking testbench for octavo_mul: a new pair of signed operands
// every cycle; each double-word product must appear exactly three cycles
// later, which also checks that the two half-rate datapaths alternate. A
// second instance with EXTRA = 2 output stages must give the same
// products exactly five cycles after their operands.
module octavo_mul_tb;
  localparam int W = 36, LAT = 3, EXTRA = 2, LAT2 = LAT + EXTRA;
  logic clk = 0, rst;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  logic [2*W-1:0] p2;
  logic [2*W-1:0] exp_pipe [LAT2+1];
  bit             v_pipe   [LAT2+1];
  int checks = 0, failures = 0;

  octavo_mul #(.WIDTH(W)) dut (.*);
  octavo_mul #(.WIDTH(W), .EXTRA(EXTRA)) dut2 (.clk, .rst, .a, .b, .p(p2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= LAT2; i++) v_pipe[i] = 0;
    rst = 1; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (v_pipe[LAT]) begin
        checks++;
        if (p !== exp_pipe[LAT]) begin
          failures++;
          $display("mismatch: got %h expected %h", p, exp_pipe[LAT]);
        end
      end
      if (v_pipe[LAT2]) begin
        checks++;
        if (p2 !== exp_pipe[LAT2]) begin
          failures++;
          $display("EXTRA=%0d mismatch: got %h expected %h", EXTRA, p2, exp_pipe[LAT2]);
        end
      end
      for (int i = LAT2; i > 0; i--) begin
        exp_pipe[i] = exp_pipe[i-1]; v_pipe[i] = v_pipe[i-1];
      end
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (n % 5 == 0) b = '1;                    // -1
      exp_pipe[1] = (2*W)'($signed({{W{a[W-1]}}, a}) * $signed({{W{b[W-1]}}, b}));
      v_pipe[1] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
