// Self-checking testbench for octavo_addsub: random additions and
// subtractions, one per cycle, each checked two cycles after it entered.
module octavo_addsub_tb;
  localparam int W = 36, LAT = 2;
  logic clk = 0, sub;
  logic [W-1:0] a, b, s;
  logic [W-1:0] exp_pipe [LAT+1];
  bit           v_pipe   [LAT+1];
  int checks = 0, failures = 0;

  octavo_addsub #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= LAT; i++) v_pipe[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // the entry pushed LAT cycles ago is due now
      if (v_pipe[LAT]) begin
        checks++;
        if (s !== exp_pipe[LAT]) begin
          failures++;
          $display("mismatch: got %h expected %h", s, exp_pipe[LAT]);
        end
      end
      for (int i = LAT; i > 0; i--) begin
        exp_pipe[i] = exp_pipe[i-1]; v_pipe[i] = v_pipe[i-1];
      end
      case (n % 8)
        0: begin a = '1; b = W'(1); end                // carry through all bits
        1: begin a = W'(0); b = W'(1); end             // borrow through all bits
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      sub = $urandom_range(0, 1) == 1;
      exp_pipe[1] = sub ? a - b : a + b;
      v_pipe[1] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
