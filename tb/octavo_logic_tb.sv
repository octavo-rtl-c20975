// Self-checking testbench for octavo_logic: every sub-opcode with random
// operands, each result checked one cycle after its inputs were applied.
module octavo_logic_tb;
  localparam int W = 36;
  logic clk = 0;
  logic [2:0] sel;
  logic [W-1:0] a, b, s, y;
  logic [W-1:0] exp_q;
  bit exp_v = 0;
  int checks = 0, failures = 0;

  octavo_logic #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(logic [2:0] f, logic [W-1:0] x, z, sum);
    case (f)
      3'd0: return x ^ z;
      3'd1: return x & z;
      3'd2: return x | z;
      3'd3: return x >> 1;
      3'd4: return W'($signed(x) >>> 1);
      3'd5, 3'd6: return sum;
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (y !== exp_q) begin
          failures++;
          $display("sel=%0d mismatch: got %h expected %h", sel, y, exp_q);
        end
      end
      sel = 3'(n % 8);
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; s = {$urandom, $urandom};
      if (n % 16 < 8) a[W-1] = 1'b1;     // exercise the sign fill
      exp_q = model(sel, a, b, s);
      exp_v = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
