// Self-checking testbench for octavo_alu: a random ALU opcode with random
// operands every cycle, each result checked exactly four cycles later.
module octavo_alu_tb;
  import octavo_pkg::*;
  localparam int W = 36, LAT = 4;
  logic clk = 0, rst;
  opcode_e op;
  logic [W-1:0] a, b, r;
  logic [W-1:0] exp_pipe [LAT+1];
  bit           v_pipe   [LAT+1];
  int checks = 0, failures = 0;
  int seen [16];

  octavo_alu #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(opcode_e f, logic [W-1:0] x, z);
    logic [2*W-1:0] prod;
    prod = (2*W)'($signed({{W{x[W-1]}}, x}) * $signed({{W{z[W-1]}}, z}));
    case (f)
      OP_XOR: return x ^ z;
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_SRL: return x >> 1;
      OP_SRA: return W'($signed(x) >>> 1);
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_MLO: return prod[W-1:0];
      OP_MHI: return prod[2*W-1:W];
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i <= LAT; i++) v_pipe[i] = 0;
    for (int i = 0; i < 16; i++) seen[i] = 0;
    rst = 1; op = OP_NOP; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (v_pipe[LAT]) begin
        checks++;
        if (r !== exp_pipe[LAT]) begin
          failures++;
          $display("mismatch: got %h expected %h", r, exp_pipe[LAT]);
        end
      end
      for (int i = LAT; i > 0; i--) begin
        exp_pipe[i] = exp_pipe[i-1]; v_pipe[i] = v_pipe[i-1];
      end
      do op = opcode_e'($urandom_range(0, 9)); while (op == OP_NOP);
      seen[op]++;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      exp_pipe[1] = model(op, a, b);
      v_pipe[1] = 1;
    end
    for (int i = 0; i <= 9; i++)
      if (i != 7 && seen[i] == 0) begin
        failures++;
        $display("opcode %0d never exercised", i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
