// Self-checking testbench for octavo_ctl. Random opcodes, targets and
// operand values enter every cycle for the thread whose turn it is; a
// reference model keeps each thread's next PC. Checks that the PC of each
// thread appears exactly two cycles after its instruction entered, that
// threads follow in round-robin order starting at their start addresses,
// and that every jump condition is taken and not taken at least once.
module octavo_ctl_tb;
  import octavo_pkg::*;
  localparam int A = 10, W = 36, T = 8, LAT = 2;
  logic clk = 0, rst;
  opcode_e op;
  logic [A-1:0] d, pc;
  logic [W-1:0] a;
  logic [2:0]   pc_thread;
  logic         jump;
  logic [A-1:0] pcm_ref [T];
  bit           jmp_pipe [LAT+1];
  logic [A-1:0] d_pipe   [LAT+1];
  int checks = 0, failures = 0;
  int taken [16], not_taken [16];

  octavo_ctl #(.ADDR(A), .WIDTH(W), .THREADS(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit cond(opcode_e f, logic [W-1:0] x);
    case (f)
      OP_JMP: return 1;
      OP_JZE: return x == 0;
      OP_JNZ: return x != 0;
      OP_JPO: return !x[W-1];
      OP_JNE: return x[W-1];
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [A-1:0] exp_pc;
    int thr;
    for (int t = 0; t < T; t++) pcm_ref[t] = A'(t);
    for (int i = 0; i <= LAT; i++) jmp_pipe[i] = 0;
    for (int i = 0; i < 16; i++) begin taken[i] = 0; not_taken[i] = 0; end
    rst = 1; op = OP_NOP; d = 0; a = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      // outputs of cycle n
      thr = n % T;
      exp_pc = jmp_pipe[LAT] ? d_pipe[LAT] : pcm_ref[thr];
      checks++;
      if (pc !== exp_pc || pc_thread !== 3'(thr) || jump !== jmp_pipe[LAT]) begin
        failures++;
        $display("cycle %0d thread %0d: pc %0d (thread %0d, jump %0d) expected %0d (jump %0d)",
                 n, thr, pc, pc_thread, jump, exp_pc, jmp_pipe[LAT]);
      end
      pcm_ref[thr] = exp_pc + 1'b1;
      for (int i = LAT; i > 0; i--) begin
        jmp_pipe[i] = jmp_pipe[i-1]; d_pipe[i] = d_pipe[i-1];
      end
      // inputs of cycle n
      op = opcode_e'($urandom_range(0, 15));
      d  = A'($urandom);
      case ($urandom_range(0, 3))
        0: a = '0;
        1: a = W'(-1);
        default: a = {$urandom, $urandom};
      endcase
      jmp_pipe[1] = cond(op, a);
      d_pipe[1] = d;
      if (op_is_branch(op)) begin
        if (jmp_pipe[1]) taken[op]++; else not_taken[op]++;
      end
      @(negedge clk);
    end
    for (int f = OP_JZE; f <= OP_JNE; f++)
      if (taken[f] == 0 || not_taken[f] == 0) begin
        failures++;
        $display("branch opcode %0d not exercised both ways", f);
      end
    if (taken[OP_JMP] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
