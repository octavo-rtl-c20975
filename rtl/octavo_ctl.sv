// Octavo controller: supplies the program counter of each thread in turn
// and carries out flow control, in two pipeline stages (CTL0, CTL1).
//
// A Program Counter Memory (PCM) holds the next PC of each of the THREADS
// threads. A thread counter (register and incrementer) walks through the
// threads round-robin, one per cycle, so the PC produced in a cycle always
// belongs to the thread whose instruction is in the controller. CTL0
// registers whether the fetched operand A is zero and whether it is
// non-negative, together with the opcode, the destination field D and the
// thread number. CTL1 decides whether a jump is taken and registers that
// decision, D, and the thread's PCM entry. The PC output then chooses D for
// a taken jump and the PCM entry otherwise, and PC+1 is written back to
// the thread's PCM entry on the next edge.
//
// Jumps: JMP always; JZE if A == 0; JNZ if A != 0;
// JPO if A >= 0; JNE if A < 0 (two's complement). The target is the D
// field itself, not the memory word at D.
//
// Timing: op/d/a presented in CTL0 produce pc two edges later; pc is meant
// to be registered by the I memory's read-address register, which closes
// the eight-register control loop of the core. Reset sets every thread's
// PCM entry to its start address (thread t starts at START_PC field t,
// by default address t), the controller to thread 0 and the jump flag to 0.
// The PCM is an array of registers (a small LUT memory in an FPGA);
// the reset values and the START_PC parameter are this design's choices.
module octavo_ctl
  import octavo_pkg::*;
#(
  parameter int unsigned ADDR    = 10,
  parameter int unsigned WIDTH   = 36,
  parameter int unsigned THREADS = 8,
  parameter int unsigned TW      = (THREADS > 1) ? $clog2(THREADS) : 1,
  // Start address of each thread, field t = bits [t*ADDR +: ADDR].
  // Default: thread t starts at address t.
  parameter logic [THREADS*ADDR-1:0] START_PC =
    (THREADS*ADDR)'(default_start_pcs(THREADS, ADDR))
) (
  input  logic             clk,
  input  logic             rst,
  input  opcode_e          op,
  input  logic [ADDR-1:0]  d,
  input  logic [WIDTH-1:0] a,
  output logic [ADDR-1:0]  pc,
  output logic [TW-1:0]    pc_thread,   // thread that pc belongs to
  output logic             jump         // pc is a taken jump target
);

  logic [ADDR-1:0] pcm [THREADS];

  // CTL0 registers
  logic            zero_q, pos_q;
  opcode_e         op_q;
  logic [ADDR-1:0] d_q;
  logic [TW-1:0]   thr_q;
  // CTL1 registers
  logic            jmp_q;
  logic [ADDR-1:0] d_q2;
  logic [ADDR-1:0] next_q;
  logic [TW-1:0]   thr_q2;

  logic jmp_c;

  always_comb begin
    unique case (op_q)
      OP_JMP:  jmp_c = 1'b1;
      OP_JZE:  jmp_c = zero_q;
      OP_JNZ:  jmp_c = !zero_q;
      OP_JPO:  jmp_c = pos_q;
      OP_JNE:  jmp_c = !pos_q;
      default: jmp_c = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    zero_q <= (a == '0);
    pos_q  <= !a[WIDTH-1];
    d_q    <= d;
    d_q2   <= d_q;
    if (rst) begin
      op_q   <= OP_NOP;
      jmp_q  <= 1'b0;
      // thr_q runs one thread ahead of thr_q2, whose entry is in next_q
      thr_q  <= TW'(1 % THREADS);
      thr_q2 <= '0;
      next_q <= START_PC[ADDR-1:0];
      for (int t = 0; t < THREADS; t++) pcm[t] <= START_PC[t*ADDR +: ADDR];
    end else begin
      op_q   <= op;
      jmp_q  <= jmp_c;
      thr_q  <= (thr_q == TW'(THREADS - 1)) ? '0 : thr_q + 1'b1;
      thr_q2 <= thr_q;
      next_q <= pcm[thr_q];
      pcm[thr_q2] <= pc + 1'b1;
    end
  end

  assign pc        = jmp_q ? d_q2 : next_q;
  assign pc_thread = thr_q2;
  assign jump      = jmp_q;

  // Threads follow each other strictly round-robin.
  a_round_robin: assert property (@(posedge clk) disable iff (rst)
    thr_q2 == ((thr_q == '0) ? TW'(THREADS - 1) : thr_q - 1'b1));

endmodule
