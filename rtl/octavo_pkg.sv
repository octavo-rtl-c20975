// Shared definitions of the Octavo processor: the 4-bit opcodes, helpers
// that split an instruction word into its fields, and the predicates that
// tell which opcodes write a result and which are flow control.
//
// Instruction word (WIDTH bits, ADDR-bit operand fields):
//   [WIDTH-1 -: 4]  opcode OP
//   unused bits between OP and D (2 bits for WIDTH=36, ADDR=10)
//   [3*ADDR-1 -: ADDR]  destination D
//   [2*ADDR-1 -: ADDR]  source A
//   [ADDR-1:0]          source B
// The opcode sits in the top four bits and the fields follow in the order
// OP, D, A, B as in the published format; placing the unused bits between
// OP and D (so that B occupies the least-significant bits) is this design's
// choice, and it is what lets an OR with a plain address fill in a zero B
// field during instruction synthesis.
package octavo_pkg;

  typedef enum logic [3:0] {
    OP_XOR = 4'b0000,
    OP_AND = 4'b0001,
    OP_OR  = 4'b0010,
    OP_SRL = 4'b0011,
    OP_SRA = 4'b0100,
    OP_ADD = 4'b0101,
    OP_SUB = 4'b0110,
    OP_NOP = 4'b0111,  // unused encoding: no write, no jump
    OP_MLO = 4'b1000,
    OP_MHI = 4'b1001,
    OP_JMP = 4'b1010,
    OP_JZE = 4'b1011,
    OP_JNZ = 4'b1100,
    OP_JPO = 4'b1101,
    OP_JNE = 4'b1110,
    OP_NP2 = 4'b1111   // unused encoding: no write, no jump
  } opcode_e;

  // Opcodes whose ALU result R is written back at address D.
  function automatic logic op_writes(input opcode_e op);
    return (op <= OP_SUB) || (op == OP_MLO) || (op == OP_MHI);
  endfunction

  // Opcodes that are handled by the controller.
  function automatic logic op_is_branch(input opcode_e op);
    return (op >= OP_JMP) && (op <= OP_JNE);
  endfunction

  // Default thread start addresses, packed ADDR bits per thread: thread t
  // starts at address t. Supports up to 64 threads of up to 16-bit PCs.
  function automatic logic [1023:0] default_start_pcs(input int unsigned threads,
                                                      input int unsigned addr);
    logic [1023:0] v;
    v = '0;
    for (int t = 0; t < threads; t++)
      v = v | (1024'(t) << (t * addr));
    return v;
  endfunction

  // Assemble an instruction word. Used by the testbenches and handy for
  // building programs; hardware only slices fields.
  function automatic logic [71:0] make_instr(input int unsigned width,
                                             input int unsigned addr,
                                             input opcode_e op,
                                             input int unsigned d,
                                             input int unsigned a,
                                             input int unsigned b);
    logic [71:0] w;
    w = '0;
    w = w | (72'(op) << (width - 4));
    w = w | (72'(d & ((1 << addr) - 1)) << (2 * addr));
    w = w | (72'(a & ((1 << addr) - 1)) << addr);
    w = w | 72'(b & ((1 << addr) - 1));
    return w;
  endfunction

endpackage
