// Octavo: an eight-thread, ten-stage soft processor whose only storage is
// one logical memory, addressed directly by the three operand fields of
// every instruction (D = A op B). There are no registers, loads or stores;
// constants live in memory, and indirect addressing is done by writing
// into the operand fields of a later instruction ("instruction synthesis").
//
// The logical memory exists as three physical copies that receive every
// write: the I memory (instructions, one-cycle read), and the A and B
// memories (operands, two-cycle read and write, each with IO_PORTS
// memory-mapped I/O words at the top of the address space). One
// instruction from a different thread occupies each pipeline stage, so no
// stage ever stalls, forwards or detects a hazard:
//
//   stage 0     I memory read at the thread's PC
//   stages 1-3  registers only (keep the I and A/B block RAMs apart)
//   stages 4-5  A and B memories read operands A and B (RD0, RD1);
//               opcode and D are carried by two more registers
//   stages 6-7  controller (CTL0, CTL1) computes the thread's next PC,
//               which closes an eight-register loop back to stage 0
//   stages 6-9  ALU (ALU0..ALU3) computes R
//   write-back  R is written at address D to the I memory (one cycle) and
//               to the A and B memories (WR0, WR1, overlapping the next
//               operand reads of other threads)
//
// Consequences for software, which follow from the published pipeline: a
// thread issues one instruction every 8 cycles; a result is readable as an
// operand by the thread's very next instruction; a result written into an
// instruction takes effect only for the second following instruction of
// that thread (one delay slot). Threads are strictly round-robin, so the
// number of threads equals the length of the control loop.
//
// THREADS (default 8) also selects the member of the processor family:
// 8 is the reference eight-stage loop above. For 9 to 16, THREADS-8
// stages are added to the multiplier (and balanced in the ALU) so that
// wide multipliers keep up, and as many spacer registers are added to
// stages 1-3 so the control loop and the operand read-after-write loop
// both stay exactly THREADS long. Placing the added control-loop stages
// among the spacer registers is this design's choice.
//
// Ports: clk, rst (synchronous, active high; hold for at least 2 cycles);
// for each of the A and B memories, io_rdata words read by instructions
// whose operand address is an I/O location (sampled in RD0), and
// io_wdata/io_wren, the registered result and per-port write strobe of an
// instruction whose D is an I/O location (valid for one cycle).
// pc_o, pc_thread_o and jump_o show the PC the controller issues in each
// cycle. Memory contents are not reset; a program is placed in all three copies
// before rst is released. Thread t starts at address t (see octavo_ctl).
module octavo
  import octavo_pkg::*;
#(
  parameter int unsigned WIDTH    = 36,
  parameter int unsigned ADDR     = 10,
  parameter int unsigned THREADS  = 8,
  parameter int unsigned IO_PORTS = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [WIDTH-1:0]    a_io_rdata [IO_PORTS],
  output logic [WIDTH-1:0]    a_io_wdata,
  output logic [IO_PORTS-1:0] a_io_wren,
  input  logic [WIDTH-1:0]    b_io_rdata [IO_PORTS],
  output logic [WIDTH-1:0]    b_io_wdata,
  output logic [IO_PORTS-1:0] b_io_wren,
  // observation of the controller: PC issued this cycle, its thread, and
  // whether it is a taken jump target
  output logic [ADDR-1:0]     pc_o,
  output logic [$clog2(THREADS)-1:0] pc_thread_o,
  output logic                jump_o
);

  localparam int unsigned TW = (THREADS > 1) ? $clog2(THREADS) : 1;
  // Stages added beyond the eight-stage member of the family.
  localparam int unsigned EXTRA = (THREADS > 8) ? THREADS - 8 : 0;
  localparam int unsigned NST   = 5 + EXTRA;    // instruction registers
  localparam int unsigned RDST  = 3 + EXTRA;    // register feeding A/B reads
  localparam int unsigned WBST  = 4 + EXTRA;    // ALU latency

  initial begin
    assert (THREADS >= 8 && THREADS <= 16)
      else $error("THREADS (the pipeline length) must be 8 to 16");
    assert (WIDTH >= 4 + 3 * ADDR)
      else $error("WIDTH too small for a 4-bit opcode and three ADDR-bit fields");
  end

  typedef struct packed {
    opcode_e         op;
    logic [ADDR-1:0] d;
    logic [ADDR-1:0] a;
    logic [ADDR-1:0] b;
  } instr_t;

  localparam instr_t INSTR_NOP = '{op: OP_NOP, d: '0, a: '0, b: '0};

  function automatic instr_t decode(input logic [WIDTH-1:0] w);
    instr_t i;
    i.op = opcode_e'(w[WIDTH-1 -: 4]);
    i.d  = w[3*ADDR-1 -: ADDR];
    i.a  = w[2*ADDR-1 -: ADDR];
    i.b  = w[ADDR-1:0];
    return i;
  endfunction

  // ------------------------------------------------------------ write-back
  logic [WIDTH-1:0] r;          // ALU result (end of stage 9)
  logic             wb_we;      // R is to be written ...
  logic [ADDR-1:0]  wb_d;       // ... at address D

  // --------------------------------------------------- stage 0: I memory
  logic [ADDR-1:0]  pc;
  logic [WIDTH-1:0] imem_rdata;
  logic             fetch_valid;

  octavo_ram #(.WIDTH(WIDTH), .ADDR(ADDR)) u_imem (
    .clk   (clk),
    .we    (wb_we),
    .waddr (wb_d),
    .wdata (r),
    .raddr (pc),
    .rdata (imem_rdata)
  );

  // The instruction fetched with a PC captured during reset is dropped.
  always_ff @(posedge clk) fetch_valid <= !rst;

  // ------------------------------------------- stages 1-5: instruction regs
  instr_t st [1:NST];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 1; s <= NST; s++) st[s] <= INSTR_NOP;
    end else begin
      st[1] <= fetch_valid ? decode(imem_rdata) : INSTR_NOP;
      for (int s = 2; s <= NST; s++) st[s] <= st[s-1];
    end
  end

  // -------------------------------------- stages 4-5: A and B memory reads
  logic [WIDTH-1:0] a_val, b_val;

  octavo_dmem #(.WIDTH(WIDTH), .ADDR(ADDR), .IO_PORTS(IO_PORTS)) u_amem (
    .clk      (clk),
    .rst      (rst),
    .we       (wb_we),
    .waddr    (wb_d),
    .wdata    (r),
    .raddr    (st[RDST].a),
    .rdata    (a_val),
    .io_rdata (a_io_rdata),
    .io_wdata (a_io_wdata),
    .io_wren  (a_io_wren)
  );

  octavo_dmem #(.WIDTH(WIDTH), .ADDR(ADDR), .IO_PORTS(IO_PORTS)) u_bmem (
    .clk      (clk),
    .rst      (rst),
    .we       (wb_we),
    .waddr    (wb_d),
    .wdata    (r),
    .raddr    (st[RDST].b),
    .rdata    (b_val),
    .io_rdata (b_io_rdata),
    .io_wdata (b_io_wdata),
    .io_wren  (b_io_wren)
  );

  // ------------------------------------------ stages 6-7: controller (CTL)
  logic [TW-1:0] pc_thread;
  logic          jump;

  octavo_ctl #(.ADDR(ADDR), .WIDTH(WIDTH), .THREADS(THREADS)) u_ctl (
    .clk       (clk),
    .rst       (rst),
    .op        (st[NST].op),
    .d         (st[NST].d),
    .a         (a_val),
    .pc        (pc),
    .pc_thread (pc_thread),
    .jump      (jump)
  );

  // ------------------------------------------------- stages 6-9: ALU
  octavo_alu #(.WIDTH(WIDTH), .EXTRA(EXTRA)) u_alu (
    .clk (clk),
    .rst (rst),
    .op  (st[NST].op),
    .a   (a_val),
    .b   (b_val),
    .r   (r)
  );

  // D and the write flag travel beside the ALU to meet R.
  logic [ADDR-1:0] d_pipe  [WBST];
  logic            we_pipe [WBST];

  always_ff @(posedge clk) begin
    d_pipe[0] <= st[NST].d;
    for (int s = 1; s < WBST; s++) d_pipe[s] <= d_pipe[s-1];
    if (rst) begin
      for (int s = 0; s < WBST; s++) we_pipe[s] <= 1'b0;
    end else begin
      we_pipe[0] <= op_writes(st[NST].op);
      for (int s = 1; s < WBST; s++) we_pipe[s] <= we_pipe[s-1];
    end
  end

  assign pc_o        = pc;
  assign pc_thread_o = pc_thread;
  assign jump_o      = jump;

  // no memory is written while rst is high
  assign wb_we = we_pipe[WBST-1] & !rst;
  assign wb_d  = d_pipe[WBST-1];

endmodule
