// End-to-end testbench for a 12-stage, 12-thread, 36-bit member of the
// Octavo family (four extra multiplier stages and four extra spacer
// stages). Threads 0-7 run the same programs and checks as octavo_tb;
// threads 8-11 spin on a jump to themselves.
module octavo_mid_tb;
  import octavo_pkg::*;
  localparam int W = 36, A = 10, P = 2, T = 12;
  localparam int EX = T - 8;                        // stages beyond eight
  localparam int TW = $clog2(T);
  localparam int DEPTH = 2**A;
  localparam int IO0 = DEPTH - 2, IO1 = DEPTH - 1;   // I/O addresses

  logic clk = 0, rst;
  logic [W-1:0] a_io_rdata [P], b_io_rdata [P];
  logic [W-1:0] a_io_wdata, b_io_wdata;
  logic [P-1:0] a_io_wren, b_io_wren;
  logic [A-1:0] pc_o;
  logic [TW-1:0] pc_thread_o;
  logic         jump_o;

  octavo #(.THREADS(T)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = -1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  // ---------------------------------------------------------- program image
  logic [W-1:0] image [DEPTH];
  int code_at;

  function automatic logic [W-1:0] ins(opcode_e op, int d, int a, int b);
    return W'(make_instr(W, A, op, d, a, b));
  endfunction

  task automatic emit(opcode_e op, int d, int a, int b);
    image[code_at] = ins(op, d, a, b);
    code_at++;
  endtask

  // data addresses
  localparam int Z = 600, ONE = 601, NEG = 602, HALTMARK = 603;
  localparam int PA = 610, PC_ = 611, PB = 612;                  // thread 0
  localparam int SUM1 = 620, K1 = 621;                           // thread 1
  localparam int MX = 630, MY = 631, MLO_R = 632, MHI_R = 633;   // thread 2
  localparam int FLAG3 = 640, GOOD = 641, BAD = 642;             // thread 3
  localparam int LX = 650, LY = 651;                             // thread 4
  localparam int LR = 652;                                       // 652..656
  localparam int ARR = 700, N5 = 8, SUM5 = 660, CNT5 = 661;      // thread 5
  localparam int X6 = 670, RETW1 = 671, RETW2 = 672, CALLS6 = 673; // thread 6
  localparam int R7 = 680;                                       // thread 7

  localparam logic [W-1:0] IN_A0 = 36'd123456, IN_B1 = 36'd654321;
  localparam logic [W-1:0] XV = W'(-123456789), YV = W'(987654);

  int t0_T, t0_io, t5_T, t6_ret, t3_bad;

  function automatic int base(int t);
    return 16 + 64 * t;
  endfunction

  task automatic build();
    int l, top;
    for (int i = 0; i < DEPTH; i++) image[i] = '0;
    // threads 0-7 jump to their programs; any further threads spin
    for (int t = 0; t < T; t++) image[t] = ins(OP_JMP, t < 8 ? base(t) : t, 0, 0);
    image[Z] = 0; image[ONE] = 1; image[NEG] = W'(-5);
    image[HALTMARK] = 36'h5a5;

    // thread 0: a = *b by instruction synthesis
    image[PA] = 42; image[PC_] = 88; image[PB] = PC_;
    code_at = base(0);
    t0_T = base(0) + 2;
    emit(OP_OR, t0_T, t0_T, PB);        // T.B |= b
    emit(OP_NOP, 0, 0, 0);              // delay slot
    emit(OP_ADD, PA, Z, 0);             // T: a = Z + [B]
    t0_io = code_at;
    emit(OP_ADD, IO0, PA, Z);           // I/O port 0 <= a
    emit(OP_JMP, code_at, 0, 0);

    // thread 1: sum 10..1
    image[SUM1] = 0; image[K1] = 10;
    code_at = base(1);
    l = code_at;
    emit(OP_ADD, SUM1, SUM1, K1);
    emit(OP_SUB, K1, K1, ONE);
    emit(OP_JNZ, l, K1, 0);
    emit(OP_JMP, code_at, 0, 0);

    // thread 2: signed multiply
    image[MX] = XV; image[MY] = YV;
    code_at = base(2);
    emit(OP_MLO, MLO_R, MX, MY);
    emit(OP_MHI, MHI_R, MX, MY);
    emit(OP_JMP, code_at, 0, 0);

    // thread 3: conditional jumps; labels laid out by hand
    image[FLAG3] = 0; image[GOOD] = 36'h600d; image[BAD] = 36'hbad;
    code_at = base(3);
    t3_bad = base(3) + 40;
    emit(OP_JZE, code_at + 2, Z, 0);    // taken
    emit(OP_JMP, t3_bad, 0, 0);
    emit(OP_JZE, t3_bad, ONE, 0);       // not taken
    emit(OP_JPO, code_at + 2, ONE, 0);  // taken
    emit(OP_JMP, t3_bad, 0, 0);
    emit(OP_JPO, t3_bad, NEG, 0);       // not taken
    emit(OP_JNE, code_at + 2, NEG, 0);  // taken
    emit(OP_JMP, t3_bad, 0, 0);
    emit(OP_JNE, t3_bad, Z, 0);         // not taken
    emit(OP_JNZ, code_at + 2, NEG, 0);  // taken
    emit(OP_JMP, t3_bad, 0, 0);
    emit(OP_JNZ, t3_bad, Z, 0);         // not taken
    emit(OP_ADD, FLAG3, GOOD, Z);
    emit(OP_JMP, code_at, 0, 0);
    code_at = t3_bad;
    emit(OP_ADD, FLAG3, BAD, Z);
    emit(OP_JMP, code_at, 0, 0);

    // thread 4: logic unit
    image[LX] = 36'h8_F0F0_1234; image[LY] = 36'h3_3333_FF00;
    code_at = base(4);
    emit(OP_XOR, LR + 0, LX, LY);
    emit(OP_AND, LR + 1, LX, LY);
    emit(OP_OR,  LR + 2, LX, LY);
    emit(OP_SRL, LR + 3, LX, LY);
    emit(OP_SRA, LR + 4, LX, LY);
    emit(OP_JMP, code_at, 0, 0);

    // thread 5: sum of ARR[0..N5-1] through a self-incrementing B field
    for (int i = 0; i < N5; i++) image[ARR + i] = 36'(1000 * (i + 1) + i);
    image[SUM5] = 0; image[CNT5] = N5;
    code_at = base(5);
    l = code_at;
    t5_T = code_at;
    emit(OP_ADD, SUM5, SUM5, ARR);      // T: sum += ARR[i]
    emit(OP_ADD, t5_T, t5_T, ONE);      // i++ (B field of T)
    emit(OP_SUB, CNT5, CNT5, ONE);
    emit(OP_JNZ, l, CNT5, 0);
    emit(OP_JMP, code_at, 0, 0);

    // thread 6: x = 3; call DOUBLE twice; x should be 12
    image[X6] = 3; image[CALLS6] = 0;
    code_at = base(6);
    top = base(6) + 30;                 // subroutine DOUBLE
    t6_ret = top + 2;
    image[RETW1] = ins(OP_JMP, base(6) + 2, 0, 0);
    image[RETW2] = ins(OP_JMP, base(6) + 4, 0, 0);
    emit(OP_ADD, t6_ret, RETW1, Z);     // synthesize "jmp back"
    emit(OP_JMP, top, 0, 0);
    emit(OP_ADD, t6_ret, RETW2, Z);     // return point 1
    emit(OP_JMP, top, 0, 0);
    emit(OP_JMP, code_at, 0, 0);        // return point 2: halt
    code_at = top;
    emit(OP_ADD, X6, X6, X6);
    emit(OP_ADD, CALLS6, CALLS6, ONE);
    emit(OP_NOP, 0, 0, 0);              // replaced by the return jump

    // thread 7: I/O in through both memories, out on port 1
    code_at = base(7);
    emit(OP_ADD, R7, IO0, IO1);         // A reads a_io[0], B reads b_io[1]
    emit(OP_ADD, IO1, R7, Z);
    emit(OP_JMP, code_at, 0, 0);
  endtask

  // -------------------------------------------------------------- monitors
  int n_taken = 0, n_not_taken = 0, n_io_reads = 0, n_io_writes = 0;
  int n_imem_writes = 0, n_mul = 0, n_wb = 0, n_rr_err = 0;
  int io0_writes = 0, io1_writes = 0, io0_cycle = -1;
  logic [W-1:0] io0_data, io1_data;
  int t0_issue = -1;
  logic [TW-1:0] last_thr;

  always @(posedge clk) if (!rst) begin
    cycle <= cycle + 1;
    if (jump_o) n_taken++;
    if (op_is_branch(dut.u_ctl.op_q) && !dut.u_ctl.jmp_c) n_not_taken++;
    if (op_writes(dut.st[3+EX].op) && (dut.st[3+EX].a >= IO0 || dut.st[3+EX].b >= IO0)) n_io_reads++;
    if (a_io_wren != 0) begin
      n_io_writes++;
      if (a_io_wren[0]) begin io0_writes++; io0_data <= a_io_wdata; io0_cycle <= cycle; end
      if (a_io_wren[1]) begin io1_writes++; io1_data <= a_io_wdata; end
    end
    if (dut.wb_we) begin
      n_wb++;
      if (dut.wb_d == A'(t0_T) || dut.wb_d == A'(t5_T) || dut.wb_d == A'(t6_ret))
        n_imem_writes++;
    end
    if (dut.st[5+EX].op == OP_MLO || dut.st[5+EX].op == OP_MHI) n_mul++;
    if (cycle >= 0 && int'(pc_thread_o) != (int'(last_thr) + 1) % T) n_rr_err++;
    last_thr <= pc_thread_o;
    if (pc_thread_o == 0 && pc_o == A'(t0_io)) t0_issue <= cycle;
  end

  // ------------------------------------------------------------------ run
  initial begin
    logic [2*W-1:0] prod;
    int sum5;
    rst = 1;
    for (int i = 0; i < P; i++) begin a_io_rdata[i] = 0; b_io_rdata[i] = 0; end
    a_io_rdata[0] = IN_A0; b_io_rdata[1] = IN_B1;
    a_io_rdata[1] = 36'd7; b_io_rdata[0] = 36'd9;
    build();
    for (int i = 0; i < DEPTH; i++) begin
      dut.u_imem.mem[i]       = image[i];
      dut.u_amem.u_ram.mem[i] = image[i];
      dut.u_bmem.u_ram.mem[i] = image[i];
    end
    last_thr = TW'(T - 1);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2500) @(negedge clk);

    // thread 0
    check("a = *b", dut.u_amem.u_ram.mem[PA], 88);
    check("synthesized instruction", dut.u_imem.mem[t0_T], ins(OP_ADD, PA, Z, PC_));
    check("I/O port 0 write count", io0_writes, 1);
    check("I/O port 0 data", io0_data, 88);
    // its PC is issued in cycle t0_issue; the I/O strobe follows 11 cycles
    // later (fetch, 5 stages to the operands, 4 ALU stages, WR0), plus two
    // for every stage a deeper pipeline adds
    check("I/O write latency", io0_cycle - t0_issue, 11 + 2 * EX);
    // thread 1
    check("loop sum", dut.u_amem.u_ram.mem[SUM1], 55);
    check("loop counter", dut.u_amem.u_ram.mem[K1], 0);
    // thread 2
    prod = (2*W)'($signed({{W{XV[W-1]}}, XV}) * $signed({{W{YV[W-1]}}, YV}));
    check("MLO", dut.u_amem.u_ram.mem[MLO_R], prod[W-1:0]);
    check("MHI", dut.u_amem.u_ram.mem[MHI_R], prod[2*W-1:W]);
    // thread 3
    check("branch path", dut.u_amem.u_ram.mem[FLAG3], 36'h600d);
    // thread 4
    check("XOR", dut.u_amem.u_ram.mem[LR + 0], image[LX] ^ image[LY]);
    check("AND", dut.u_amem.u_ram.mem[LR + 1], image[LX] & image[LY]);
    check("OR",  dut.u_amem.u_ram.mem[LR + 2], image[LX] | image[LY]);
    check("SRL", dut.u_amem.u_ram.mem[LR + 3], image[LX] >> 1);
    check("SRA", dut.u_amem.u_ram.mem[LR + 4], W'($signed(image[LX]) >>> 1));
    // thread 5
    sum5 = 0;
    for (int i = 0; i < N5; i++) sum5 += 1000 * (i + 1) + i;
    check("indexed array sum", dut.u_amem.u_ram.mem[SUM5], W'(sum5));
    // thread 6
    check("subroutine result", dut.u_amem.u_ram.mem[X6], 12);
    check("subroutine calls", dut.u_amem.u_ram.mem[CALLS6], 2);
    // thread 7
    check("I/O read sum", dut.u_amem.u_ram.mem[R7], IN_A0 + IN_B1);
    check("I/O port 1 data", io1_data, IN_A0 + IN_B1);
    check("I/O port 1 write count", io1_writes, 1);
    // the three copies of the memory agree
    for (int i = 0; i < IO0; i++) begin
      if (dut.u_imem.mem[i] !== dut.u_amem.u_ram.mem[i] ||
          dut.u_imem.mem[i] !== dut.u_bmem.u_ram.mem[i]) begin
        failures++;
        $display("FAIL memory copies differ at %0d", i);
      end
    end
    checks++;
    check("round-robin order errors", n_rr_err, 0);

    $display("mechanisms: jumps taken %0d, not taken %0d, I/O reads %0d, I/O writes %0d,",
             n_taken, n_not_taken, n_io_reads, n_io_writes);
    $display("            instruction writes %0d, multiplies %0d, write-backs %0d",
             n_imem_writes, n_mul, n_wb);
    checks++; if (n_taken == 0)       begin failures++; $display("FAIL no taken jump"); end
    checks++; if (n_not_taken == 0)   begin failures++; $display("FAIL no untaken jump"); end
    checks++; if (n_io_reads == 0)    begin failures++; $display("FAIL no I/O read"); end
    checks++; if (n_io_writes == 0)   begin failures++; $display("FAIL no I/O write"); end
    checks++; if (n_imem_writes == 0) begin failures++; $display("FAIL no instruction write"); end
    checks++; if (n_mul == 0)         begin failures++; $display("FAIL no multiply"); end
    checks++; if (n_wb == 0)          begin failures++; $display("FAIL no write-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
