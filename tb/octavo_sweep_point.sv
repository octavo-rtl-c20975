// One size point of the Octavo family, driven by a short program that runs
// at any width, depth and thread count. Used by octavo_sweep_tb.
//
// Threads 1..T-1 spin on a jump to themselves. Thread 0 jumps to address T
// and loops over four instructions:
//     T+0  ADD X,   X, ONE
//     T+1  MLO IO0, X, X      low word of X*X to I/O port 0
//     T+2  MHI IO1, X, X      high word of X*X to I/O port 1
//     T+3  JNZ T,   ONE       always taken
// X starts just below the largest positive word, so it wraps to negative
// values and the signed high word changes sign during the run.
//
// Checked: every I/O port 0 and port 1 write against X*X worked out here
// (signed, 2*W bits), the number of writes, the spacing of successive port
// 0 writes (four instructions of one thread, 4*T cycles), the cycle from
// the MLO's PC to its I/O strobe (11 cycles, plus 2 per stage above eight),
// and the round-robin order of the issued PCs. `done` rises when the
// checks are complete; `checks` and `failures` are then final.
module octavo_sweep_point #(
  parameter int unsigned W  = 16,
  parameter int unsigned A  = 4,
  parameter int unsigned T  = 8,
  parameter int unsigned P  = 2,
  parameter int unsigned N  = 12     // loop iterations to check
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import octavo_pkg::*;
  localparam int EX = T - 8;
  localparam int TW = $clog2(T);
  localparam int DEPTH = 2**A;
  localparam int IO0 = DEPTH - P, IO1 = DEPTH - P + 1;
  localparam int B = T;                          // loop start
  localparam int X = B + 4, ONE = B + 5;
  localparam logic [W-1:0] X0 = {1'b0, {(W-1){1'b1}}} - W'(5);

  logic rst;
  logic [W-1:0] a_io_rdata [P], b_io_rdata [P];
  logic [W-1:0] a_io_wdata, b_io_wdata;
  logic [P-1:0] a_io_wren, b_io_wren;
  logic [A-1:0] pc_o;
  logic [TW-1:0] pc_thread_o;
  logic         jump_o;

  octavo #(.WIDTH(W), .ADDR(A), .THREADS(T), .IO_PORTS(P)) dut (.*);

  initial begin
    assert (B + 6 <= IO0) else $fatal(1, "sweep program does not fit below I/O");
  end

  function automatic logic [W-1:0] ins(opcode_e op, int d, int a, int b);
    return W'(make_instr(W, A, op, d, a, b));
  endfunction

  task automatic put(int addr, logic [W-1:0] v);
    dut.u_imem.mem[addr]       = v;
    dut.u_amem.u_ram.mem[addr] = v;
    dut.u_bmem.u_ram.mem[addr] = v;
  endtask

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL W=%0d A=%0d T=%0d %s: got %h expected %h", W, A, T, what, got, exp);
    end
  endtask

  function automatic logic [2*W-1:0] square(int k);
    logic [W-1:0] x;
    x = X0 + W'(k);
    return (2*W)'($signed({{W{x[W-1]}}, x}) * $signed({{W{x[W-1]}}, x}));
  endfunction

  // ------------------------------------------------------------- monitors
  int cycle = -1;
  int n0 = 0, n1 = 0, last0 = -1, rr_err = 0, mlo_issue = -1, lat = -1;
  logic [TW-1:0] last_thr;

  always @(posedge clk) if (!rst) begin
    cycle <= cycle + 1;
    if (cycle >= 0 && int'(pc_thread_o) != (int'(last_thr) + 1) % T) rr_err++;
    last_thr <= pc_thread_o;
    if (pc_thread_o == 0 && pc_o == A'(B + 1) && mlo_issue < 0) mlo_issue <= cycle;
    if (a_io_wren[0]) begin
      n0++;
      if (n0 <= N) check("MLO word", a_io_wdata, square(n0)[W-1:0]);
      if (last0 >= 0) check("write spacing", W'(cycle - last0), W'(4 * T));
      if (lat < 0) lat = cycle - mlo_issue;
      last0 = cycle;
    end
    if (a_io_wren[1]) begin
      n1++;
      if (n1 <= N) check("MHI word", a_io_wdata, square(n1)[2*W-1:W]);
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    rst = 1;
    for (int i = 0; i < P; i++) begin a_io_rdata[i] = 0; b_io_rdata[i] = 0; end
    put(0, ins(OP_JMP, B, 0, 0));
    for (int t = 1; t < T; t++) put(t, ins(OP_JMP, t, 0, 0));
    put(B + 0, ins(OP_ADD, X, X, ONE));
    put(B + 1, ins(OP_MLO, IO0, X, X));
    put(B + 2, ins(OP_MHI, IO1, X, X));
    put(B + 3, ins(OP_JNZ, B, ONE, 0));
    put(X, X0);
    put(ONE, W'(1));
    last_thr = TW'(T - 1);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (4 * T * (N + 2) + 40) @(negedge clk);
    checks++;
    if (n0 < N || n1 < N) begin
      failures++;
      $display("FAIL W=%0d A=%0d T=%0d: only %0d/%0d I/O writes", W, A, T, n0, n1);
    end
    check("I/O write latency", W'(lat), W'(11 + 2 * EX));
    check("round-robin order errors", W'(rr_err), '0);
    $display("point W=%0d A=%0d T=%0d P=%0d: %0d MLO and %0d MHI writes, latency %0d",
             W, A, T, P, n0, n1, lat);
    done = 1;
  end
endmodule
