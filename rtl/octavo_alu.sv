// Octavo ALU: adder/subtractor, logic unit and multiplier working side by
// side on every instruction, with the result R selected and registered at
// the end of a four-stage pipeline (ALU0..ALU3).
//
//   ALU0, ALU1: operands and opcode delayed by registers; the two-stage
//               adder/subtractor and the first two multiplier stages run.
//   ALU2:       the logic unit computes its bit-wise result or passes the
//               adder result through (registered); the multiplier's
//               product register is loaded.
//   ALU3:       a final multiplexer picks the logic unit output, the low
//               word of the product (MLO) or its high word (MHI), and R is
//               registered.
// r is valid four edges after op/a/b were presented (4 + EXTRA when EXTRA
// multiplier stages are added for a deeper family member; the logic-unit
// result and the opcode are then delayed by as many registers before the
// final multiplexer); a new instruction may enter every cycle. For opcodes that write nothing (jumps, unused codes)
// r holds whatever the logic unit produced and is ignored by the core.
// The stage split and the use of the logic unit as the pass-through for the
// adder follow the published ALU; register placement inside each stage is
// this design's.
module octavo_alu
  import octavo_pkg::*;
#(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned EXTRA = 0    // additional multiplier stages
) (
  input  logic             clk,
  input  logic             rst,
  input  opcode_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] r
);

  opcode_e          op_q1, op_q2, op_q3;
  logic [WIDTH-1:0] a_q1, b_q1, a_q2, b_q2;
  logic [WIDTH-1:0] sum;
  logic [WIDTH-1:0] lu;
  logic [2*WIDTH-1:0] p;

  always_ff @(posedge clk) begin
    if (rst) begin
      op_q1 <= OP_NOP;
      op_q2 <= OP_NOP;
      op_q3 <= OP_NOP;
    end else begin
      op_q1 <= op;
      op_q2 <= op_q1;
      op_q3 <= op_q2;
    end
    a_q1 <= a;
    b_q1 <= b;
    a_q2 <= a_q1;
    b_q2 <= b_q1;
  end

  octavo_addsub #(.WIDTH(WIDTH)) u_addsub (
    .clk (clk),
    .a   (a),
    .b   (b),
    .sub (op == OP_SUB),
    .s   (sum)
  );

  octavo_logic #(.WIDTH(WIDTH)) u_logic (
    .clk (clk),
    .sel (op_q2[2:0]),
    .a   (a_q2),
    .b   (b_q2),
    .s   (sum),
    .y   (lu)
  );

  octavo_mul #(.WIDTH(WIDTH), .EXTRA(EXTRA)) u_mul (
    .clk (clk),
    .rst (rst),
    .a   (a),
    .b   (b),
    .p   (p)
  );

  // Balance the logic-unit path and the opcode against extra multiplier
  // stages.
  opcode_e          op_f;
  logic [WIDTH-1:0] lu_f;

  if (EXTRA == 0) begin : g_no_extra
    assign op_f = op_q3;
    assign lu_f = lu;
  end else begin : g_extra
    opcode_e          op_e [EXTRA];
    logic [WIDTH-1:0] lu_e [EXTRA];
    always_ff @(posedge clk) begin
      if (rst) for (int i = 0; i < EXTRA; i++) op_e[i] <= OP_NOP;
      else begin
        op_e[0] <= op_q3;
        for (int i = 1; i < EXTRA; i++) op_e[i] <= op_e[i-1];
      end
      lu_e[0] <= lu;
      for (int i = 1; i < EXTRA; i++) lu_e[i] <= lu_e[i-1];
    end
    assign op_f = op_e[EXTRA-1];
    assign lu_f = lu_e[EXTRA-1];
  end

  always_ff @(posedge clk) begin
    unique case (op_f)
      OP_MLO:  r <= p[WIDTH-1:0];
      OP_MHI:  r <= p[2*WIDTH-1:WIDTH];
      default: r <= lu_f;
    endcase
  end

endmodule
