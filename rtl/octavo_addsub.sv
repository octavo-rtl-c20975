// Two-stage pipelined ripple-carry adder/subtractor of the Octavo ALU.
//
// Stage 1 (ALU0) adds the low halves of A and B (B inverted and carry-in
// set for subtraction) and registers the low sum, its carry and the high
// halves of the operands; stage 2 (ALU1) adds the high halves with that
// carry and registers the full WIDTH-bit result. A new operation can enter
// every cycle and its result s is valid two edges after a/b/sub were
// presented. Splitting the carry chain at the middle is this design's
// choice; the two-stage ripple-carry organisation follows the published
// design.
module octavo_addsub #(
  parameter int unsigned WIDTH = 36
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,   // 1: a - b, 0: a + b
  output logic [WIDTH-1:0] s
);

  localparam int unsigned LO = WIDTH / 2;
  localparam int unsigned HI = WIDTH - LO;

  logic [WIDTH-1:0] b_eff;
  logic [LO:0]      lo_sum;
  logic [LO-1:0]    lo_q;
  logic             c_q;
  logic [HI-1:0]    ahi_q, bhi_q;

  always_comb begin
    b_eff  = sub ? ~b : b;
    lo_sum = {1'b0, a[LO-1:0]} + {1'b0, b_eff[LO-1:0]} + (LO+1)'(sub);
  end

  always_ff @(posedge clk) begin
    lo_q  <= lo_sum[LO-1:0];
    c_q   <= lo_sum[LO];
    ahi_q <= a[WIDTH-1:LO];
    bhi_q <= b_eff[WIDTH-1:LO];
    s     <= {ahi_q + bhi_q + HI'(c_q), lo_q};
  end

endmodule
