// Octavo logic unit: one registered stage (ALU2) that computes the
// bit-wise operations of the instruction set and also passes the
// adder/subtractor result through, so the ALU needs no separate multiplexer
// for it.
//
// The three low opcode bits select the output (sub-opcode of the Logic
// Unit group): 000 A XOR B, 001 A AND B, 010 A OR B, 011 A >> 1 with zero
// fill, 100 A >> 1 with sign fill, 101 and 110 the adder/subtractor result
// s; 111 is unused and gives zero. Each output bit depends on the three
// opcode bits, a[i], b[i] or the neighbouring a bit, and s[i], which is why
// the unit fits one 6-input LUT per bit. y is valid one edge after the
// inputs were presented.
module octavo_logic #(
  parameter int unsigned WIDTH = 36
) (
  input  logic             clk,
  input  logic [2:0]       sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] y
);

  always_ff @(posedge clk) begin
    unique case (sel)
      3'b000:         y <= a ^ b;
      3'b001:         y <= a & b;
      3'b010:         y <= a | b;
      3'b011:         y <= {1'b0, a[WIDTH-1:1]};
      3'b100:         y <= {a[WIDTH-1], a[WIDTH-1:1]};
      3'b101, 3'b110: y <= s;
      default:        y <= '0;
    endcase
  end

endmodule
