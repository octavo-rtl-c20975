// Octavo multiplier: a signed WIDTH x WIDTH multiplier that accepts a new
// operand pair every cycle and returns the 2*WIDTH-bit product P three
// cycles later (stages ALU0, ALU1, ALU2; P is valid in ALU3).
//
// Two word-wide multipliers work in alternation, each at half the system
// clock rate, so that each one has two clock cycles for its multiplication.
// A state bit toggling at the system clock steers each operand pair into
// one of the two half-rate datapaths (input registers loaded only on that
// datapath's phase) and, at the output, selects the datapath whose product
// register was loaded on the last edge. The published design clocks the two
// datapaths from a derived clk/2 and its inverse; here both are ordinary
// clock enables in the single clk domain, which gives the same cycle
// behaviour and makes each multiplier a two-cycle (multicycle) path from
// its input to its product register. That the product is signed is this
// design's choice.
//
// Ports: a, b operands (sampled every cycle); p product, valid 3 + EXTRA
// edges after a/b were presented. rst clears the state bit. EXTRA (default
// 0) appends full-rate registers after the product selection; deeper
// family members add multiplier stages to absorb the extra adders of wide
// multipliers, and where those stages sit is this design's choice.
module octavo_mul #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned EXTRA = 0    // additional full-rate output stages
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [WIDTH-1:0]      a,
  input  logic [WIDTH-1:0]      b,
  output logic [2*WIDTH-1:0]    p
);

  logic                phase;               // system-rate state bit
  logic [WIDTH-1:0]    a_q [2];
  logic [WIDTH-1:0]    b_q [2];
  logic [2*WIDTH-1:0]  prod_q [2];

  always_ff @(posedge clk) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end

  for (genvar k = 0; k < 2; k++) begin : g_half
    always_ff @(posedge clk) begin
      if (phase == k[0]) begin
        a_q[k]    <= a;
        b_q[k]    <= b;
        prod_q[k] <= $signed({{WIDTH{a_q[k][WIDTH-1]}}, a_q[k]})
                   * $signed({{WIDTH{b_q[k][WIDTH-1]}}, b_q[k]});
      end
    end
  end

  // After an edge, the datapath that just loaded is the one whose phase
  // was active before the toggle, i.e. the opposite of the current bit.
  logic [2*WIDTH-1:0] sel_p;
  assign sel_p = prod_q[~phase];

  if (EXTRA == 0) begin : g_no_extra
    assign p = sel_p;
  end else begin : g_extra
    logic [2*WIDTH-1:0] ext_q [EXTRA];
    always_ff @(posedge clk) begin
      ext_q[0] <= sel_p;
      for (int i = 1; i < EXTRA; i++) ext_q[i] <= ext_q[i-1];
    end
    assign p = ext_q[EXTRA-1];
  end

endmodule
