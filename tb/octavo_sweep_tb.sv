// Runs the Octavo core at five points of its size range side by side, each
// with the short multiply loop of octavo_sweep_point. The points cover the
// ranges over which the family is characterised: word widths from 16 to 72
// bits, memories from 16 to 32,768 words, 8 to 16 threads (10 to 18
// pipeline stages), and 2 or 4 I/O ports.
//   W=16 A=4  T=8  P=2   narrow word, 16-word memory
//   W=40 A=8  T=14 P=2   256 words (one block RAM deep), 14 threads
//   W=50 A=15 T=16 P=2   32,768 words, the narrowest word with 15-bit fields
//   W=72 A=12 T=8  P=2   72-bit word, 4,096 words
//   W=28 A=8  T=12 P=4   four I/O ports per memory
// An 8-bit word is not among them: its 1-bit address fields leave no room
// for a program.
module octavo_sweep_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NP = 5;
  int   c [NP], f [NP];
  logic d [NP];

  octavo_sweep_point #(.W(16), .A(4),  .T(8),  .P(2)) p0 (.clk, .checks(c[0]), .failures(f[0]), .done(d[0]));
  octavo_sweep_point #(.W(40), .A(8),  .T(14), .P(2)) p1 (.clk, .checks(c[1]), .failures(f[1]), .done(d[1]));
  octavo_sweep_point #(.W(50), .A(15), .T(16), .P(2)) p2 (.clk, .checks(c[2]), .failures(f[2]), .done(d[2]));
  octavo_sweep_point #(.W(72), .A(12), .T(8),  .P(2)) p3 (.clk, .checks(c[3]), .failures(f[3]), .done(d[3]));
  octavo_sweep_point #(.W(28), .A(8),  .T(12), .P(4)) p4 (.clk, .checks(c[4]), .failures(f[4]), .done(d[4]));

  int checks, failures;

  task automatic report(int extra_failures);
    checks = 0; failures = extra_failures;
    for (int i = 0; i < NP; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    report(1);
    $finish;
  end

  // the points clear their done flags at time zero; look only after that
  initial begin
    @(negedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    #1;
    report(0);
    $finish;
  end
endmodule
