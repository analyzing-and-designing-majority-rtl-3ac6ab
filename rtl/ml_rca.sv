// ml_rca: W-bit exact ripple-carry adder of majority-logic full adders (ml_fa).
//
// s + 2^W*cout = a + b + cin. Used as the final carry-propagate adder of the
// multipliers, which add the two rows left by the reduction stage. Combinational; the
// carry passes one majority gate per bit.
module ml_rca #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    ml_fa u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
