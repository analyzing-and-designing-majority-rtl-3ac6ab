// afa1: one-bit approximate full adder AFA1, one majority gate and one inverter.
//
// The carry is exact, cout = M(a,b,cin). The sum is approximated by the complement of
// the carry, s = ~cout; it is wrong for inputs 000 and 111 (error distance 1 each, mean
// error distance 0.25 over the eight inputs). Combinational; the critical path is one
// majority gate. This cell is an earlier published design that the multi-bit adders of
// this project reuse unchanged.
// MV_DELAY is handed to every majority gate for timing simulation only (see maj3).
module afa1 #(
  parameter int unsigned MV_DELAY = 0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic carry;

  maj3 #(.DELAY(MV_DELAY)) u_carry (.a(a), .b(b), .c(cin), .f(carry));

  assign cout = carry;
  assign s    = ~carry;
endmodule
