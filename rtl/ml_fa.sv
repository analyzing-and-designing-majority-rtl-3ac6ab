// ml_fa: exact one-bit full adder in majority logic: three majority gates and two
// inverters.
//
// cout = M(a,b,cin) and s = M(~cout, M(a,b,~cin), cin), which equals a ^ b ^ cin.
// MV_DELAY is handed to every majority gate for timing simulation only (see maj3).
// Combinational; the sum path is two majority gates deep (the second one in series with
// the carry gate), the carry path one. In this design it is the building cell of the
// exact partial-product reduction and of the final ripple-carry adder of the
// multipliers (ml_csa_reduce, ml_rca); the approximate adders do not use it.
module ml_fa #(
  parameter int unsigned MV_DELAY = 0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic carry, inner;

  maj3 #(.DELAY(MV_DELAY)) u_carry (.a(a), .b(b), .c(cin),     .f(carry));
  maj3 #(.DELAY(MV_DELAY)) u_inner (.a(a), .b(b), .c(~cin),    .f(inner));
  maj3 #(.DELAY(MV_DELAY)) u_sum   (.a(~carry), .b(inner), .c(cin), .f(s));

  assign cout = carry;
endmodule
