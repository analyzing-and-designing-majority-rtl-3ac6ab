// afa2: one-bit approximate full adder AFA2, one majority gate and one inverter.
//
// The carry-in is passed straight through as the carry-out, cout = cin (right for six of
// the eight inputs). The sum is s = M(a,b,~cin), which is exact wherever the passed carry
// is exact; the two wrong rows are 001 (result 2 for 1) and 110 (result 1 for 2). Mean
// error distance 0.25. The carry path has no gate at all, so a chain of AFA2 cells adds
// no carry delay. Combinational.
// MV_DELAY is handed to every majority gate for timing simulation only (see maj3).
module afa2 #(
  parameter int unsigned MV_DELAY = 0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic cin_n;

  assign cin_n = ~cin;
  maj3 #(.DELAY(MV_DELAY)) u_sum (.a(a), .b(b), .c(cin_n), .f(s));

  assign cout = cin;
endmodule
