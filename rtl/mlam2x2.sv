// mlam2x2: two-by-two majority-logic approximate multiplier, the building unit of the
// larger multipliers.
//
// Every partial product a_i*b_j is one majority gate with a constant 0 input
// (M(x,y,0) = x AND y). The product bits are out0 = a0*b0 (weight 1) and out2 = a1*b1
// (weight 4). The two cross terms a1*b0 and a0*b1 both have weight 2:
//   USE_COMP = 1 (default): one cross term is out1, the other leaves the unit as the
//     complement bit `comp` (weight 2) for the reduction stage to add or drop. SWAP = 0
//     (default) makes out1 = a0*b1 and comp = a1*b0; SWAP = 1 exchanges them.
//   USE_COMP = 0: out1 = M(a1*b0, a0*b1, 1), the OR of the cross terms, and comp = 0.
//     This is the stand-alone approximate unit (3 x 3 gives 7) with 5 majority gates.
// out + 2*comp equals a*b exactly when comp is added back; the approximation of a large
// multiplier comes from complement bits that are left out. Combinational.
module mlam2x2 #(
  parameter bit USE_COMP = 1'b1,
  parameter bit SWAP     = 1'b0
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [2:0] out,
  output logic       comp
);
  logic pp00, pp10, pp01, pp11;

  maj3 u_pp00 (.a(a[0]), .b(b[0]), .c(1'b0), .f(pp00));
  maj3 u_pp10 (.a(a[1]), .b(b[0]), .c(1'b0), .f(pp10));
  maj3 u_pp01 (.a(a[0]), .b(b[1]), .c(1'b0), .f(pp01));
  maj3 u_pp11 (.a(a[1]), .b(b[1]), .c(1'b0), .f(pp11));

  assign out[0] = pp00;
  assign out[2] = pp11;

  if (USE_COMP) begin : g_comp
    assign out[1] = SWAP ? pp10 : pp01;
    assign comp   = SWAP ? pp01 : pp10;
  end else begin : g_or
    maj3 u_or (.a(pp10), .b(pp01), .c(1'b1), .f(out[1]));
    assign comp = 1'b0;
  end
endmodule
