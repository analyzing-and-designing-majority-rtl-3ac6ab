// mlam: N x N majority-logic approximate multiplier built from 2 x 2 units with
// complement bits.
//
// Flow: both operands are cut into N/2 two-bit digits. Every digit pair (i, j) feeds one
// mlam2x2 unit, whose three product bits land at bit 2(i+j) and whose complement bit
// (one cross term, weight 2) lands at bit 2(i+j)+1. COMP_MASK selects which complement
// bits are kept (bit i*(N/2)+j for multiplicand digit i, multiplier digit j); a dropped
// complement bit costs at most 2^(2(i+j)+1) of accuracy and saves its share of the
// reduction. All kept bits - (N/2)^2 product rows and as many complement rows - are
// reduced to two rows by ml_csa_reduce and added by ml_rca into the 2N-bit product.
// With every complement bit kept (the default) the product is exact; leaving bits out
// makes it approximate, and never larger than a*b.
// The digit split, the unit equations, the placement of the complement bits and the
// reduce-then-ripple order follow the published flow. The reduction being an exact
// carry-save array and the default mask are this design's choices: the method for
// choosing which complement bits to drop, and the approximate compressors that may
// replace exact ones in the reduction, are not part of this design.
// Combinational; N must be even and at least 4.
module mlam #(
  parameter int unsigned N = 8,
  parameter logic [(N/2)*(N/2)-1:0] COMP_MASK = '1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned U    = N / 2;
  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = 2 * U * U;

  logic [ROWS-1:0][W-1:0] rows;
  logic [W-1:0]           red_s, red_c;

  for (genvar i = 0; i < U; i++) begin : g_a
    for (genvar j = 0; j < U; j++) begin : g_b
      localparam int unsigned K   = i * U + j;
      localparam int unsigned OFS = 2 * (i + j);
      logic [2:0] unit_out;
      logic       unit_comp;

      mlam2x2 u_unit (
        .a   (a[2*i +: 2]),
        .b   (b[2*j +: 2]),
        .out (unit_out),
        .comp(unit_comp)
      );

      assign rows[2*K]   = W'(unit_out) << OFS;
      assign rows[2*K+1] = COMP_MASK[K] ? (W'(unit_comp) << (OFS + 1)) : '0;
    end
  end

  ml_csa_reduce #(.W(W), .ROWS(ROWS)) u_reduce (
    .rows   (rows),
    .sum_o  (red_s),
    .carry_o(red_c)
  );

  // The final carry out is always 0: the total is at most a*b < 2^W.
  logic unused_cout;
  ml_rca #(.W(W)) u_rca (.a(red_s), .b(red_c), .cin(1'b0), .s(p), .cout(unused_cout));

  initial begin
    assert (N >= 4 && N % 2 == 0) else $error("mlam: N must be even and at least 4");
  end
endmodule
