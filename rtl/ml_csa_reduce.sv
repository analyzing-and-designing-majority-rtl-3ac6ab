// ml_csa_reduce: partial-product reduction of ROWS rows of W bits down to two rows,
// built as a linear carry-save array of exact majority-logic full adders.
//
// Row 0 and row 1 start the accumulator (sum row, carry row). Each further row is added
// by one layer of W full adders working as 3:2 compressors: per bit the sum stays in
// place and the carry moves one bit up. Carries out of bit W-1 are dropped, so the
// result is exact modulo 2^W: sum_o + carry_o == sum of all rows (mod 2^W). The caller
// sizes W so that the true total fits. Combinational, ROWS-2 full-adder layers deep.
// Unused (constant 0) bits of the rows are simplified away by synthesis.
module ml_csa_reduce #(
  parameter int unsigned W    = 16,
  parameter int unsigned ROWS = 32
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_o,
  output logic [W-1:0]           carry_o
);
  logic [ROWS-2:0][W-1:0] acc_s;
  logic [ROWS-2:0][W-1:0] acc_c;

  assign acc_s[0] = rows[0];
  assign acc_c[0] = rows[1];

  for (genvar k = 1; k <= ROWS - 2; k++) begin : g_layer
    logic [W:0] cy;
    assign cy[0] = 1'b0;
    for (genvar w = 0; w < W; w++) begin : g_bit
      ml_fa u_fa (
        .a   (acc_s[k-1][w]),
        .b   (acc_c[k-1][w]),
        .cin (rows[k+1][w]),
        .s   (acc_s[k][w]),
        .cout(cy[w+1])
      );
    end
    assign acc_c[k] = cy[W-1:0];
  end

  assign sum_o   = acc_s[ROWS-2];
  assign carry_o = acc_c[ROWS-2];
endmodule
