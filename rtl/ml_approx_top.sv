// ml_approx_top: the majority-logic approximate arithmetic of this design side by side:
// an eight-bit approximate adder and an N x N multiplier built from 2 x 2 units with
// complement bits.
//
// The adder (mlafa8) is a ripple of two four-bit adders, each a ripple of two two-bit
// adders, each a pair of one-bit approximate cells (afa1 / afa2). ADDER_VARIANT picks one
// of the four eight-bit cell orders; {add_cout, add_s} approximates add_a + add_b +
// add_cin. The multiplier (mlam) forms the partial products and complement bits of all
// digit pairs, reduces them with exact majority-logic full adders and finishes with a
// ripple-carry adder; mul_p is the 2*MUL_N-bit product, exact with the default
// COMP_MASK and approximate when complement bits are dropped.
// The two units share nothing and run independently. Everything is combinational, so
// results follow the inputs in the same cycle of any surrounding clocked logic.
module ml_approx_top
  import mlaa_pkg::*;
#(
  parameter afa8_variant_e ADDER_VARIANT = AFA1212_2121,
  parameter int unsigned   MUL_N         = 8,
  parameter logic [(MUL_N/2)*(MUL_N/2)-1:0] COMP_MASK = '1
) (
  input  logic [7:0]         add_a,
  input  logic [7:0]         add_b,
  input  logic               add_cin,
  output logic [7:0]         add_s,
  output logic               add_cout,
  input  logic [MUL_N-1:0]   mul_a,
  input  logic [MUL_N-1:0]   mul_b,
  output logic [2*MUL_N-1:0] mul_p
);
  mlafa8 #(.VARIANT(ADDER_VARIANT)) u_adder (
    .a   (add_a),
    .b   (add_b),
    .cin (add_cin),
    .s   (add_s),
    .cout(add_cout)
  );

  mlam #(.N(MUL_N), .COMP_MASK(COMP_MASK)) u_mult (
    .a(mul_a),
    .b(mul_b),
    .p(mul_p)
  );
endmodule
