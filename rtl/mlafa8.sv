// mlafa8: eight-bit majority-logic approximate adder, two four-bit approximate adders in
// a ripple.
//
// The halves are the four-bit adders AFA1212 and AFA2121. VARIANT names the low half
// (bits 3:0) first: AFA1212_1212, AFA2121_2121, AFA2121_1212 and AFA1212_2121.
// Result = {cout, s[7:0]} approximates a + b + cin with eight majority gates and four or
// five inverters, against 24 majority gates for an exact ripple adder. The default
// AFA1212_2121 has four majority gates on its longest path, the fewest inverters (4) and
// a mean error distance of about 46.8 over all 131072 input patterns (normalised: 0.092
// of the largest result, 511). Which variant is the default is this design's choice.
// MV_DELAY is handed to every majority gate for timing simulation only (see maj3).
// Combinational.
module mlafa8
  import mlaa_pkg::*;
#(
  parameter afa8_variant_e VARIANT = AFA1212_2121,
  parameter int unsigned MV_DELAY = 0
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);
  localparam afa4_variant_e LO = afa8_lo_half(VARIANT);
  localparam afa4_variant_e HI = afa8_hi_half(VARIANT);

  logic c4;

  mlafa4 #(.VARIANT(LO), .MV_DELAY(MV_DELAY)) u_lo (.a(a[3:0]), .b(b[3:0]), .cin(cin), .s(s[3:0]), .cout(c4));
  mlafa4 #(.VARIANT(HI), .MV_DELAY(MV_DELAY)) u_hi (.a(a[7:4]), .b(b[7:4]), .cin(c4),  .s(s[7:4]), .cout(cout));
endmodule
