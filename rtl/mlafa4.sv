// mlafa4: four-bit majority-logic approximate adder, two two-bit approximate adders in a
// ripple.
//
// Only the two mixed two-bit adders AFA12 and AFA21 are used as halves, since they have
// the lower error. VARIANT gives the four cells bit 0 first: AFA1212 (AFA12 low, AFA12
// high), AFA2121 (AFA21, AFA21), AFA2112 (AFA21 low, AFA12 high) and AFA1221 (AFA12 low,
// AFA21 high). Result = {cout, s[3:0]} approximates a + b + cin. Each variant has four
// majority gates; the carry chain goes through one majority gate per AFA1 cell. The
// default AFA2121 has two majority gates on its longest path and a mean error distance
// of 2.875 over the 512 input patterns. Combinational.
// MV_DELAY is handed to every majority gate for timing simulation only (see maj3).
module mlafa4
  import mlaa_pkg::*;
#(
  parameter afa4_variant_e VARIANT = AFA2121,
  parameter int unsigned MV_DELAY = 0
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  localparam afa2_variant_e LO = afa4_lo_half(VARIANT);
  localparam afa2_variant_e HI = afa4_hi_half(VARIANT);

  logic c2;

  mlafa2 #(.VARIANT(LO), .MV_DELAY(MV_DELAY)) u_lo (.a(a[1:0]), .b(b[1:0]), .cin(cin), .s(s[1:0]), .cout(c2));
  mlafa2 #(.VARIANT(HI), .MV_DELAY(MV_DELAY)) u_hi (.a(a[3:2]), .b(b[3:2]), .cin(c2),  .s(s[3:2]), .cout(cout));
endmodule
