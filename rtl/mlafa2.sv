// mlafa2: two-bit majority-logic approximate adder, two one-bit approximate cells in a
// ripple.
//
// VARIANT names the cell at each bit, bit 0 first: AFA11 (AFA1, AFA1), AFA22 (AFA2,
// AFA2), AFA12 (AFA1 at bit 0, AFA2 at bit 1) and AFA21 (AFA2 at bit 0, AFA1 at bit 1).
// Result = {cout, s[1:0]} approximates a + b + cin. The mixed variants have the lower
// mean error distance (0.625 against 0.75 for AFA11/AFA22, out of 32 input patterns);
// AFA21 also has only one majority gate on its longest path, which is why it is the
// default here. Where an AFA1 feeds an AFA2, the AFA1's sum inverter already makes the
// ~carry that the AFA2 needs, so a synthesised netlist shares it. Combinational.
// MV_DELAY is handed to every majority gate for timing simulation only (see maj3).
module mlafa2
  import mlaa_pkg::*;
#(
  parameter afa2_variant_e VARIANT = AFA21,
  parameter int unsigned MV_DELAY = 0
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);
  localparam afa_cell_e CELL0 = afa2_lo_cell(VARIANT);
  localparam afa_cell_e CELL1 = afa2_hi_cell(VARIANT);

  logic c1;

  if (CELL0 == CELL_AFA1) begin : g_bit0_afa1
    afa1 #(.MV_DELAY(MV_DELAY)) u_bit0 (.a(a[0]), .b(b[0]), .cin(cin), .s(s[0]), .cout(c1));
  end else begin : g_bit0_afa2
    afa2 #(.MV_DELAY(MV_DELAY)) u_bit0 (.a(a[0]), .b(b[0]), .cin(cin), .s(s[0]), .cout(c1));
  end

  if (CELL1 == CELL_AFA1) begin : g_bit1_afa1
    afa1 #(.MV_DELAY(MV_DELAY)) u_bit1 (.a(a[1]), .b(b[1]), .cin(c1), .s(s[1]), .cout(cout));
  end else begin : g_bit1_afa2
    afa2 #(.MV_DELAY(MV_DELAY)) u_bit1 (.a(a[1]), .b(b[1]), .cin(c1), .s(s[1]), .cout(cout));
  end
endmodule
