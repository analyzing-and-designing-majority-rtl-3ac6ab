// mlaa_pkg: shared types and helpers for the majority-logic approximate adders and
// multipliers.
//
// All arithmetic in this design is built from one primitive, the three-input majority
// voter M(a,b,c) = ab + bc + ac, plus inverters. An n-bit approximate adder is a ripple
// of two kinds of one-bit approximate cells:
//   AFA1: carry = M(a,b,cin),   sum = ~carry
//   AFA2: carry = cin,          sum = M(a,b,~cin)
// Multi-bit adders are named by the cell used at each bit, least significant bit first:
// AFA12 is AFA1 at bit 0 and AFA2 at bit 1; AFA1212-2121 is eight cells, bit 0 first.
// The enums below list the variants that are built at 2, 4 and 8 bits. The default
// variant of each width is this design's choice among them (see the adder modules).
package mlaa_pkg;

  // One-bit approximate full-adder cell type.
  typedef enum logic {
    CELL_AFA1 = 1'b0,
    CELL_AFA2 = 1'b1
  } afa_cell_e;

  // Two-bit approximate adders: two cascaded one-bit cells.
  typedef enum logic [1:0] {
    AFA11 = 2'd0,
    AFA22 = 2'd1,
    AFA12 = 2'd2,
    AFA21 = 2'd3
  } afa2_variant_e;

  // Four-bit approximate adders: AFA12 and AFA21 cascaded in all four orders.
  typedef enum logic [1:0] {
    AFA1212 = 2'd0,
    AFA2121 = 2'd1,
    AFA2112 = 2'd2,
    AFA1221 = 2'd3
  } afa4_variant_e;

  // Eight-bit approximate adders: AFA1212 and AFA2121 cascaded in all four orders.
  typedef enum logic [1:0] {
    AFA1212_1212 = 2'd0,
    AFA2121_2121 = 2'd1,
    AFA2121_1212 = 2'd2,
    AFA1212_2121 = 2'd3
  } afa8_variant_e;

  // Cell at the low (bit 0) and high (bit 1) position of a two-bit adder.
  function automatic afa_cell_e afa2_lo_cell(afa2_variant_e v);
    return (v == AFA11 || v == AFA12) ? CELL_AFA1 : CELL_AFA2;
  endfunction

  function automatic afa_cell_e afa2_hi_cell(afa2_variant_e v);
    return (v == AFA11 || v == AFA21) ? CELL_AFA1 : CELL_AFA2;
  endfunction

  // Two-bit halves (low = bits 1:0, high = bits 3:2) of a four-bit adder.
  function automatic afa2_variant_e afa4_lo_half(afa4_variant_e v);
    return (v == AFA1212 || v == AFA1221) ? AFA12 : AFA21;
  endfunction

  function automatic afa2_variant_e afa4_hi_half(afa4_variant_e v);
    return (v == AFA1212 || v == AFA2112) ? AFA12 : AFA21;
  endfunction

  // Four-bit halves (low = bits 3:0, high = bits 7:4) of an eight-bit adder.
  function automatic afa4_variant_e afa8_lo_half(afa8_variant_e v);
    return (v == AFA1212_1212 || v == AFA1212_2121) ? AFA1212 : AFA2121;
  endfunction

  function automatic afa4_variant_e afa8_hi_half(afa8_variant_e v);
    return (v == AFA1212_1212 || v == AFA2121_1212) ? AFA1212 : AFA2121;
  endfunction

endpackage
