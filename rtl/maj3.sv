// maj3: three-input majority gate (voter), the only logic primitive of this design
// besides the inverter.
//
// F = M(A,B,C) = AB + BC + AC. Fixing one input to 0 gives AND of the other two, fixing it
// to 1 gives OR. Purely combinational, no clock. In a quantum-dot cellular automata
// (QCA) implementation one majority gate occupies one clocking zone (a quarter clock of
// delay); in this RTL it is plain combinational logic. DELAY (default 0) puts a
// simulation delay on the output so that testbenches can time paths in units of
// majority gates; synthesis ignores it.
module maj3 #(
  parameter int unsigned DELAY = 0
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f
);
  if (DELAY == 0) begin : g_nodelay
    assign f = (a & b) | (b & c) | (a & c);
  end else begin : g_delay
    assign #DELAY f = (a & b) | (b & c) | (a & c);
  end
endmodule
