// qca_maj -- three-input majority gate, M(a,b,c) = ab + bc + ca.
//
// The majority gate is the basic logic primitive of quantum-dot cellular
// automata (QCA); together with the inverter it is the only gate the adders in
// this design are built from. Fixing one input to 0 turns it into an AND, to 1
// into an OR. Purely combinational; the four-phase QCA clock that paces cells
// in a physical layout is not modelled, so one gate is one level of logic.
module qca_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);
  assign m = (a & b) | (b & c) | (a & c);
endmodule
