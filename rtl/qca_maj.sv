// qca_maj: three-input majority gate, the basic QCA logic primitive.
//
// y = M(a,b,c) = a&b | a&c | b&c. Fixing one input to 0 gives an AND gate,
// fixing it to 1 gives an OR gate; the adder uses both forms. Purely
// combinational: in QCA the gate's output cell sits in the clock zone after
// its inputs, and the enclosing modules place that zone boundary.
module qca_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (a & c) | (b & c);
endmodule
