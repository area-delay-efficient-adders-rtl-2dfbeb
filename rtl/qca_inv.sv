// qca_inv: QCA inverter, the other primitive besides the majority gate.
//
// y = ~a, combinational. Used in each sum column to form the complemented
// carry-out of that bit position.
module qca_inv (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
