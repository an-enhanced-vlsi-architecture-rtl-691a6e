// full_adder: one-bit full adder, the cell of the ripple carry adder.
// Sum is the XOR of the three inputs, carry out their majority.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
