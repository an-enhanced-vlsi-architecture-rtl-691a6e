// half_adder: one-bit half adder, the cell of the 2x2 Vedic multiplier.
// Sum is the XOR of the two inputs and carry their AND. The 2x2 block is
// drawn as two half adders; their gates are the usual ones, chosen here.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
