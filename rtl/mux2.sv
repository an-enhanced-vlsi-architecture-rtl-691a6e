// mux2: W-bit two-to-one multiplexer, y = sel ? d1 : d0.
// In the carry select adder it picks a group's carry-in-0 or carry-in-1
// result (sum bits and carry) on the carry from the group below.
// Purely combinational.
module mux2 #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
