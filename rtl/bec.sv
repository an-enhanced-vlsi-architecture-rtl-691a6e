// bec: W-bit binary to excess-1 converter, x = b + 1 (modulo 2^W).
// Bit 0 is inverted and every higher bit i is XORed with the AND of all bits
// below it, so it needs far fewer gates than a second adder. In the modified
// carry select adder it turns the carry-in-0 result of a group (sum bits plus
// carry, hence W = group width + 1) into the carry-in-1 result. The 3-bit
// default matches a 2-bit group. Purely combinational.
module bec #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  logic [W-1:0] all_ones_below;  // all_ones_below[i] = &b[i-1:0]

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end
  assign x = b ^ all_ones_below;
endmodule
