// rca: W-bit ripple carry adder built from a chain of full adders.
// Computes {co, s} = a + b + ci; the carry ripples from bit 0 upwards, so the
// delay grows linearly with W. It is the group adder of the carry select
// adder. Purely combinational. The default width is the CSLA group size.
module rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[W];
endmodule
