// vm8x8: 8x8 bit unsigned Vedic multiplier, p = a * b.
//
// Each operand is split into a high and a low half of 4 bits. Four 4x4
// Vedic multipliers form the vertical products AhBh and AlBl and the
// crosswise products AlBh and AhBl. Three 8-bit modified linear carry
// select adders then merge them:
//   CSLA1: AlBh + AhBl                          -> sum1, carry C1
//   CSLA2: sum1 + {4 zeros, AlBl[7:4]}      -> sum2, carry C2
//   CSLA3: AhBh + {3 zeros, C1|C2, sum2[7:4]} -> p[15:8], carry C3
// and p[7:4] = sum2[3:0], p[3:0] = AlBl[3:0]. At most one of C1 and C2
// can be set, so their OR is the single carry into bit 12 of the product.
// C3 is brought out as drawn in the design; it is 0 for every input because
// the product fits in 16 bits, which is also why the sub-multipliers' own
// C3 outputs are left open. This arrangement is the design's own; G,
// the adder group size, is this implementation's choice. Purely
// combinational: the product settles after the longest carry path.
module vm8x8 #(
  parameter int unsigned G = 2
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p,
  output logic         c3
);
  logic [7:0] hh, lh, hl, ll;   // AhBh, AlBh, AhBl, AlBl
  logic [7:0] sum1, sum2;
  logic         c1, c2, c;

  // stage 1: multiplication units
  vm4x4 #(.G(G)) u_hh (.a(a[7:4]), .b(b[7:4]), .p(hh), .c3());
  vm4x4 #(.G(G)) u_lh (.a(a[3:0]), .b(b[7:4]), .p(lh), .c3());
  vm4x4 #(.G(G)) u_hl (.a(a[7:4]), .b(b[3:0]), .p(hl), .c3());
  vm4x4 #(.G(G)) u_ll (.a(a[3:0]), .b(b[3:0]), .p(ll), .c3());

  // stage 2/3: partial products and carries merged by the adders
  mlcsla #(.N(8), .G(G)) u_csla1 (
    .a (lh),
    .b (hl),
    .ci(1'b0),
    .s (sum1),
    .co(c1)
  );

  mlcsla #(.N(8), .G(G)) u_csla2 (
    .a (sum1),
    .b ({{4{1'b0}}, ll[7:4]}),
    .ci(1'b0),
    .s (sum2),
    .co(c2)
  );

  assign c = c1 | c2;

  mlcsla #(.N(8), .G(G)) u_csla3 (
    .a (hh),
    .b ({{3{1'b0}}, c, sum2[7:4]}),
    .ci(1'b0),
    .s (p[15:8]),
    .co(c3)
  );

  assign p[7:4] = sum2[3:0];
  assign p[3:0] = ll[3:0];
endmodule
