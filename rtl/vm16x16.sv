// vm16x16: 16x16 bit unsigned Vedic multiplier, p = a * b.
//
// Each operand is split into a high and a low half of 8 bits. Four 8x8
// Vedic multipliers form the vertical products AhBh and AlBl and the
// crosswise products AlBh and AhBl. Three 16-bit modified linear carry
// select adders then merge them:
//   CSLA1: AlBh + AhBl                          -> sum1, carry C1
//   CSLA2: sum1 + {8 zeros, AlBl[15:8]}      -> sum2, carry C2
//   CSLA3: AhBh + {7 zeros, C1|C2, sum2[15:8]} -> p[31:16], carry C3
// and p[15:8] = sum2[7:0], p[7:0] = AlBl[7:0]. At most one of C1 and C2
// can be set, so their OR is the single carry into bit 24 of the product.
// C3 is brought out as drawn in the design; it is 0 for every input because
// the product fits in 32 bits, which is also why the sub-multipliers' own
// C3 outputs are left open. This arrangement is the design's own; G,
// the adder group size, is this implementation's choice. Purely
// combinational: the product settles after the longest carry path.
module vm16x16 #(
  parameter int unsigned G = 2
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p,
  output logic         c3
);
  logic [15:0] hh, lh, hl, ll;   // AhBh, AlBh, AhBl, AlBl
  logic [15:0] sum1, sum2;
  logic         c1, c2, c;

  // stage 1: multiplication units
  vm8x8 #(.G(G)) u_hh (.a(a[15:8]), .b(b[15:8]), .p(hh), .c3());
  vm8x8 #(.G(G)) u_lh (.a(a[7:0]), .b(b[15:8]), .p(lh), .c3());
  vm8x8 #(.G(G)) u_hl (.a(a[15:8]), .b(b[7:0]), .p(hl), .c3());
  vm8x8 #(.G(G)) u_ll (.a(a[7:0]), .b(b[7:0]), .p(ll), .c3());

  // stage 2/3: partial products and carries merged by the adders
  mlcsla #(.N(16), .G(G)) u_csla1 (
    .a (lh),
    .b (hl),
    .ci(1'b0),
    .s (sum1),
    .co(c1)
  );

  mlcsla #(.N(16), .G(G)) u_csla2 (
    .a (sum1),
    .b ({{8{1'b0}}, ll[15:8]}),
    .ci(1'b0),
    .s (sum2),
    .co(c2)
  );

  assign c = c1 | c2;

  mlcsla #(.N(16), .G(G)) u_csla3 (
    .a (hh),
    .b ({{7{1'b0}}, c, sum2[15:8]}),
    .ci(1'b0),
    .s (p[31:16]),
    .co(c3)
  );

  assign p[15:8] = sum2[7:0];
  assign p[7:0] = ll[7:0];
endmodule
