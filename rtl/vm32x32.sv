// vm32x32: 32x32 bit unsigned Vedic multiplier, p = a * b.
//
// Each operand is split into a high and a low half of 16 bits. Four 16x16
// Vedic multipliers form the vertical products AhBh and AlBl and the
// crosswise products AlBh and AhBl. Three 32-bit modified linear carry
// select adders then merge them:
//   CSLA1: AlBh + AhBl                          -> sum1, carry C1
//   CSLA2: sum1 + {16 zeros, AlBl[31:16]}      -> sum2, carry C2
//   CSLA3: AhBh + {15 zeros, C1|C2, sum2[31:16]} -> p[63:32], carry C3
// and p[31:16] = sum2[15:0], p[15:0] = AlBl[15:0]. At most one of C1 and C2
// can be set, so their OR is the single carry into bit 48 of the product.
// C3 is brought out as drawn in the design; it is 0 for every input because
// the product fits in 64 bits, which is also why the sub-multipliers' own
// C3 outputs are left open. This arrangement is the design's own; G,
// the adder group size, is this implementation's choice. Purely
// combinational: the product settles after the longest carry path.
module vm32x32 #(
  parameter int unsigned G = 2
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p,
  output logic         c3
);
  logic [31:0] hh, lh, hl, ll;   // AhBh, AlBh, AhBl, AlBl
  logic [31:0] sum1, sum2;
  logic         c1, c2, c;

  // stage 1: multiplication units
  vm16x16 #(.G(G)) u_hh (.a(a[31:16]), .b(b[31:16]), .p(hh), .c3());
  vm16x16 #(.G(G)) u_lh (.a(a[15:0]), .b(b[31:16]), .p(lh), .c3());
  vm16x16 #(.G(G)) u_hl (.a(a[31:16]), .b(b[15:0]), .p(hl), .c3());
  vm16x16 #(.G(G)) u_ll (.a(a[15:0]), .b(b[15:0]), .p(ll), .c3());

  // stage 2/3: partial products and carries merged by the adders
  mlcsla #(.N(32), .G(G)) u_csla1 (
    .a (lh),
    .b (hl),
    .ci(1'b0),
    .s (sum1),
    .co(c1)
  );

  mlcsla #(.N(32), .G(G)) u_csla2 (
    .a (sum1),
    .b ({{16{1'b0}}, ll[31:16]}),
    .ci(1'b0),
    .s (sum2),
    .co(c2)
  );

  assign c = c1 | c2;

  mlcsla #(.N(32), .G(G)) u_csla3 (
    .a (hh),
    .b ({{15{1'b0}}, c, sum2[31:16]}),
    .ci(1'b0),
    .s (p[63:32]),
    .co(c3)
  );

  assign p[31:16] = sum2[15:0];
  assign p[15:0] = ll[15:0];
endmodule
