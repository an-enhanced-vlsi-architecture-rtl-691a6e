// vm128x128: 128x128 bit unsigned Vedic multiplier, p = a * b.
//
// Each operand is split into a high and a low half of 64 bits. Four 64x64
// Vedic multipliers form the vertical products AhBh and AlBl and the
// crosswise products AlBh and AhBl. Three 128-bit modified linear carry
// select adders then merge them:
//   CSLA1: AlBh + AhBl                          -> sum1, carry C1
//   CSLA2: sum1 + {64 zeros, AlBl[127:64]}      -> sum2, carry C2
//   CSLA3: AhBh + {63 zeros, C1|C2, sum2[127:64]} -> p[255:128], carry C3
// and p[127:64] = sum2[63:0], p[63:0] = AlBl[63:0]. At most one of C1 and C2
// can be set, so their OR is the single carry into bit 192 of the product.
// C3 is brought out as drawn in the design; it is 0 for every input because
// the product fits in 256 bits, which is also why the sub-multipliers' own
// C3 outputs are left open. This arrangement is the design's own; G,
// the adder group size, is this implementation's choice. Purely
// combinational: the product settles after the longest carry path.
module vm128x128 #(
  parameter int unsigned G = 2
) (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [255:0] p,
  output logic         c3
);
  logic [127:0] hh, lh, hl, ll;   // AhBh, AlBh, AhBl, AlBl
  logic [127:0] sum1, sum2;
  logic         c1, c2, c;

  // stage 1: multiplication units
  vm64x64 #(.G(G)) u_hh (.a(a[127:64]), .b(b[127:64]), .p(hh), .c3());
  vm64x64 #(.G(G)) u_lh (.a(a[63:0]), .b(b[127:64]), .p(lh), .c3());
  vm64x64 #(.G(G)) u_hl (.a(a[127:64]), .b(b[63:0]), .p(hl), .c3());
  vm64x64 #(.G(G)) u_ll (.a(a[63:0]), .b(b[63:0]), .p(ll), .c3());

  // stage 2/3: partial products and carries merged by the adders
  mlcsla #(.N(128), .G(G)) u_csla1 (
    .a (lh),
    .b (hl),
    .ci(1'b0),
    .s (sum1),
    .co(c1)
  );

  mlcsla #(.N(128), .G(G)) u_csla2 (
    .a (sum1),
    .b ({{64{1'b0}}, ll[127:64]}),
    .ci(1'b0),
    .s (sum2),
    .co(c2)
  );

  assign c = c1 | c2;

  mlcsla #(.N(128), .G(G)) u_csla3 (
    .a (hh),
    .b ({{63{1'b0}}, c, sum2[127:64]}),
    .ci(1'b0),
    .s (p[255:128]),
    .co(c3)
  );

  assign p[127:64] = sum2[63:0];
  assign p[63:0] = ll[63:0];
endmodule
