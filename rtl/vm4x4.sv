// vm4x4: 4x4 bit unsigned Vedic multiplier, p = a * b.
//
// Each operand is split into a high and a low half of 2 bits. Four 2x2
// Vedic multipliers form the vertical products AhBh and AlBl and the
// crosswise products AlBh and AhBl. Three 4-bit modified linear carry
// select adders then merge them:
//   CSLA1: AlBh + AhBl                          -> sum1, carry C1
//   CSLA2: sum1 + {2 zeros, AlBl[3:2]}      -> sum2, carry C2
//   CSLA3: AhBh + {1'b0, C1|C2, sum2[3:2]} -> p[7:4], carry C3
// and p[3:2] = sum2[1:0], p[1:0] = AlBl[1:0]. At most one of C1 and C2
// can be set, so their OR is the single carry into bit 6 of the product.
// C3 is brought out as drawn in the design; it is 0 for every input because
// the product fits in 8 bits, which is also why the sub-multipliers' own
// C3 outputs are left open. This arrangement is the design's own; G,
// the adder group size, is this implementation's choice. Purely
// combinational: the product settles after the longest carry path.
module vm4x4 #(
  parameter int unsigned G = 2
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p,
  output logic         c3
);
  logic [3:0] hh, lh, hl, ll;   // AhBh, AlBh, AhBl, AlBl
  logic [3:0] sum1, sum2;
  logic         c1, c2, c;

  // stage 1: multiplication units
  vm2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(hh));
  vm2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(lh));
  vm2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(hl));
  vm2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(ll));

  // stage 2/3: partial products and carries merged by the adders
  mlcsla #(.N(4), .G(G)) u_csla1 (
    .a (lh),
    .b (hl),
    .ci(1'b0),
    .s (sum1),
    .co(c1)
  );

  mlcsla #(.N(4), .G(G)) u_csla2 (
    .a (sum1),
    .b ({{2{1'b0}}, ll[3:2]}),
    .ci(1'b0),
    .s (sum2),
    .co(c2)
  );

  assign c = c1 | c2;

  mlcsla #(.N(4), .G(G)) u_csla3 (
    .a (hh),
    .b ({1'b0, c, sum2[3:2]}),
    .ci(1'b0),
    .s (p[7:4]),
    .co(c3)
  );

  assign p[3:2] = sum2[1:0];
  assign p[1:0] = ll[1:0];
endmodule
