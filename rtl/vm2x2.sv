// vm2x2: 2x2 bit Vedic (Urdhva Tiryakbhyam) multiplier, the basic block of
// every larger multiplier. p = a * b, unsigned.
// S0 is the vertical product A0B0. The two crosswise products A1B0 and A0B1
// go into a half adder, giving S1 and carry C1. The vertical product A1B1 and
// C1 go into a second half adder, giving S2 and C2, and C2 is the product's
// top bit. This structure is the design's own. Purely combinational.
module vm2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];
  half_adder u_ha1 (.a(a[0] & b[1]), .b(a[1] & b[0]), .s(p[1]), .c(c1));
  half_adder u_ha2 (.a(a[1] & b[1]), .b(c1),          .s(p[2]), .c(p[3]));
endmodule
