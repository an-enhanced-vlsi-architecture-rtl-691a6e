// mlcsla: N-bit modified linear carry select adder, {co, s} = a + b + ci.
//
// The operands are cut into N/G groups of G bits ("linear": all groups have
// the same size). Group 0 knows its carry in and is a plain G-bit ripple
// carry adder. Every later group computes its sum once, with a ripple carry
// adder whose carry in is 0; a (G+1)-bit binary to excess-1 converter adds
// one to that {carry, sum} to give the carry-in-1 result, and a multiplexer
// picks one of the two on the carry out of the group below. The BEC stands in
// for the second, carry-in-1 ripple adder of a regular carry select adder,
// which is the area saving the design is about. All groups work in parallel;
// only the select carry passes from group to group through the muxes.
//
// The group structure follows the design; the group size G = 2 (so that each
// BEC is 3 bits wide) and the carry-in port are choices of this
// implementation. N must be a multiple of G. Purely combinational.
module mlcsla #(
  parameter int unsigned N = 128,
  parameter int unsigned G = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  localparam int unsigned NG = N / G;

  if (N % G != 0 || G == 0) begin : g_bad_size
    $error("mlcsla: N (%0d) must be a multiple of G (%0d)", N, G);
  end

  logic [NG:0] c;  // c[k] is the carry into group k

  assign c[0] = ci;

  rca #(.W(G)) u_rca0 (
    .a (a[G-1:0]),
    .b (b[G-1:0]),
    .ci(c[0]),
    .s (s[G-1:0]),
    .co(c[1])
  );

  for (genvar k = 1; k < NG; k++) begin : g_grp
    logic [G-1:0] sum0;
    logic         cout0;
    logic [G:0]   r1;

    rca #(.W(G)) u_rca (
      .a (a[k*G +: G]),
      .b (b[k*G +: G]),
      .ci(1'b0),
      .s (sum0),
      .co(cout0)
    );

    bec #(.W(G+1)) u_bec (
      .b({cout0, sum0}),
      .x(r1)
    );

    mux2 #(.W(G+1)) u_mux (
      .d0 ({cout0, sum0}),
      .d1 (r1),
      .sel(c[k]),
      .y  ({c[k+1], s[k*G +: G]})
    );
  end

  assign co = c[NG];
endmodule
