// rev_cla: WIDTH-bit carry-lookahead adder of reversible gates.
//
// Per bit i:
//   * two Fredkin duplicators give (a, a, a') and (b, b, b');
//   * a V gate gives generate G = a AND b (output II), propagate
//     P = a OR b (output IV), a XOR b (V) and a XNOR b (VI);
//   * the carry into bit i comes from a cla_cout block of i bits fed with
//     P[i-1:0], G[i-1:0] and cin (cin itself for bit 0), so no carry
//     ripples: each is a flat sum of products;
//   * a 4*4 block controlled by that carry turns (XOR, XNOR, 0) into the
//     sum bit, as in the reversible full adder.
// The carry out is a WIDTH-bit cla_cout block, the published 4-bit Cout
// block at the default width. The published design gives that block and
// the P/G outputs of the V gate; how the internal carries and the sum bits
// are formed is this design's choice, reusing the same blocks.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
// Garbage outputs of the gates are left internal. Combinational.
module rev_cla #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] p, g, x, xn;
  logic [WIDTH:0]   carry;

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic a1, a2, a_n, b1, b2, b_n;
    logic v_i, v_iii;
    logic t_o1, t_o3, t_o4;

    fredkin_dup u_dup_a (.a(a[i]), .a1(a1), .a2(a2), .a_n(a_n));
    fredkin_dup u_dup_b (.a(b[i]), .a1(b1), .a2(b2), .a_n(b_n));

    v6_gate u_v (
      .x (a1), .y (a2), .z (a_n),
      .a (b1), .b (b2), .c (b_n),
      .o1(v_i),
      .o2(g[i]),
      .o3(v_iii),
      .o4(p[i]),
      .o5(x[i]),
      .o6(xn[i])
    );

    rev_4x4 u_sum (
      .c (carry[i]),
      .i2(x[i]),
      .i3(xn[i]),
      .i4(1'b0),
      .o1(t_o1),
      .o2(sum[i]),
      .o3(t_o3),
      .o4(t_o4)
    );

    // carry into bit i+1 from the i+1 lower bit positions
    logic [(i+1)*(i+2)/2+2*(i+1)-1:0] c_garbage;
    cla_cout #(.N(i + 1)) u_cout (
      .p      (p[i:0]),
      .g      (g[i:0]),
      .cin    (cin),
      .cout   (carry[i+1]),
      .garbage(c_garbage)
    );
  end

endmodule
