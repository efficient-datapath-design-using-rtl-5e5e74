// rev_full_adder: a full adder built only from conservative reversible gates.
//
// Structure (all gates route their inputs, none fans a signal out):
//   * two Fredkin duplicators turn A and B into (A, A, A') and (B, B, B');
//   * a V gate turns those into A AND B (II), A XOR B (V), A XNOR B (VI);
//   * the 4*4 block, controlled by Cin, gives the sum Cin XOR A XOR B and
//     the term Cin (A XOR B);
//   * a Fredkin gate in its OR configuration (swaps when its control is 0,
//     E tied to 1) takes control Cin (A XOR B) and D = A AND B and returns
//     R = Cin (A XOR B) + A B, the carry.
// The V, 4*4 and Fredkin arrangement follows the published full adder; the
// two duplicators in front of the V gate follow the text that says where
// the V gate's input copies come from. Using the OR configuration of the
// Fredkin gate is this design's reading of how that drawing yields the
// carry on the gate's bottom output.
//
// Constant inputs: 0,1 (each duplicator), 0 (4*4), 1 (Fredkin): six.
// Every gate output that is not sum or carry is brought out on garbage:
//   garbage[0] V.I (A)      garbage[1] V.III (A')   garbage[2] V.IV (A+B)
//   garbage[3] 4*4 out 1    garbage[4] 4*4 out 3    garbage[5] F.P
//   garbage[6] F.Q
// so the adder as a whole has 9 inputs and 9 outputs and the count of ones
// is preserved: a + b + cin + 3 == sum + cout + popcount(garbage).
//
// Interface: a, b, cin in; sum, cout, garbage out. Combinational.
module rev_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [6:0] garbage
);

  logic a1, a2, a_n;
  logic b1, b2, b_n;
  logic v_and, v_xor, v_xnor;
  logic t_ctl;

  fredkin_dup u_dup_a (.a(a), .a1(a1), .a2(a2), .a_n(a_n));
  fredkin_dup u_dup_b (.a(b), .a1(b1), .a2(b2), .a_n(b_n));

  v6_gate u_v (
    .x (a1), .y (a2), .z (a_n),
    .a (b1), .b (b2), .c (b_n),
    .o1(garbage[0]),
    .o2(v_and),
    .o3(garbage[1]),
    .o4(garbage[2]),
    .o5(v_xor),
    .o6(v_xnor)
  );

  rev_4x4 u_4x4 (
    .c (cin),
    .i2(v_xor),
    .i3(v_xnor),
    .i4(1'b0),
    .o1(garbage[3]),
    .o2(sum),
    .o3(garbage[4]),
    .o4(t_ctl)
  );

  fredkin_gate #(.SWAP_ON(1'b0)) u_f (
    .c(t_ctl),
    .d(v_and),
    .e(1'b1),
    .p(garbage[5]),
    .q(garbage[6]),
    .r(cout)
  );

endmodule
