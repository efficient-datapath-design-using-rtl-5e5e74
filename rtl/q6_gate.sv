// q6_gate: the 6*6 conservative reversible "Q" gate.
//
// Input X is the control and passes straight to output I. When X = 0 all
// inputs go to the output of the same position. When X = 1 the other five
// are permuted: Y->IV, Z->VI, A->II, B->III, C->V. The gate only routes,
// so it is reversible and conservative.
//
// Fed with (X,Y,Z,A,B,C) = (A, A, A', B, B, B') it yields at (I..VI):
//   A, A AND B, A' OR (A AND B), A OR B, A XOR B, A NOR B
// i.e. a half adder (sum on V, carry on II) plus the universal NOR on VI.
// Those output functions are the published ones. The X = 1 routing is
// derived from them: it is the permutation that produces them (A and B
// carry the same value in that use, so A->II, B->III was picked over the
// reverse). The published prose lists a different routing that does not
// produce these functions.
//
// Interface: x, y, z, a, b, c in; o1..o6 are outputs I..VI. Combinational.
module q6_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic o1,
  output logic o2,
  output logic o3,
  output logic o4,
  output logic o5,
  output logic o6
);

  always_comb begin
    o1 = x;
    if (x) begin
      o2 = a;
      o3 = b;
      o4 = y;
      o5 = c;
      o6 = z;
    end else begin
      o2 = y;
      o3 = z;
      o4 = a;
      o5 = b;
      o6 = c;
    end
  end

endmodule
