// v6_gate: the 6*6 conservative reversible "V" gate.
//
// Input X is the control and passes straight to output I; Z passes
// straight to III. When X = 0 every input goes to the output of the same
// position (Y->II, A->IV, B->V, C->VI). When X = 1 four inputs cross over:
// Y->IV, A->II, B->VI, C->V. Because the gate only routes its inputs, it is
// reversible and conservative.
//
// Fed with (X,Y,Z,A,B,C) = (A, A, A', B, B, B') it yields at (I..VI):
//   A, A AND B, NOT A, A OR B, A XOR B, A XNOR B
// so it is a half adder (sum on V, carry on II) that also gives the
// propagate (IV) and generate (II) terms of an adder. The crossing follows
// the published gate drawing and functions.
//
// Interface: x, y, z, a, b, c in; o1..o6 are outputs I..VI. Combinational.
module v6_gate (
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
    o3 = z;
    if (x) begin
      o2 = a;
      o4 = y;
      o5 = c;
      o6 = b;
    end else begin
      o2 = y;
      o4 = a;
      o5 = b;
      o6 = c;
    end
  end

endmodule
