// rev_datapath: reversible-logic datapath built from conservative gates.
//
// Two adders share the operands a, b and the carry in:
//   * rev_rca, a ripple-carry adder of reversible full adders (V gate,
//     4*4 block and Fredkin gates per bit), and
//   * rev_cla, a carry-lookahead adder whose carries come from chains of
//     k*k gates, with propagate and generate taken from V gates.
// Both must give a + b + cin; they differ in structure and carry delay.
// Beside them stands one Q gate with its own six inputs and outputs, the
// second of the two 6*6 gates; fed with (A, A, A', B, B, B') it returns
// A, AB, A'+AB, A+B, A XOR B and A NOR B at once.
// Which blocks make up the datapath follows the published design; putting
// both adders on shared operands in one top is this design's choice.
//
// Interface: a, b (WIDTH), cin in; rca_sum, rca_cout, cla_sum, cla_cout
// out; q_in[5:0] = {X, Y, Z, A, B, C} in and q_out[5:0] = {I, ..., VI}
// out. Entirely combinational: no clock, no reset.
module rev_datapath #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] rca_sum,
  output logic             rca_cout,
  output logic [WIDTH-1:0] cla_sum,
  output logic             cla_cout,
  input  logic [5:0]       q_in,
  output logic [5:0]       q_out
);

  logic [7*WIDTH-1:0] rca_garbage;

  rev_rca #(.WIDTH(WIDTH)) u_rca (
    .a      (a),
    .b      (b),
    .cin    (cin),
    .sum    (rca_sum),
    .cout   (rca_cout),
    .garbage(rca_garbage)
  );

  rev_cla #(.WIDTH(WIDTH)) u_cla (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (cla_sum),
    .cout(cla_cout)
  );

  q6_gate u_q (
    .x (q_in[5]), .y (q_in[4]), .z (q_in[3]),
    .a (q_in[2]), .b (q_in[1]), .c (q_in[0]),
    .o1(q_out[5]), .o2(q_out[4]), .o3(q_out[3]),
    .o4(q_out[2]), .o5(q_out[1]), .o6(q_out[0])
  );

endmodule
