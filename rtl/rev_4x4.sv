// rev_4x4: the custom 4*4 conservative block of the reversible full adder.
//
// Control C passes straight to output 1. When C = 0 the other inputs pass
// straight through; when C = 1 they rotate: input 2 -> output 4,
// input 3 -> output 2, input 4 -> output 3.
//
// In the full adder the inputs are (Cin, A XOR B, A XNOR B, 0), and then
//   output 2 = Cin' (A XOR B) + Cin (A XNOR B) = Cin XOR A XOR B  (the sum)
//   output 3 = garbage
//   output 4 = Cin (A XOR B)                                      (to carry)
// The crossing follows the published block drawing.
//
// Interface: c, i2, i3, i4 in; o1..o4 out. Combinational.
module rev_4x4 (
  input  logic c,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  output logic o1,
  output logic o2,
  output logic o3,
  output logic o4
);

  always_comb begin
    o1 = c;
    if (c) begin
      o2 = i3;
      o3 = i4;
      o4 = i2;
    end else begin
      o2 = i2;
      o3 = i3;
      o4 = i4;
    end
  end

endmodule
