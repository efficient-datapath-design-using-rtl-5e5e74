// rev_rca: WIDTH-bit ripple-carry adder of reversible full adders.
//
// Bit i adds a[i], b[i] and the carry out of bit i-1 (cin for bit 0) in a
// rev_full_adder; the carry ripples from bit 0 to bit WIDTH-1. The worst
// case delay is WIDTH full-adder carry paths. The published design only
// says a ripple-carry adder is a chain of full adders; the default width
// of 4 matches the lookahead adder and is this design's choice.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out;
// garbage holds the seven garbage outputs of each full adder, bit i's in
// garbage[7*i +: 7]. Combinational.
module rev_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [7*WIDTH-1:0] garbage
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_full_adder u_fa (
      .a      (a[i]),
      .b      (b[i]),
      .cin    (carry[i]),
      .sum    (sum[i]),
      .cout   (carry[i+1]),
      .garbage(garbage[7*i +: 7])
    );
  end

endmodule
