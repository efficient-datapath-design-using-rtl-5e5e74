// fredkin_gate: the 3*3 Fredkin gate, a controlled swap.
//
// Control C passes straight to P. When the swap condition holds, D and E
// are exchanged on their way to Q and R; otherwise they pass straight
// through. The gate is reversible (it is its own inverse) and conservative
// (the number of ones at the output equals that at the input).
//
// SWAP_ON chooses the control value that causes the swap. SWAP_ON = 1 is
// the ordinary Fredkin gate; with D = x, E = 0 it gives R = C AND x.
// SWAP_ON = 0 is the OR configuration: with E tied to 1 it gives
// R = C OR D. Both configurations are described with the gate; making the
// choice a parameter is this design's own.
//
// Interface: c, d, e in; p, q, r out. Purely combinational, no clock.
module fredkin_gate #(
  parameter bit SWAP_ON = 1'b1
) (
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r
);

  logic swap;

  always_comb begin
    swap = (c == SWAP_ON);
    p    = c;
    q    = swap ? e : d;
    r    = swap ? d : e;
  end

endmodule
