// fredkin_dup: a Fredkin gate wired to copy and invert one signal.
//
// Reversible circuits may not fan a signal out, so a signal that is needed
// more than once is copied by a gate. Here a standard Fredkin gate has its
// D input tied to 0 and its E input tied to 1: for a = 0 nothing swaps and
// the outputs are (0, 0, 1); for a = 1 the constants swap and the outputs
// are (1, 1, 0). The result is (A, A, NOT A), the input pattern the 6*6
// gates expect. The constants and their placement follow the published
// configuration.
//
// Interface: a in; a1 (P), a2 (Q), a_n (R) out. Combinational.
module fredkin_dup (
  input  logic a,
  output logic a1,
  output logic a2,
  output logic a_n
);

  fredkin_gate #(.SWAP_ON(1'b1)) u_fg (
    .c(a),
    .d(1'b0),
    .e(1'b1),
    .p(a1),
    .q(a2),
    .r(a_n)
  );

endmodule
