// kk_gate: the generalised k*k reversible gate used for lookahead carries.
//
// Inputs A1..A(k-2) pass straight to the outputs (pass_in -> pass_out);
// f is their product (AND). The last two inputs are transformed:
//   p_km1 = f A(k-1)  XOR A(k)
//   p_k   = f' A(k)'  XOR A(k-1)'
// For f = 1 this maps (A(k-1), A(k)) to (A(k-1) XOR A(k), NOT A(k-1)); for
// f = 0 to (A(k), A(k-1) XOR A(k)); both are one-to-one, so the gate is
// reversible. With A(k-1) tied to 0, p_k = f + A(k): one product term ORed
// onto a running sum, the step that builds a sum-of-products carry.
// The gate and its output equations follow the published k*k gate, which
// that work takes from earlier literature on reversible synthesis.
//
// Parameter K (>= 3) is the gate width: K-2 product inputs plus two.
// Interface: pass_in (K-2), a_km1, a_k in; pass_out (K-2), p_km1, p_k out.
// Combinational.
module kk_gate #(
  parameter int unsigned K = 4
) (
  input  logic [K-3:0] pass_in,
  input  logic         a_km1,
  input  logic         a_k,
  output logic [K-3:0] pass_out,
  output logic         p_km1,
  output logic         p_k
);

  if (K < 3) begin : g_bad_k
    $error("kk_gate: K must be at least 3");
  end

  logic f;

  always_comb begin
    f        = &pass_in;
    pass_out = pass_in;
    p_km1    = (f & a_km1) ^ a_k;
    p_k      = (~f & ~a_k) ^ ~a_km1;
  end

endmodule
