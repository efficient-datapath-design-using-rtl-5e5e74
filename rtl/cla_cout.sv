// cla_cout: carry-out block of an N-bit carry-lookahead adder.
//
// Computes the fully expanded lookahead carry
//   cout = G[N-1] + P[N-1] G[N-2] + P[N-1] P[N-2] G[N-3] + ...
//          + P[N-1] ... P[0] cin
// with a chain of N k*k gates. The running sum starts as G[N-1] and enters
// the A(k) input of the first gate; every gate has A(k-1) tied to 0, so its
// p_k output is (product of its pass inputs) OR (running sum), which feeds
// the next gate. Gate j (j = 1..N) is K = j+3 wide and multiplies
// P[N-1] .. P[N-j] with G[N-1-j], or with cin for the last gate. For N = 4
// the products are P3 G2, P3 P2 G1, P3 P2 P1 G0 and P3 P2 P1 P0 Cin, as in
// the published 4-bit block; the N-bit form is the same pattern.
//
// Each P bit is used by several gates. The published block draws separate
// copies but not how they are made; here the P signals simply fan out.
//
// Interface: p, g (N bits), cin in; cout out. garbage collects every other
// gate output: gate j's pass outputs then its p_km1, at offset
// (j-1)j/2 + 2(j-1), j+2 bits each. Combinational; the carry passes
// through N gates in series.
module cla_cout #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]               p,
  input  logic [N-1:0]               g,
  input  logic                       cin,
  output logic                       cout,
  output logic [N*(N+1)/2+2*N-1:0]   garbage
);

  // acc[j] is the running sum after gate j; acc[0] = G[N-1]
  logic [N:0] acc;

  assign acc[0] = g[N-1];
  assign cout   = acc[N];

  for (genvar j = 1; j <= N; j++) begin : g_stage
    localparam int unsigned OFF = (j - 1) * j / 2 + 2 * (j - 1);
    logic gterm;
    if (j == N) begin : g_cin
      assign gterm = cin;
    end else begin : g_gen
      assign gterm = g[N-1-j];
    end

    kk_gate #(.K(j + 3)) u_kk (
      .pass_in ({p[N-1 -: j], gterm}),
      .a_km1   (1'b0),
      .a_k     (acc[j-1]),
      .pass_out(garbage[OFF +: j+1]),
      .p_km1   (garbage[OFF + j + 1]),
      .p_k     (acc[j])
    );
  end

endmodule
