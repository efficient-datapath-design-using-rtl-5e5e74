// tb_rev_datapath: end-to-end test of the reversible datapath at its
// default parameters (4-bit operands).
//
// Every (a, b, cin) is applied; both the ripple-carry and the lookahead
// sums must equal a + b + cin. At the same time the Q gate is swept through
// all 64 inputs (its routing and its ones count checked), and for each
// (A, B) it is also fed (A, A, A', B, B, B') and must return A, AB, A'+AB,
// A+B, A XOR B and A NOR B.
//
// Events counted, each of which must occur at least once:
//   overflow  - the sum does not fit in 4 bits (carry out = 1)
//   ripple    - cin = 1 and a XOR b all ones: the carry crosses every bit
//   generate  - some bit has a = b = 1 (a carry born inside the adder)
//   q_pass    - Q gate with X = 0 (inputs pass straight)
//   q_swap    - Q gate with X = 1 (inputs permuted)
module tb_rev_datapath;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_ripple = 0, n_generate = 0, n_q_pass = 0, n_q_swap = 0;

  logic [3:0] a, b, rca_sum, cla_sum;
  logic       cin, rca_cout, cla_cout;
  logic [5:0] q_in, q_out;

  rev_datapath dut (
    .a(a), .b(b), .cin(cin),
    .rca_sum(rca_sum), .rca_cout(rca_cout),
    .cla_sum(cla_sum), .cla_cout(cla_cout),
    .q_in(q_in), .q_out(q_out)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%0b q_in=%b q_out=%b", what, a, b, cin, q_in, q_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total;
      logic [5:0] exp_q;
      {cin, a, b} = 9'(v);
      q_in = 6'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check({rca_cout, rca_sum} == 5'(total), "ripple-carry sum");
      check({cla_cout, cla_sum} == 5'(total), "lookahead sum");
      if (total > 15) n_overflow++;
      if (cin && (a ^ b) == 4'hf) n_ripple++;
      if ((a & b) != 0) n_generate++;
      // Q gate: X = 0 straight, X = 1: I<-X II<-A III<-B IV<-Y V<-C VI<-Z
      if (q_in[5]) begin
        n_q_swap++;
        exp_q = {q_in[5], q_in[2], q_in[1], q_in[4], q_in[0], q_in[3]};
      end else begin
        n_q_pass++;
        exp_q = q_in;
      end
      check(q_out == exp_q, "Q routing");
      check($countones(q_out) == $countones(q_in), "Q conservative");
    end
    for (int v = 0; v < 4; v++) begin
      logic A, B;
      {A, B} = 2'(v);
      q_in = {A, A, ~A, B, B, ~B};
      #1;
      check(q_out == {A, A & B, ~A | (A & B), A | B, A ^ B, ~(A | B)}, "Q functions");
    end
    check(n_overflow > 0, "overflow never happened");
    check(n_ripple > 0, "full ripple never happened");
    check(n_generate > 0, "generate never happened");
    check(n_q_pass > 0, "Q pass never happened");
    check(n_q_swap > 0, "Q swap never happened");
    $display("events: overflow=%0d ripple=%0d generate=%0d q_pass=%0d q_swap=%0d",
             n_overflow, n_ripple, n_generate, n_q_pass, n_q_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
