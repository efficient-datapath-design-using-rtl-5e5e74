// tb_fredkin_gate: exhaustive check of both Fredkin gate configurations.
//
// For every (c, d, e) the standard gate (swap on c = 1) and the OR
// configuration (swap on c = 0) are compared with expected outputs written
// from the gate's definition; the number of ones must be preserved, and
// feeding the standard gate's outputs into a second standard gate must give
// the inputs back (the gate is its own inverse). Also checks the AND use
// (e = 0 gives r = c AND d) and the OR use (e = 1, swap on 0, gives r = c OR d).
module tb_fredkin_gate;

  int checks = 0, failures = 0;
  logic c, d, e;
  logic p1, q1, r1, p0, q0, r0;
  logic pi, qi, ri;

  fredkin_gate #(.SWAP_ON(1'b1)) dut1 (.c(c), .d(d), .e(e), .p(p1), .q(q1), .r(r1));
  fredkin_gate #(.SWAP_ON(1'b0)) dut0 (.c(c), .d(d), .e(e), .p(p0), .q(q0), .r(r0));
  fredkin_gate #(.SWAP_ON(1'b1)) inv  (.c(p1), .d(q1), .e(r1), .p(pi), .q(qi), .r(ri));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s c=%0b d=%0b e=%0b", what, c, d, e);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, d, e} = 3'(v);
      #1;
      // standard: (c,d,e) if c = 0, (c,e,d) if c = 1
      check({p1, q1, r1} == (c ? {c, e, d} : {c, d, e}), "standard");
      check({p0, q0, r0} == (c ? {c, d, e} : {c, e, d}), "or-config");
      check((p1 + q1 + r1) == (c + d + e), "conservative");
      check({pi, qi, ri} == {c, d, e}, "self-inverse");
      if (!e) check(r1 == (c & d), "and use");
      if (e) check(r0 == (c | d), "or use");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
