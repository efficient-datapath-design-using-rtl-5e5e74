// tb_v6_gate: exhaustive check of the V gate.
//
// 1. With inputs (A, A, A', B, B, B') the six outputs must be
//    A, A AND B, NOT A, A OR B, A XOR B, A XNOR B.
// 2. For all 64 inputs: X = 0 passes every input straight through; X = 1
//    routes per a permutation table (output k takes input PERM[k]); the
//    number of ones is preserved; no two inputs give the same output.
module tb_v6_gate;

  int checks = 0, failures = 0;
  logic [5:0] in, out;   // bit 5 = X / I ... bit 0 = C / VI
  bit seen [64];

  // PERM[k] = input position (0 = X .. 5 = C) that reaches output k (0 = I)
  // when X = 1
  localparam int PERM [6] = '{0, 3, 2, 1, 5, 4};

  v6_gate dut (
    .x(in[5]), .y(in[4]), .z(in[3]), .a(in[2]), .b(in[1]), .c(in[0]),
    .o1(out[5]), .o2(out[4]), .o3(out[3]), .o4(out[2]), .o5(out[1]), .o6(out[0])
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s in=%b out=%b", what, in, out);
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
    logic A, B;
    logic [5:0] exp;
    for (int v = 0; v < 4; v++) begin
      {A, B} = 2'(v);
      in = {A, A, ~A, B, B, ~B};
      #1;
      exp = {A, A & B, ~A, A | B, A ^ B, ~(A ^ B)};
      check(out == exp, "functions");
    end
    for (int v = 0; v < 64; v++) begin
      in = 6'(v);
      #1;
      for (int k = 0; k < 6; k++) begin
        int src;
        src = in[5] ? PERM[k] : k;
        check(out[5-k] == in[5-src], "routing");
      end
      check($countones(out) == $countones(in), "conservative");
      check(!seen[out], "one-to-one");
      seen[out] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
