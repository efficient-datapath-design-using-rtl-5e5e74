// tb_kk_gate: exhaustive check of k*k gates for K = 3 .. 7.
//
// For every input: pass-through bits unchanged; with f the AND of the pass
// bits, the two last outputs are compared with f A(k-1) XOR A(k) and
// (NOT f AND NOT A(k)) XOR NOT A(k-1); with A(k-1) = 0 the last output must
// be f OR A(k); and no two inputs may give the same output word.
module tb_kk_gate;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instance per width, all driven from the same input word
  logic [6:0] in;
  logic [6:0] out [3:7];
  for (genvar K = 3; K <= 7; K++) begin : g_k
    kk_gate #(.K(K)) dut (
      .pass_in (in[K-1:2]),
      .a_km1   (in[1]),
      .a_k     (in[0]),
      .pass_out(out[K][K-1:2]),
      .p_km1   (out[K][1]),
      .p_k     (out[K][0])
    );
    if (K < 7) begin : g_pad
      assign out[K][6:K] = '0;
    end
  end

  initial begin
    for (int K = 3; K <= 7; K++) begin
      bit seen [128];
      seen = '{default: 1'b0};
      for (int v = 0; v < (1 << K); v++) begin
        bit f, akm1, ak;
        in = 7'(v);
        #1;
        f = 1'b1;
        for (int i = 2; i < K; i++) f = f && in[i];
        akm1 = in[1];
        ak   = in[0];
        for (int i = 2; i < K; i++) check(out[K][i] == in[i], $sformatf("K=%0d pass", K));
        check(out[K][1] == ((f && akm1) != ak), $sformatf("K=%0d p_km1", K));
        check(out[K][0] == ((!f && !ak) != !akm1), $sformatf("K=%0d p_k", K));
        if (!akm1) check(out[K][0] == (f || ak), $sformatf("K=%0d OR use", K));
        check(!seen[out[K]], $sformatf("K=%0d one-to-one", K));
        seen[out[K]] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
