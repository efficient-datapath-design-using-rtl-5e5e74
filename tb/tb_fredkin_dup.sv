// tb_fredkin_dup: checks that the duplicator returns (A, A, NOT A).
module tb_fredkin_dup;

  int checks = 0, failures = 0;
  logic a, a1, a2, a_n;

  fredkin_dup dut (.a(a), .a1(a1), .a2(a2), .a_n(a_n));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      #1;
      checks++;
      if ({a1, a2, a_n} != {a, a, ~a}) begin
        failures++;
        $display("FAIL a=%0b got %b", a, {a1, a2, a_n});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
