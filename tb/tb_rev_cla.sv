// tb_rev_cla: carry-lookahead adder against integer addition.
//
// The default 4-bit adder is checked for all 512 (a, b, cin) and a 6-bit
// instance for all 8192.
module tb_rev_cla;

  int checks = 0, failures = 0;
  logic [3:0] a4, b4, s4;
  logic [5:0] a6, b6, s6;
  logic       cin, co4, co6;

  rev_cla dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  rev_cla #(.WIDTH(6)) dut6 (.a(a6), .b(b6), .cin(cin), .sum(s6), .cout(co6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a4=%h b4=%h a6=%h b6=%h cin=%0b", what, a4, b4, a6, b6, cin);
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
    for (int v = 0; v < 8192; v++) begin
      {cin, a6, b6} = 13'(v);
      a4 = a6[3:0];
      b4 = b6[3:0];
      #1;
      check({co6, s6} == 7'(int'(a6) + int'(b6) + int'(cin)), "6-bit");
      if (a6[5:4] == 0 && b6[5:4] == 0)
        check({co4, s4} == 5'(int'(a4) + int'(b4) + int'(cin)), "4-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
