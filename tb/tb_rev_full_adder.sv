// tb_rev_full_adder: exhaustive check of the reversible full adder.
//
// For all eight (a, b, cin): {cout, sum} must equal the arithmetic sum
// a + b + cin, and the ones count of all outputs (sum, cout, seven garbage
// bits) must equal that of all inputs including the six constants (three
// of them ones). The nine-bit output words must also all differ.
module tb_rev_full_adder;

  int checks = 0, failures = 0;
  logic a, b, cin, sum, cout;
  logic [6:0] garbage;
  logic [8:0] words [8];

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b cin=%0b sum=%0b cout=%0b g=%b", what, a, b, cin, sum, cout, garbage);
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
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check({cout, sum} == 2'(total), "sum/carry");
      check(int'(sum) + int'(cout) + $countones(garbage) == total + 3, "conservative");
      words[v] = {sum, cout, garbage};
    end
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        check(words[i] != words[j], "one-to-one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
