// tb_rev_rca: ripple-carry adder against integer addition.
//
// The default 4-bit adder is checked for all 512 (a, b, cin); an 8-bit
// instance is checked with 2000 random operands plus the all-propagate case
// where a carry in ripples through every bit.
module tb_rev_rca;

  int checks = 0, failures = 0;
  logic [3:0]  a4, b4, s4;
  logic [7:0]  a8, b8, s8;
  logic        cin, co4, co8;
  logic [27:0] g4;
  logic [55:0] g8;

  rev_rca dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4), .garbage(g4));
  rev_rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(co8), .garbage(g8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a4=%h b4=%h a8=%h b8=%h cin=%0b", what, a4, b4, a8, b8, cin);
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
    a8 = '0; b8 = '0;
    for (int v = 0; v < 512; v++) begin
      {cin, a4, b4} = 9'(v);
      #1;
      check({co4, s4} == 5'(int'(a4) + int'(b4) + int'(cin)), "4-bit");
    end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); cin = 1'($urandom);
      if (n == 0) begin a8 = 8'hff; b8 = 8'h00; cin = 1'b1; end
      #1;
      check({co8, s8} == 9'(int'(a8) + int'(b8) + int'(cin)), "8-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
