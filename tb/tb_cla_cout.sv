// tb_cla_cout: lookahead carry-out block against a rippled reference.
//
// The reference carry is computed bit by bit, c = g[i] | (p[i] & c), which
// is the nested form of the lookahead equation; the block computes the
// flat sum-of-products form. The default N = 4 block is checked for all
// 512 combinations of p, g and cin; N = 1 and N = 6 instances for all of
// theirs (8 and 8192).
module tb_cla_cout;

  int checks = 0, failures = 0;
  logic [5:0] p, g;
  logic       cin;
  logic       c1, c4, c6;
  logic [2:0]  gb1;
  logic [17:0] gb4;
  logic [32:0] gb6;

  cla_cout #(.N(1)) dut1 (.p(p[0:0]), .g(g[0:0]), .cin(cin), .cout(c1), .garbage(gb1));
  cla_cout          dut4 (.p(p[3:0]), .g(g[3:0]), .cin(cin), .cout(c4), .garbage(gb4));
  cla_cout #(.N(6)) dut6 (.p(p), .g(g), .cin(cin), .cout(c6), .garbage(gb6));

  function automatic bit ripple(input logic [5:0] pp, input logic [5:0] gg, input bit ci, input int n);
    bit c = ci;
    for (int i = 0; i < n; i++) c = gg[i] || (pp[i] && c);
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s p=%b g=%b cin=%0b", what, p, g, cin);
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
      {cin, p, g} = 13'(v);
      #1;
      check(c6 == ripple(p, g, cin, 6), "N=6");
      if (p[5:4] == 0 && g[5:4] == 0) check(c4 == ripple(p, g, cin, 4), "N=4");
      if (p[5:1] == 0 && g[5:1] == 0) check(c1 == ripple(p, g, cin, 1), "N=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
