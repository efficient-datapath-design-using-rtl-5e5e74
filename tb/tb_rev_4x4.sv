// tb_rev_4x4: exhaustive check of the 4*4 block.
//
// All 16 inputs: C = 0 passes straight, C = 1 routes output 2 <- input 3,
// output 3 <- input 4, output 4 <- input 2; ones are preserved; the map is
// one-to-one. Then the full-adder use: inputs (C, A XOR B, A XNOR B, 0)
// must give output 2 = C XOR A XOR B and output 4 = C AND (A XOR B).
module tb_rev_4x4;

  int checks = 0, failures = 0;
  logic [3:0] in, out;   // bit 3 = C / output 1
  bit seen [16];

  rev_4x4 dut (
    .c(in[3]), .i2(in[2]), .i3(in[1]), .i4(in[0]),
    .o1(out[3]), .o2(out[2]), .o3(out[1]), .o4(out[0])
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
    logic A, B, C;
    for (int v = 0; v < 16; v++) begin
      in = 4'(v);
      #1;
      if (in[3]) check(out == {in[3], in[1], in[0], in[2]}, "crossed");
      else       check(out == in, "straight");
      check($countones(out) == $countones(in), "conservative");
      check(!seen[out], "one-to-one");
      seen[out] = 1'b1;
    end
    for (int v = 0; v < 8; v++) begin
      {C, A, B} = 3'(v);
      in = {C, A ^ B, ~(A ^ B), 1'b0};
      #1;
      check(out[2] == ((A + B + C) % 2 == 1), "sum");
      check(out[0] == (C && (A != B)), "carry term");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
