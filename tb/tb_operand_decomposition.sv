// tb_operand_decomposition: exhaustive 8-bit check of the four decomposed
// operands against their definitions, of A*B + C*D == X*Y, and of the worked
// example 140, 37 -> 10101101, 00000100, 00100001, 10001000.
module tb_operand_decomposition;
  logic [7:0] x, y, a, b, c, d;
  int checks = 0, failures = 0;

  operand_decomposition #(.N(8)) dut (.x(x), .y(y), .a(a), .b(b), .c(c), .d(d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d", what, x, y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 8'd140; y = 8'd37;
    #1;
    check(a == 8'b10101101 && b == 8'b00000100 &&
          c == 8'b00100001 && d == 8'b10001000, "worked example");
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x = 8'(i); y = 8'(j);
        #1;
        for (int bit_i = 0; bit_i < 8; bit_i++) begin
          check(a[bit_i] == (x[bit_i] || y[bit_i]), "a");
          check(b[bit_i] == (x[bit_i] && y[bit_i]), "b");
          check(c[bit_i] == (!x[bit_i] && y[bit_i]), "c");
          check(d[bit_i] == (x[bit_i] && !y[bit_i]), "d");
        end
        check(int'(a) * int'(b) + int'(c) * int'(d) == i * j, "product identity");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
