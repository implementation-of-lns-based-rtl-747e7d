// tb_mitchell_multiplier: exhaustive 8 x 8 check against an integer model of
// Mitchell's algorithm, the two partial products of the worked example
// (173 x 4 = 692, 33 x 136 = 4480), the Mitchell error column of the
// comparison table (1.15 %, 5.92 %, 10.41 %, truncated to two decimals), and
// random 16 x 16 operands on a wider instance. Counts how often the mantissa
// sum carries into the characteristic and how often an operand is zero;
// both must occur.
module tb_mitchell_multiplier;
  import tb_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic        zero;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic        zero16;
  int checks = 0, failures = 0;
  int n_carry = 0, n_nocarry = 0, n_zero = 0;

  mitchell_multiplier #(.N(8))  dut   (.a(a),   .b(b),   .p(p),   .zero(zero));
  mitchell_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16), .zero(zero16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d p=%0d", what, a, b, p);
    end
  endtask

  // Error in hundredths of a percent, truncated, as in the comparison table.
  function automatic int err_centi(input int exact, input int approx);
    return ((exact - approx) * 10000) / exact;
  endfunction

  task automatic table_row(input int x, input int y, input int centi);
    a = 8'(x); b = 8'(y);
    #1;
    check(err_centi(x * y, int'(p)) == centi, "table error");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd173; b = 8'd4;   #1; check(p == 16'd692,  "example A*B");
    a = 8'd33;  b = 8'd136; #1; check(p == 16'd4480, "example C*D");
    table_row(140, 37, 115);
    table_row(117, 157, 592);
    table_row(203, 183, 1041);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        check(longint'(p) == mitchell_ref(i, j, 8), "exhaustive");
        check(zero == (i == 0 || j == 0), "zero flag");
        check(int'(p) <= i * j, "underestimate");
        if (i == 0 || j == 0) n_zero++;
        else if (((i << (7 - msb_pos(i))) & 127) + ((j << (7 - msb_pos(j))) & 127) >= 128)
          n_carry++;
        else n_nocarry++;
      end

    for (int r = 0; r < 20000; r++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (r % 100 == 0) a16 = '0;
      #1;
      checks++;
      if (longint'(p16) != mitchell_ref(a16, b16, 16)) begin
        failures++;
        if (failures < 10) $display("FAIL n16 %0d x %0d got %0d", a16, b16, p16);
      end
    end

    $display("mantissa carry=%0d no carry=%0d zero operand=%0d", n_carry, n_nocarry, n_zero);
    checks++; if (n_carry == 0)   failures++;
    checks++; if (n_nocarry == 0) failures++;
    checks++; if (n_zero == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
