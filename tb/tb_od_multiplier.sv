// tb_od_multiplier: end-to-end test of the operand-decomposition multiplier at
// its default width (8-bit operands, 17-bit product), no parameter override.
//  * The worked example 140 x 37: op1 = 692, op2 = 4480, op = 5172, the exact
//    bit patterns of the reference simulation.
//  * The comparison table: the error of op against the exact product, in
//    hundredths of a percent and truncated, is 15, 157 and 76 for
//    140 x 37, 117 x 157 and 203 x 183.
//  * All 65536 operand pairs against an integer model (Mitchell applied to
//    A*B and C*D, then added), and op never above the exact product.
// Each mechanism is counted and must occur at least once: the zero detector
// of either half firing, a mantissa carry into the characteristic in either
// half, and an operand with its leading 1 in the top bit (shift of zero).
// Prints the mean and worst-case relative error over all non-zero pairs, for
// this multiplier and for Mitchell's algorithm applied directly to x and y.
module tb_od_multiplier;
  import tb_ref_pkg::*;

  logic [7:0]  x, y;
  logic [15:0] op1, op2;
  logic [16:0] op;
  int checks = 0, failures = 0;
  int n_zero_ab = 0, n_zero_cd = 0, n_carry_ab = 0, n_carry_cd = 0, n_top = 0;
  real err_sum = 0.0, err_max = 0.0, ma_sum = 0.0, ma_max = 0.0;
  int  err_cnt = 0;

  od_multiplier dut (.x(x), .y(y), .op1(op1), .op2(op2), .op(op));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d op1=%0d op2=%0d op=%0d", what, x, y, op1, op2, op);
    end
  endtask

  function automatic int frac7(input int v);
    return (v << (7 - msb_pos(v))) & 127;
  endfunction

  function automatic bit carries(input int p, input int q);
    return (p != 0) && (q != 0) && (frac7(p) + frac7(q) >= 128);
  endfunction

  task automatic table_row(input int xv, input int yv, input int centi);
    x = 8'(xv); y = 8'(yv);
    #1;
    check(((xv * yv - int'(op)) * 10000) / (xv * yv) == centi, "table error");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 8'b10001100; y = 8'b00100101;
    #1;
    check(op1 == 16'b0000001010110100, "example op1");
    check(op2 == 16'b0001000110000000, "example op2");
    check(op  == 17'b00001010000110100, "example op");
    check(op  == 17'd5172, "example 5172");
    table_row(140, 37, 15);
    table_row(117, 157, 157);
    table_row(203, 183, 76);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int a, b, c, d;
        x = 8'(i); y = 8'(j);
        a = i | j; b = i & j; c = ~i & j & 255; d = i & ~j & 255;
        #1;
        check(longint'(op1) == mitchell_ref(a, b, 8), "op1");
        check(longint'(op2) == mitchell_ref(c, d, 8), "op2");
        check(longint'(op) == od_ref(i, j, 8), "op");
        check(int'(op) <= i * j, "underestimate");
        if (a == 0 || b == 0) n_zero_ab++;
        if (c == 0 || d == 0) n_zero_cd++;
        if (carries(a, b)) n_carry_ab++;
        if (carries(c, d)) n_carry_cd++;
        if (i >= 128 || j >= 128) n_top++;
        if (i != 0 && j != 0) begin
          real e;
          e = real'(i * j - int'(op)) / real'(i * j) * 100.0;
          err_sum += e;
          err_cnt++;
          if (e > err_max) err_max = e;
          e = real'(longint'(i * j) - longint'(mitchell_ref(i, j, 8))) / real'(i * j) * 100.0;
          ma_sum += e;
          if (e > ma_max) ma_max = e;
        end
      end

    $display("zero A*B=%0d zero C*D=%0d carry A*B=%0d carry C*D=%0d top-bit operand=%0d",
             n_zero_ab, n_zero_cd, n_carry_ab, n_carry_cd, n_top);
    $display("relative error over %0d pairs: mean %0.3f %%, worst %0.3f %%",
             err_cnt, err_sum / err_cnt, err_max);
    $display("Mitchell alone, same pairs:       mean %0.3f %%, worst %0.3f %%",
             ma_sum / err_cnt, ma_max);
    check(n_zero_ab > 0,  "zero detector A*B never fired");
    check(n_zero_cd > 0,  "zero detector C*D never fired");
    check(n_carry_ab > 0, "mantissa carry A*B never happened");
    check(n_carry_cd > 0, "mantissa carry C*D never happened");
    check(n_top > 0,      "top-bit operand never applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
