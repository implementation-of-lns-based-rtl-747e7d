// tb_antilogarithm: every characteristic 0..15 and mantissa sum 0..127 for
// 8-bit operands against floor(2**k * (128 + s) / 128), plus the two worked
// example values 692 (k=9, s=0101101) and 4480 (k=12, s=0001100).
module tb_antilogarithm;
  logic [3:0]  k12;
  logic [6:0]  s;
  logic [15:0] p;
  int checks = 0, failures = 0;

  antilogarithm #(.N(8)) dut (.k12(k12), .s(s), .p(p));

  task automatic check(input int k, input int m, input longint unsigned expected);
    k12 = 4'(k); s = 7'(m);
    #1;
    checks++;
    if (longint'(p) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d s=%b got %0d expected %0d", k, 7'(m), p, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(9,  7'b0101101, 692);
    check(12, 7'b0001100, 4480);
    for (int k = 0; k < 16; k++)
      for (int m = 0; m < 128; m++)
        check(k, m, ((longint'(128 + m)) << k) >> 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
