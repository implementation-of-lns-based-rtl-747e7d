// tb_logarithm: exhaustive 8-bit check of characteristic and mantissa against
// an integer model, the four operands of the worked example (173, 4, 33, 136),
// and random 16-bit operands on a wider instance.
module tb_logarithm;
  logic [7:0]  v;
  logic [2:0]  k;
  logic [6:0]  frac;
  logic [15:0] v16;
  logic [3:0]  k16;
  logic [14:0] frac16;
  int checks = 0, failures = 0;

  logarithm #(.N(8))  dut   (.v(v),   .k(k),   .frac(frac));
  logarithm #(.N(16)) dut16 (.v(v16), .k(k16), .frac(frac16));

  function automatic int top_bit(input int val);
    int t = -1;
    for (int j = 0; j < 31; j++) if ((val >> j) & 1) t = j;
    return t;
  endfunction

  task automatic check8(input int val, input int ek, input int ef);
    v = 8'(val);
    #1;
    checks++;
    if (int'(k) != ek || int'(frac) != ef) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d got k=%0d f=%b expected k=%0d f=%b", val, k, frac, ek, 7'(ef));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example operands.
    check8(173, 7, 7'b0101101);
    check8(4,   2, 7'b0000000);
    check8(33,  5, 7'b0000100);
    check8(136, 7, 7'b0001000);
    for (int i = 1; i < 256; i++) begin
      int t;
      t = top_bit(i);
      check8(i, t, ((i << (7 - t)) & 127));
    end
    for (int r = 0; r < 2000; r++) begin
      int val, t;
      val = int'($urandom_range(65535, 1));
      t = top_bit(val);
      v16 = 16'(val);
      #1;
      checks++;
      if (int'(k16) != t || int'(frac16) != ((val << (15 - t)) & 32'h7fff)) begin
        failures++;
        if (failures < 10) $display("FAIL n16 v=%0d got k=%0d f=%h", val, k16, frac16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
