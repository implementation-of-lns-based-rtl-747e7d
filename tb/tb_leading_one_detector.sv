// tb_leading_one_detector: exhaustive 8-bit check that the output has a single
// bit set at the position of the highest 1 of the input, and none for zero.
module tb_leading_one_detector;
  logic [7:0] v, onehot;
  int checks = 0, failures = 0;

  leading_one_detector #(.N(8)) dut (.v(v), .onehot(onehot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int top;
      logic [7:0] expect_oh;
      v = 8'(i);
      top = -1;
      for (int j = 0; j < 8; j++) if (i >= (1 << j)) top = j;
      expect_oh = (top < 0) ? 8'd0 : 8'(1 << top);
      #1;
      checks++;
      if (onehot != expect_oh) begin
        failures++;
        $display("FAIL v=%b got %b expected %b", v, onehot, expect_oh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
