// tb_priority_encoder: every one-hot 8-bit input, and all zero, against the
// bit index; also a 16-input instance.
module tb_priority_encoder;
  logic [7:0]  oh8;
  logic [2:0]  k8;
  logic [15:0] oh16;
  logic [3:0]  k16;
  int checks = 0, failures = 0;

  priority_encoder #(.N(8))  dut8  (.onehot(oh8),  .k(k8));
  priority_encoder #(.N(16)) dut16 (.onehot(oh16), .k(k16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh8 = '0; oh16 = '0;
    #1;
    checks++;
    if (k8 != 0 || k16 != 0) begin failures++; $display("FAIL zero input"); end
    for (int i = 0; i < 16; i++) begin
      oh16 = 16'(1 << i);
      oh8  = 8'(1 << (i % 8));
      #1;
      checks++;
      if (int'(k16) != i) begin failures++; $display("FAIL n16 bit %0d got %0d", i, k16); end
      checks++;
      if (int'(k8) != i % 8) begin failures++; $display("FAIL n8 bit %0d got %0d", i % 8, k8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
