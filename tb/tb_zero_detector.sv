// tb_zero_detector: the product passes unchanged when both operands are
// non-zero and is zero (with the flag set) when either is zero. Directed
// zero cases plus random operands and products.
module tb_zero_detector;
  logic [7:0]  a, b;
  logic [15:0] p_in, p;
  logic        zero;
  int checks = 0, failures = 0;
  int zero_cases = 0;

  zero_detector #(.N(8)) dut (.a(a), .b(b), .p_in(p_in), .p(p), .zero(zero));

  task automatic check();
    bit ez;
    #1;
    ez = (a == 0) || (b == 0);
    if (ez) zero_cases++;
    checks++;
    if (zero != ez || p != (ez ? 16'd0 : p_in)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p_in=%h got p=%h zero=%0b", a, b, p_in, p, zero);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); b = 8'd0;  p_in = 16'hffff; check();
      a = 8'd0;  b = 8'(i); p_in = 16'(16'h8001 + i); check();
      a = 8'(i); b = 8'd1;  p_in = 16'(i * 251 + 1); check();
      a = 8'd128; b = 8'(i); p_in = 16'(i + 3); check();
    end
    for (int r = 0; r < 5000; r++) begin
      a = 8'($urandom); b = 8'($urandom); p_in = 16'($urandom);
      check();
    end
    checks++;
    if (zero_cases == 0) begin failures++; $display("FAIL no zero operand was applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
