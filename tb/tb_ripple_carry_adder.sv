// tb_ripple_carry_adder: exhaustive check of an 8-bit adder with carry input
// and of a 7-bit adder without one (half adder in bit 0, carry input tied
// high to show it is ignored), both against integer addition.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, s;
  logic         ci, co;
  logic [W-2:0] a7, b7, s7;
  logic         co7;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W), .USE_CIN(1'b1)) dut (
    .a(a), .b(b), .ci(ci), .s(s), .co(co)
  );
  ripple_carry_adder #(.W(W - 1), .USE_CIN(1'b0)) dut_nc (
    .a(a7), .b(b7), .ci(1'b1), .s(s7), .co(co7)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(i); b = 8'(j); ci = 1'(c);
          a7 = 7'(i); b7 = 7'(j);
          #1;
          checks++;
          if ({co, s} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d got %0d", i, j, c, {co, s});
          end
          checks++;
          if ({co7, s7} != 8'((i % 128) + (j % 128))) begin
            failures++;
            if (failures < 10) $display("FAIL nc %0d+%0d got %0d", i % 128, j % 128, {co7, s7});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
