// tb_barrel_shifter_left: exhaustive 8-bit data and shift check against <<,
// plus random data on a 23-bit instance with a 4-bit shift, the shape used by
// the antilogarithm.
module tb_barrel_shifter_left;
  logic [7:0]  d8, q8;
  logic [2:0]  sh8;
  logic [22:0] d23, q23;
  logic [3:0]  sh23;
  int checks = 0, failures = 0;

  barrel_shifter_left #(.W(8))           dut8  (.d(d8),  .sh(sh8),  .q(q8));
  barrel_shifter_left #(.W(23), .SW(4))  dut23 (.d(d23), .sh(sh23), .q(q23));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int s = 0; s < 8; s++) begin
        d8 = 8'(i); sh8 = 3'(s);
        d23 = 23'($urandom); sh23 = 4'($urandom);
        #1;
        checks++;
        if (q8 != 8'(i * (1 << s))) begin
          failures++;
          if (failures < 10) $display("FAIL %b << %0d got %b", d8, s, q8);
        end
        checks++;
        if (q23 != 23'(longint'(d23) * (longint'(1) << sh23))) begin
          failures++;
          if (failures < 10) $display("FAIL w23 %h << %0d got %h", d23, sh23, q23);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
