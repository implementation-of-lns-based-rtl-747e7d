// tb_od_multiplier_n16: the operand-decomposition multiplier built for 16-bit
// operands (33-bit product), checked on random operand pairs, on operands
// that share no 1 bit (the A*B half is zeroed) and on equal operands (the C*D
// half is zeroed) against the integer model. Shows the RTL is correct at a
// width other than the default.
module tb_od_multiplier_n16;
  import tb_ref_pkg::*;

  logic [15:0] x, y;
  logic [31:0] op1, op2;
  logic [32:0] op;
  int checks = 0, failures = 0;

  od_multiplier #(.N(16)) dut (.x(x), .y(y), .op1(op1), .op2(op2), .op(op));

  task automatic check_pair(input logic [15:0] xv, input logic [15:0] yv);
    x = xv; y = yv;
    #1;
    checks++;
    if (longint'(op) != od_ref(xv, yv, 16) || longint'(op) > longint'(xv) * longint'(yv)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d got %0d expected %0d", xv, yv, op, od_ref(xv, yv, 16));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    check_pair(16'd0, 16'd0);
    check_pair(16'hffff, 16'hffff);
    check_pair(16'd140, 16'd37);
    for (int i = 0; i < 50000; i++) begin
      r = 16'($urandom);
      check_pair(16'($urandom), 16'($urandom));
      check_pair(r, ~r & 16'($urandom));   // no common bit: B = 0
      check_pair(r, r);                    // C = D = 0
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
