// operand_decomposition: splits two N-bit operands into four whose pairwise
// products add up to the exact product:
//   A = X | Y,  B = X & Y,  C = ~X & Y,  D = X & ~Y,  X*Y = A*B + C*D.
// The decomposed operands have more zero bits than X and Y, so the mantissas
// seen by the Mitchell multipliers are smaller and so is their error.
// Purely combinational, one gate level. The equations follow the method; which
// of the OR and AND terms is called A is immaterial to the product.
module operand_decomposition #(
  parameter int unsigned N = od_pkg::OD_N
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic [N-1:0] c,
  output logic [N-1:0] d
);
  always_comb begin
    a = x | y;
    b = x & y;
    c = ~x & y;
    d = x & ~y;
  end
endmodule
