// od_multiplier: approximate N x N -> 2N+1 bit unsigned multiplier using
// operand decomposition ahead of Mitchell's logarithmic multiplication.
// X and Y are split into A = X|Y, B = X&Y, C = ~X&Y, D = X&~Y, for which
// X*Y = A*B + C*D holds exactly. Each of the two products is formed by its own
// Mitchell multiplier (logarithm, adder, antilogarithm, zero detector), and a
// ripple-carry adder sums them: op = op1 + op2. Because the decomposed operands
// have fewer 1 bits, their mantissas are smaller and Mitchell's error shrinks
// (for 140 x 37: 5172 against 5180, where Mitchell alone gives 5120).
// Interface: x, y are the operands; op is the approximate product; op1 and
// op2 are the two partial products, brought out for observation. The unit is
// purely combinational: op is valid one propagation delay after x and y
// change; there is no clock, reset or handshake.
// The structure and the 17-bit op for 8-bit operands follow the method; the
// extra output ports are this design's choice.
module od_multiplier #(
  parameter int unsigned N = od_pkg::OD_N
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] op1,
  output logic [2*N-1:0] op2,
  output logic [2*N:0]   op
);
  logic [N-1:0]   a, b, c, d;
  logic           zero_ab, zero_cd;
  logic [2*N-1:0] sum;
  logic           carry;

  operand_decomposition #(.N(N)) u_od (
    .x(x), .y(y), .a(a), .b(b), .c(c), .d(d)
  );

  mitchell_multiplier #(.N(N)) u_mul_ab (.a(a), .b(b), .p(op1), .zero(zero_ab));
  mitchell_multiplier #(.N(N)) u_mul_cd (.a(c), .b(d), .p(op2), .zero(zero_cd));

  // The zero flags are not needed by the sum: the products are already zeroed.
  ripple_carry_adder #(.W(2 * N), .USE_CIN(1'b0)) u_add_out (
    .a(op1), .b(op2), .ci(1'b0), .s(sum), .co(carry)
  );
  assign op = {carry, sum};
endmodule
