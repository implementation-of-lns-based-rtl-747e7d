// mitchell_multiplier: approximate N x N -> 2N bit product by Mitchell's
// algorithm, log2(a*b) ~ (ka + fa) + (kb + fb).
// Both operands go through a logarithm block. The (N-1)-bit mantissas are added
// first; the carry out of that addition is the carry input of the
// characteristic adder, so the two adders together form one fixed-point
// addition of the logarithms. The antilogarithm prepends a 1 to the mantissa
// sum and shifts it by the characteristic sum, and the zero detector forces
// the result to zero when an operand is zero.
// The result never exceeds the exact product, so it fits in 2N bits.
// Purely combinational. Routing the mantissa carry into the characteristic
// (standard Mitchell handling of a mantissa sum of 1 or more) is this design's
// reading of the method; its error figures agree with it.
module mitchell_multiplier #(
  parameter int unsigned N  = od_pkg::OD_N,
  parameter int unsigned KW = $clog2(N)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic           zero
);
  logic [KW-1:0]  ka, kb, ksum;
  logic [N-2:0]   fa, fb, fsum;
  logic           fcarry, kcarry;
  logic [KW:0]    k12;
  logic [2*N-1:0] p_raw;

  logarithm #(.N(N), .KW(KW)) u_log_a (.v(a), .k(ka), .frac(fa));
  logarithm #(.N(N), .KW(KW)) u_log_b (.v(b), .k(kb), .frac(fb));

  // Mantissa adder: no carry input, so its LSB is a half adder.
  ripple_carry_adder #(.W(N - 1), .USE_CIN(1'b0)) u_add_frac (
    .a(fa), .b(fb), .ci(1'b0), .s(fsum), .co(fcarry)
  );

  // Characteristic adder: k12 = ka + kb + mantissa carry.
  ripple_carry_adder #(.W(KW), .USE_CIN(1'b1)) u_add_char (
    .a(ka), .b(kb), .ci(fcarry), .s(ksum), .co(kcarry)
  );
  assign k12 = {kcarry, ksum};

  antilogarithm #(.N(N), .KW(KW)) u_antilog (.k12(k12), .s(fsum), .p(p_raw));

  zero_detector #(.N(N)) u_zero (.a(a), .b(b), .p_in(p_raw), .p(p), .zero(zero));
endmodule
