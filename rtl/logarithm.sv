// logarithm: Mitchell's approximate binary logarithm of an N-bit operand.
// For v = 2**k * (1 + f), 0 <= f < 1, it returns the characteristic k and the
// mantissa f as N-1 bits left-aligned (f = frac / 2**(N-1)); log2(v) is then
// approximated by k + f, the straight line between powers of two.
// How it works: the leading-one detector marks the top 1 of v, the encoder
// turns that mark into k, and inverting k gives the left-shift count N-1-k
// (a leading 1 already in bit N-1 gives a shift of 0). The barrel shifter
// moves the leading 1 to bit N-1; the bits below it are the mantissa.
// Purely combinational. A zero operand gives k = 0 and frac = 0; the zero
// detector downstream handles that case. The detector / encoder / inverter /
// shifter chain follows the method; N must be a power of two so that ~k is
// N-1-k, which is this design's restriction.
module logarithm #(
  parameter int unsigned N  = od_pkg::OD_N,
  parameter int unsigned KW = $clog2(N)
) (
  input  logic [N-1:0]  v,
  output logic [KW-1:0] k,
  output logic [N-2:0]  frac
);
  if (!od_pkg::is_pow2(N) || N < 2) begin : g_bad_n
    $error("logarithm: N must be a power of two, at least 2");
  end

  logic [N-1:0]  onehot;
  logic [KW-1:0] shamt;
  logic [N-1:0]  norm;

  leading_one_detector #(.N(N)) u_lod (.v(v), .onehot(onehot));
  priority_encoder #(.N(N), .KW(KW)) u_enc (.onehot(onehot), .k(k));

  assign shamt = ~k;  // N-1-k for N a power of two

  barrel_shifter_left #(.W(N), .SW(KW)) u_shift (.d(v), .sh(shamt), .q(norm));

  // norm[N-1] is the leading 1 itself (or 0 for v = 0) and is implied.
  assign frac = norm[N-2:0];
endmodule
