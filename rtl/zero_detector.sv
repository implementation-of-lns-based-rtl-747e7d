// zero_detector: passes the Mitchell product through unless either operand is
// zero, in which case the product is forced to zero. The logarithm of zero is
// undefined and the logarithm block would otherwise return 1 for it, so this
// block is what makes 0 * y = 0. Purely combinational: a NOR-reduction of each
// operand and an AND gate on every product bit.
module zero_detector #(
  parameter int unsigned N = od_pkg::OD_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] p_in,
  output logic [2*N-1:0] p,
  output logic           zero
);
  always_comb begin
    zero = ~(|a) | ~(|b);
    p    = zero ? '0 : p_in;
  end
endmodule
