// leading_one_detector: marks the most significant 1 of an N-bit word.
// onehot has exactly one bit set, at the position of the leading 1 of v, and
// is all zero when v is zero. Built as a prefix OR from the top bit down: a
// bit is the leading one when it is set and no bit above it is. Purely
// combinational. The prefix-OR structure is this design's choice; the method
// only names the detector.
module leading_one_detector #(
  parameter int unsigned N = od_pkg::OD_N
) (
  input  logic [N-1:0] v,
  output logic [N-1:0] onehot
);
  logic [N-1:0] above;  // above[i]: some bit higher than i is set

  always_comb begin
    above[N-1] = 1'b0;
    for (int i = N - 2; i >= 0; i--) above[i] = above[i+1] | v[i+1];
    onehot = v & ~above;
  end
endmodule
