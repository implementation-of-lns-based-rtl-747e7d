// priority_encoder: converts the one-hot leading-one marker into the binary
// position k of the leading 1 (the characteristic of the logarithm).
// Each output bit j is the OR of the one-hot inputs whose index has bit j set,
// which is exact for a one-hot or all-zero input (all zero gives k = 0).
// Purely combinational. The OR-of-indices structure is this design's choice.
module priority_encoder #(
  parameter int unsigned N  = od_pkg::OD_N,
  parameter int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  onehot,
  output logic [KW-1:0] k
);
  always_comb begin
    k = '0;
    for (int j = 0; j < int'(KW); j++)
      for (int i = 0; i < int'(N); i++)
        if (((i >> j) & 1) == 1) k[j] = k[j] | onehot[i];
  end
endmodule
