// barrel_shifter_left: logarithmic left shifter, q = d << sh, zeros shifted in.
// Stage j shifts by 2**j when sh[j] is set, so the shifter has SW stages of
// 2:1 multiplexers. Purely combinational. Used both to normalise the operands
// in the logarithm and to place the mantissa in the antilogarithm.
module barrel_shifter_left #(
  parameter int unsigned W  = od_pkg::OD_N,
  parameter int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  d,
  input  logic [SW-1:0] sh,
  output logic [W-1:0]  q
);
  logic [W-1:0] stage [SW+1];

  always_comb begin
    stage[0] = d;
    for (int j = 0; j < int'(SW); j++)
      stage[j+1] = sh[j] ? (stage[j] << (1 << j)) : stage[j];
    q = stage[SW];
  end
endmodule
