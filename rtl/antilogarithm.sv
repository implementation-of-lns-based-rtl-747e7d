// antilogarithm: turns a summed logarithm back into an integer product.
// Input is the characteristic k12 (KW+1 bits, up to 2N-1) and the summed
// mantissa s (N-1 bits, left-aligned). A 1 is prepended to the mantissa and
// the N-bit word {1, s} is shifted left by k12; the N-1 fraction bits that fall
// below the binary point are dropped, so p = floor(2**k12 * (1 + s/2**(N-1))).
// A carry out of the mantissa addition is not handled here: it has already
// been added into k12, which places {1, s} one position higher, giving
// Mitchell's 2**(k+1) * (f1 + f2) for that case.
// Purely combinational: one left barrel shifter over a (3N-1)-bit field. The
// truncation of the fraction bits is this design's choice.
module antilogarithm #(
  parameter int unsigned N  = od_pkg::OD_N,
  parameter int unsigned KW = $clog2(N)
) (
  input  logic [KW:0]    k12,
  input  logic [N-2:0]   s,
  output logic [2*N-1:0] p
);
  localparam int unsigned FW = 3 * N - 1;  // {1,s} shifted by up to 2N-1

  logic [FW-1:0] field_in, field_out;

  assign field_in = {{(FW - N){1'b0}}, 1'b1, s};

  barrel_shifter_left #(.W(FW), .SW(KW + 1)) u_shift (
    .d(field_in), .sh(k12), .q(field_out)
  );

  assign p = field_out[FW-1:N-1];
endmodule
