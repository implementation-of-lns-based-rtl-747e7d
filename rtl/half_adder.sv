// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
// Purely combinational. The multiplier's adders are built from half and full
// adders; the half adder takes the least significant bit of a ripple-carry
// adder that has no carry input.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
